// redac_ctrl: control unit of the relaxation DAC.
//
// Divides time into frames of M + HOLD clock cycles.  The frame counter runs
// freely from reset.  In the last cycle of a frame LOAD/SHIFT is high, so the
// shift register takes the next code on the edge that starts the frame.  In
// cycles 0 .. M-1 the three-state buffer is enabled (ENABLE low) and drives
// the RC network with b0 .. b(M-1); in cycles M .. M+HOLD-1 it is disabled,
// the capacitor holds its final voltage and sample_valid marks cycle M, the
// first cycle in which that voltage can be used.
//
// The LOAD/SHIFT and active-low ENABLE signals are those of the published
// block diagram.  The frame length, the HOLD idle cycles and the
// sample_valid strobe are this design's own choices (HOLD must be >= 1).
//
// Timing: one frame = M + HOLD cycles, one code per frame.
module redac_ctrl #(
  parameter int unsigned M    = rbdc_pkg::M_BITS_DEF,
  parameter int unsigned HOLD = rbdc_pkg::HOLD_DEF
) (
  input  logic clk,
  input  logic rst_n,
  output logic load_shift_n,  // 1 in the last cycle of a frame
  output logic enable_n,      // 0 while the buffer drives the RC network
  output logic sample_valid   // 1 in the first cycle after the last bit
);
  localparam int unsigned FRAME = M + HOLD;
  localparam int unsigned CW    = $clog2(FRAME);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          cnt <= CW'(FRAME - 1);
    else if (cnt == CW'(FRAME - 1))      cnt <= '0;
    else                                 cnt <= cnt + 1'b1;
  end

  assign load_shift_n = (cnt == CW'(FRAME - 1));
  assign enable_n     = !(cnt < CW'(M));
  assign sample_valid = (cnt == CW'(M));

  initial assert (HOLD >= 1) else $error("redac_ctrl: HOLD must be at least 1");
endmodule
