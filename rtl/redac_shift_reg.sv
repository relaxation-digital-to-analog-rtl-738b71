// redac_shift_reg: parallel-load shift register that serialises a DAC code
// least significant bit first.
//
// On a clock edge with load_shift_n high the register takes the whole code
// din; on an edge with load_shift_n low it shifts one place towards bit 0.
// The serial output bit_out is always bit 0 of the register, so after a load
// it presents b0, then b1, ... , b(M-1) on the following cycles.  This is the
// register of the ReDAC of the published figure (LOAD/SHIFT control, MSB at
// the left, LSB leaving first).  Shifting in zeros at the top and the
// synchronous active-low reset to zero are this design's own choices.
//
// Timing: one bit per clock period T; the code is taken in one cycle.
module redac_shift_reg #(
  parameter int unsigned M = rbdc_pkg::M_BITS_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_shift_n,  // 1: load din, 0: shift right
  input  logic [M-1:0] din,           // code to serialise
  output logic         bit_out        // current bit, LSB first
);
  logic [M-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             sr <= '0;
    else if (load_shift_n)  sr <= din;
    else                    sr <= {1'b0, sr[M-1:1]};
  end

  assign bit_out = sr[0];
endmodule
