// redac_output_stage: behavioural model (not synthesizable) of the analog
// end of the relaxation DAC: the three-state buffer and the first-order RC
// network it drives.
//
// While enable_n is low the buffer drives VDD*bit_in into the resistor, and
// over one clock period T the capacitor voltage moves from v towards that
// level by the factor exp(-T/RC):
//     v <- VDD*b + (v - VDD*b) * exp(-T/RC)
// While enable_n is high the buffer output floats and the capacitor keeps
// its voltage.  The model applies one such step at every rising clock edge,
// for the period that the edge ends, so after N driven bits b0..b(N-1)
//     v = VDD*(1 - 1/r) * sum_i b_i * r^(i-N+1)  +  v_start * r^-N,
// with r = exp(T/RC) = 2^(T/T*), T* = RC*ln 2 being the period at which the
// DAC is exactly binary.  The parameter T_RATIO sets T/T*; the default 0.84
// is the published 16 % clock deviation, taken as a period shorter than T*
// (which the published sample rates indicate).  The buffer is ideal (no resistance, no delay); the capacitor
// starts discharged.  The electrical values are not those of any particular
// circuit: only the ratio T/T* matters for linearity.
module redac_output_stage #(
  parameter real VDD     = 0.7,    // buffer supply, V
  parameter real T_RATIO = 0.84    // clock period over the ideal period T*
) (
  input  logic clk,
  input  logic bit_in,     // serial data from the shift register
  input  logic enable_n,   // 0: buffer drives, 1: buffer off (high impedance)
  output real  vc          // capacitor voltage, V
);
  localparam real R_O   = 2.0 ** T_RATIO;  // radix of the DAC, exp(T/RC)
  localparam real DECAY = 1.0 / R_O;       // exp(-T/RC)

  real vo;   // buffer output level while enabled

  initial vc = 0.0;

  always_comb vo = bit_in ? VDD : 0.0;

  always @(posedge clk) begin
    if (!enable_n) vc <= vo + (vc - vo) * DECAY;
  end
endmodule
