// rbdc_redac: relaxation digital-to-analog converter with radix-based
// digital correction, digital core and analog models together.
//
// A relaxation DAC plays the bits of a code, LSB first, one per clock period
// T, into an RC network; the capacitor voltage at the end is the analog
// output.  It is linear only if exp(T/RC) = 2.  Here the clock is left as it
// is: the DAC's actual radix r = exp(T/RC) is found by a start-up binary
// search, and every sample is rewritten from radix 2 into radix r before it
// is played, so that the output is again VDD*code/2^N.
//
// This module joins the synthesizable core (rbdc_core) with behavioural
// models of the three-state buffer and RC network (redac_output_stage) and
// of the comparator used by the calibration (va_vb_comparator), so that the
// whole converter can be simulated.  The capacitor voltage vc is a real
// port.  T_RATIO (T/T*) and VDD only set the analog models.
// Interface and timing are those of rbdc_core.
module rbdc_redac
  import rbdc_pkg::*;
#(
  parameter int unsigned N       = N_BITS_DEF,  // bits of an input sample
  parameter int unsigned M       = M_BITS_DEF,  // bits of the radix-r code
  parameter int unsigned HOLD    = HOLD_DEF,
  parameter int unsigned W_FRAC  = W_FRAC_DEF,
  parameter int unsigned Q_FRAC  = Q_FRAC_DEF,
  parameter real         T_RATIO = 0.84,       // clock period over T*
  parameter real         VDD     = 0.7,
  localparam int unsigned RW     = M + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  data_in,
  output logic          data_take,
  output logic          sample_valid,
  output real           vc,
  input  logic          cal_start,
  output logic [RW-1:0] radix,
  output logic          cal_busy,
  output logic          calibrated
);
  logic dac_bit, dac_enable_n, comp_sample, comp_compare, va_gt_vb;

  rbdc_core #(.N(N), .M(M), .HOLD(HOLD), .W_FRAC(W_FRAC), .Q_FRAC(Q_FRAC)) u_core (
    .clk, .rst_n,
    .data_in, .data_take,
    .dac_bit, .dac_enable_n, .sample_valid,
    .cal_start, .comp_sample, .comp_compare, .va_gt_vb,
    .radix, .cal_busy, .calibrated
  );

  redac_output_stage #(.VDD(VDD), .T_RATIO(T_RATIO)) u_out (
    .clk,
    .bit_in   (dac_bit),
    .enable_n (dac_enable_n),
    .vc
  );

  va_vb_comparator u_cmp (
    .clk, .rst_n,
    .sample   (comp_sample),
    .compare  (comp_compare),
    .vc,
    .va_gt_vb
  );
endmodule
