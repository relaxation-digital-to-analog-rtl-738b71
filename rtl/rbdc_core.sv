// rbdc_core: digital part of the relaxation DAC with radix-based digital
// correction, everything up to the serial bit that drives the buffer.
//
// Data path: once per frame (M + HOLD clock cycles) the core takes an N-bit
// radix-2 sample from data_in, scales it to M bits (appends M-N zeros),
// converts it to the M-bit radix-r code in the following frame with
// radix_converter, and loads that code into the shift register,
// which plays it LSB first during the frame after that.  The weights r^i*G
// the converter compares with come from radix_weight_gen.  After reset they
// are those of r = 2, so the DAC converts plainly, as an uncorrected DAC.
//
// Calibration: a pulse on cal_start runs radix_cal_ctrl, which takes over
// the converter's input and plays the codes A2 and B2 for N iterations of a
// binary search on r.  It uses the external comparator (comp_sample,
// comp_compare, va_gt_vb) and ends with conversion weights for the radix it
// found.  Samples offered while cal_busy is high are not taken (data_take
// stays low); the first sample played after calibration may be wrong.
//
// Latency: a sample taken in the cycle data_take is high is on the
// capacitor, complete, M + HOLD + M + 1 cycles later, in the cycle in which
// sample_valid is high.  The pipelining of conversion and playback and the
// frame format are this design's own choices; the blocks and the algorithms
// follow the published architecture.
module rbdc_core
  import rbdc_pkg::*;
#(
  parameter int unsigned N      = N_BITS_DEF,   // bits of an input sample
  parameter int unsigned M      = M_BITS_DEF,   // bits of the radix-r code
  parameter int unsigned HOLD   = HOLD_DEF,
  parameter int unsigned W_FRAC = W_FRAC_DEF,
  parameter int unsigned Q_FRAC = Q_FRAC_DEF,
  localparam int unsigned RW    = M + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  // sample input
  input  logic [N-1:0]  data_in,       // radix-2 sample
  output logic          data_take,     // data_in is taken in this cycle
  // to the three-state buffer
  output logic          dac_bit,
  output logic          dac_enable_n,
  output logic          sample_valid,  // capacitor voltage complete
  // calibration
  input  logic          cal_start,
  output logic          comp_sample,
  output logic          comp_compare,
  input  logic          va_gt_vb,
  output logic [RW-1:0] radix,         // radix estimate, M fractional bits
  output logic          cal_busy,
  output logic          calibrated
);
  localparam int unsigned WW = M + W_FRAC;

  logic                 load_shift_n;
  logic                 wgen_start, wgen_done, wgen_busy;
  wmode_e               wgen_mode;
  logic [M-1:0][WW-1:0] w;
  logic [M-1:0]         b2, cal_code, d2, dr;
  logic                 conv_busy, conv_done;

  redac_ctrl #(.M(M), .HOLD(HOLD)) u_ctrl (
    .clk, .rst_n,
    .load_shift_n,
    .enable_n     (dac_enable_n),
    .sample_valid
  );

  redac_shift_reg #(.M(M)) u_sr (
    .clk, .rst_n,
    .load_shift_n,
    .din     (dr),
    .bit_out (dac_bit)
  );

  assign d2        = cal_busy ? cal_code : {data_in, {(M - N){1'b0}}};
  assign data_take = load_shift_n && !cal_busy;

  radix_converter #(.M(M), .W_FRAC(W_FRAC)) u_conv (
    .clk, .rst_n,
    .start (load_shift_n),
    .d2,
    .w,
    .busy  (conv_busy),
    .done  (conv_done),
    .dr
  );

  radix_weight_gen #(.M(M), .RF(M), .W_FRAC(W_FRAC), .Q_FRAC(Q_FRAC)) u_wgen (
    .clk, .rst_n,
    .start (wgen_start),
    .mode  (wgen_mode),
    .r     (radix),
    .busy  (wgen_busy),
    .done  (wgen_done),
    .w,
    .b2
  );

  radix_cal_ctrl #(.M(M), .RF(M)) u_cal (
    .clk, .rst_n,
    .cal_start,
    .wgen_start,
    .wgen_mode,
    .wgen_done,
    .b2,
    .r            (radix),
    .frame_load   (load_shift_n),
    .sample_valid,
    .cal_code,
    .comp_sample,
    .comp_compare,
    .va_gt_vb,
    .cal_busy,
    .calibrated
  );

  // A conversion always ends before the frame that plays its result.
  a_conv_in_time: assert property (@(posedge clk) disable iff (!rst_n)
                                   load_shift_n |-> !conv_busy);
  // The weights never change under a conversion that will be played.
  a_weights_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                     (conv_busy && !cal_busy) |-> !wgen_busy);
  initial assert (M > N) else $error("rbdc_core: M must exceed N");
endmodule
