// radix_weight_gen: computes the M comparison weights of the radix
// correction from the current radix estimate r.
//
// The radix-r code of a radix-2 code D is found by comparing D with the
// weights r^i*G, most significant first.  For conversion G = 2^M(r-1)/r^M,
// which makes the DAC output VDD*D/2^M when r is the true radix (D is an
// M-bit code; rbdc_core scales its N-bit samples up to M bits).  During
// calibration the factor (r-1) is dropped (G = 2^M/r^M), so that the top
// weight is 2^M/r and the code B2 = ceil(2^M/r) is exactly the point where
// the radix-r code's most significant bit switches on.
//
// How it works: a serial restoring divider first forms q = 1/r (Q_FRAC
// cycles).  Then C(M-1) = 2^M*q and C(i-1) = C(i)*q, one multiplication per
// cycle for M cycles, give C(i) = 2^M*r^(i-M); in conversion mode each stored
// weight is C(i)*(r-1).  Only one division is needed.  The divider, the
// downward recurrence and the fixed-point widths are this design's own
// choices.  The weights r^i*G and the conversion G follow the published
// algorithm.  The published calibration setting is G = 1; it is read here as
// "without the factor (r-1)", so that B2 lands on the top weight, which a
// literal G = 1 would not give for r < 2.
//
// After reset w holds the conversion weights of r = 2 (2^i) and b2 = 2^(M-1).
// Interface: pulse start with mode and r valid; busy is high while it
// works; done pulses for one cycle when w and b2 hold the new values.  w and
// b2 stay unchanged until the next start.  b2 = ceil(2^M/r), saturated to
// 2^M-1, is the calibration code B2 (A2 = B2-1).
// Timing: done is high Q_FRAC + M + 2 cycles after the start cycle.
module radix_weight_gen
  import rbdc_pkg::*;
#(
  parameter int unsigned M      = M_BITS_DEF,  // bits of a code
  parameter int unsigned RF     = M_BITS_DEF,  // fractional bits of r
  parameter int unsigned W_FRAC = W_FRAC_DEF,  // fractional bits of a weight
  parameter int unsigned Q_FRAC = Q_FRAC_DEF,  // fractional bits of 1/r
  localparam int unsigned WW    = M + W_FRAC,  // weight width
  localparam int unsigned RW    = RF + 2       // width of r
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  wmode_e                mode,
  input  logic [RW-1:0]         r,      // radix, 1 < r < 4
  output logic                  busy,
  output logic                  done,
  output logic [M-1:0][WW-1:0]  w,      // w[i]: weight of bit i
  output logic [M-1:0]          b2      // ceil(2^M/r)
);
  typedef enum logic [2:0] {S_IDLE, S_DIV, S_TOP, S_MUL, S_DONE} state_e;

  localparam int unsigned KW = $clog2(Q_FRAC + 1);
  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1;

  state_e              state;
  wmode_e              mode_q;
  logic [RW-1:0]       r_q;
  logic [RW+1:0]       rem;        // divider remainder, always below 2r
  logic [Q_FRAC-1:0]   q;          // 1/r
  logic [KW-1:0]       k;          // divider step counter
  logic [IW-1:0]       i;          // bit whose weight is formed
  logic [WW-1:0]       c;          // 2^M * r^(i-M), i = current bit

  // Reset value: the conversion weights of r = 2, which are 2^i, so that an
  // uncalibrated DAC converts the input code unchanged.
  function automatic logic [M-1:0][WW-1:0] binary_weights();
    logic [M-1:0][WW-1:0] bw;
    for (int unsigned j = 0; j < M; j++) bw[j] = WW'(1) << (W_FRAC + j);
    return bw;
  endfunction

  // Divider step: shift the remainder and subtract r where it fits.
  logic [RW+1:0] rem_sh;
  logic          q_bit;
  assign rem_sh = {rem[RW:0], 1'b0};
  assign q_bit  = (rem_sh >= (RW+2)'(r_q));

  // C(M-1) = 2^M * q, aligned to W_FRAC fractional bits.
  logic [Q_FRAC+M-1:0] c_top_full;
  logic [WW-1:0]       c_top;
  assign c_top_full = {q, {M{1'b0}}} >> (Q_FRAC - W_FRAC);
  assign c_top      = c_top_full[WW-1:0];

  // Next weight down and the conversion weight of the current bit.
  logic [WW+Q_FRAC-1:0] c_times_q;
  logic [WW+RW-1:0]     c_times_rm1;
  logic [RW-1:0]        r_minus_1;
  assign r_minus_1   = r_q - RW'(1 << RF);
  assign c_times_q   = c * q;
  assign c_times_rm1 = c * r_minus_1;

  // ceil of the top calibration weight, saturated to M bits.
  logic [M:0] b2_ceil;
  assign b2_ceil = (M+1)'(c_top >> W_FRAC) + (M+1)'(c_top[W_FRAC-1:0] != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      mode_q <= WMODE_CAL;
      r_q    <= '0;
      rem    <= '0;
      q      <= '0;
      k      <= '0;
      i      <= '0;
      c      <= '0;
      w      <= binary_weights();
      b2     <= M'(1 << (M - 1));
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state  <= S_DIV;
          mode_q <= mode;
          r_q    <= r;
          rem    <= (RW+2)'(1 << RF);   // 1.0
          q      <= '0;
          k      <= '0;
        end
        S_DIV: begin
          rem <= q_bit ? rem_sh - (RW+2)'(r_q) : rem_sh;
          q   <= {q[Q_FRAC-2:0], q_bit};
          if (k == KW'(Q_FRAC - 1)) state <= S_TOP;
          else                       k     <= k + 1'b1;
        end
        S_TOP: begin
          c     <= c_top;
          b2    <= b2_ceil[M] ? {M{1'b1}} : b2_ceil[M-1:0];
          i     <= IW'(M - 1);
          state <= S_MUL;
        end
        S_MUL: begin
          w[i] <= (mode_q == WMODE_CONV) ? c_times_rm1[RF +: WW] : c;
          c    <= c_times_q[Q_FRAC +: WW];
          if (i == '0) state <= S_DONE;
          else         i     <= i - 1'b1;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  initial assert (Q_FRAC >= W_FRAC) else $error("radix_weight_gen: Q_FRAC < W_FRAC");
endmodule
