// radix_cal_ctrl: foreground self-calibration that finds the radix r at
// which the relaxation DAC is linear, by a binary (dichotomic) search.
//
// The published calibration loop: start from r = 2 and iter = 1.  In each
// iteration take the codes A2 = ceil(2^M/r - 1) and B2 = ceil(2^M/r), convert
// both to radix r (calibration weights), play both on the DAC and compare
// the two analog outputs VA and VB.  Then step r by 2^-iter and repeat while
// iter < M, so M iterations in all.  For r above the true radix the DAC's
// error is positive at A2 and negative at B2, so VA > VB; the search
// therefore lowers r when VA > VB and raises it otherwise, which is the
// direction in which it converges.  After the last iteration the weights are
// recomputed in conversion mode and calibrated goes high.
//
// Range: the search finds any true radix below 2 (clock period below
// T* = RC ln 2).  For a true radix of 2 or more it fails: above r = 2 the
// radix-r code of A2 saturates, VA > VB no longer depends on r, and r runs
// up towards the top of its range.
//
// How it works: one frame of the DAC converts a code, the next frame plays
// it.  The controller presents A2 on cal_code before a frame boundary, B2
// before the next, tells the comparator to store VA at the end of the frame
// that plays A2 (comp_sample) and to compare VB with it at the end of the
// frame that plays B2 (comp_compare), and reads va_gt_vb one cycle later.
// The frame sequencing and the handshakes are this design's own choices.
//
// Interface: cal_start (a pulse) starts a calibration at any time; cal_busy
// is high until it ends.  frame_load is the DAC's LOAD strobe (last cycle of a
// frame), sample_valid marks the cycle in which the capacitor voltage of the
// frame is final.
// Timing: per iteration one weight computation plus three to four frames.
module radix_cal_ctrl
  import rbdc_pkg::*;
#(
  parameter int unsigned M  = M_BITS_DEF,   // bits of a code, = iterations
  parameter int unsigned RF = M_BITS_DEF,   // fractional bits of r
  localparam int unsigned RW = RF + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cal_start,
  // weight generator
  output logic          wgen_start,
  output wmode_e        wgen_mode,
  input  logic          wgen_done,
  input  logic [M-1:0]  b2,            // ceil(2^M/r) for the current r
  output logic [RW-1:0] r,             // current radix estimate
  // DAC frame timing and code
  input  logic          frame_load,
  input  logic          sample_valid,
  output logic [M-1:0]  cal_code,
  // comparator
  output logic          comp_sample,   // store VA
  output logic          comp_compare,  // compare VB with the stored VA
  input  logic          va_gt_vb,
  // status
  output logic          cal_busy,
  output logic          calibrated
);
  typedef enum logic [3:0] {
    S_IDLE, S_GEN, S_GEN_WAIT, S_WAIT_A, S_CONV_A, S_PLAY_A,
    S_WAIT_B, S_PLAY_B, S_DECIDE, S_FINAL, S_FINAL_WAIT
  } state_e;

  localparam int unsigned IW = $clog2(M + 1);

  state_e        state;
  logic [IW-1:0] iter;
  logic [RW-1:0] step;      // 2^-iter

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      iter       <= '0;
      step       <= '0;
      r          <= RW'(2 << RF);
      calibrated <= 1'b0;
    end else if (cal_start) begin
      state      <= S_GEN;
      iter       <= IW'(1);
      step       <= RW'(1 << (RF - 1));
      r          <= RW'(2 << RF);
      calibrated <= 1'b0;
    end else begin
      case (state)
        S_IDLE:       ;
        S_GEN:        state <= S_GEN_WAIT;
        S_GEN_WAIT:   if (wgen_done) state <= S_WAIT_A;
        S_WAIT_A:     if (frame_load) state <= S_CONV_A;   // A2 taken
        S_CONV_A:     if (frame_load) state <= S_PLAY_A;   // B2 taken
        S_PLAY_A:     if (sample_valid) state <= S_WAIT_B; // VA stored
        S_WAIT_B:     if (frame_load) state <= S_PLAY_B;
        S_PLAY_B:     if (sample_valid) state <= S_DECIDE; // VB compared
        S_DECIDE: begin
          r    <= va_gt_vb ? r - step : r + step;
          step <= step >> 1;
          if (iter == IW'(M)) begin
            state <= S_FINAL;
          end else begin
            iter  <= iter + 1'b1;
            state <= S_GEN;
          end
        end
        S_FINAL:      state <= S_FINAL_WAIT;
        S_FINAL_WAIT: if (wgen_done) begin
          state      <= S_IDLE;
          calibrated <= 1'b1;
        end
        default:      state <= S_IDLE;
      endcase
    end
  end

  assign wgen_start   = (state == S_GEN) || (state == S_FINAL);
  assign wgen_mode    = (state == S_FINAL) ? WMODE_CONV : WMODE_CAL;
  assign cal_code     = (state == S_WAIT_A) ? b2 - 1'b1 : b2;
  assign comp_sample  = (state == S_PLAY_A) && sample_valid;
  assign comp_compare = (state == S_PLAY_B) && sample_valid;
  assign cal_busy     = (state != S_IDLE);

  initial assert (RF >= M) else $error("radix_cal_ctrl: RF must be at least M");
endmodule
