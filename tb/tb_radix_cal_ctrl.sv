// tb_radix_cal_ctrl: runs the radix calibration controller against models
// of its surroundings: a frame timer like the DAC control unit, a weight
// generator that answers after a few cycles with b2 = ceil(2^N/r), and an
// ideal comparator that reports VA > VB exactly when the radix under test
// is above a chosen true radix.  For true radices below and above 2 it
// checks: the codes taken at frame loads are A2 = b2-1 then B2 = b2; VA is
// stored while A2 plays and VB compared while B2 plays; there are exactly N
// comparisons; the last weight request is for conversion weights with the
// final radix; and the final radix is within 2^-N of the true one.
module tb_radix_cal_ctrl;
  import rbdc_pkg::*;
  localparam int unsigned N = 10, RF = 10, RW = RF + 2, HOLD = 2, FRAME = N + HOLD;

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0;
  logic wgen_start, wgen_done = 1'b0, frame_load, sample_valid;
  wmode_e wgen_mode;
  logic [N-1:0] b2 = N'(1 << (N - 1)), cal_code;
  logic [RW-1:0] r;
  logic comp_sample, comp_compare, va_gt_vb = 1'b0, cal_busy, calibrated;
  int checks = 0, failures = 0;

  radix_cal_ctrl #(.M(N), .RF(RF)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // frame timer
  int unsigned fcnt = 0;
  always @(posedge clk) fcnt <= (fcnt == FRAME - 1) ? 0 : fcnt + 1;
  assign frame_load   = (fcnt == FRAME - 1);
  assign sample_valid = (fcnt == N);

  // weight generator model
  int    wdelay = -1;
  wmode_e last_mode = WMODE_CAL;
  logic [RW-1:0] last_r = '0;
  always @(posedge clk) begin
    wgen_done <= 1'b0;
    if (wgen_start) begin
      wdelay    <= 7;
      last_mode <= wgen_mode;
      last_r    <= r;
    end else if (wdelay > 0) begin
      wdelay <= wdelay - 1;
    end else if (wdelay == 0) begin
      wdelay    <= -1;
      wgen_done <= 1'b1;
      b2 <= N'(int'($ceil(real'(1 << N) / (real'(last_r) / real'(1 << RF)))));
    end
  end

  // comparator model and protocol checks
  real r_true;
  logic [N-1:0] taken[$];
  int n_cmp = 0;
  bit armed = 1'b0;        // VA stored and not yet compared
  always @(posedge clk) if (rst_n) begin
    if (frame_load && cal_busy) taken.push_back(cal_code);
    if (comp_sample) begin
      chk(taken.size() >= 2 && taken[taken.size()-2] == b2 - 1'b1 && taken[taken.size()-1] == b2,
          "A2 then B2 converted before VA is stored");
      armed <= 1'b1;
    end
    if (comp_compare) begin
      chk(armed, "VB compared after VA stored");
      chk(taken.size() >= 2 && taken[taken.size()-2] == b2,
          "B2 playing when VB is compared");
      va_gt_vb <= (real'(r) / real'(1 << RF)) > r_true;
      armed <= 1'b0;
      n_cmp++;
    end
  end

  task automatic calibrate(input real rt);
    r_true = rt; n_cmp = 0; taken.delete();
    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    chk(cal_busy && !calibrated, "busy after start");
    while (!calibrated) @(negedge clk);
    @(negedge clk);
    chk(!cal_busy, "idle after calibration");
    chk(n_cmp == int'(N), $sformatf("%0d comparisons", n_cmp));
    chk(last_mode == WMODE_CONV && last_r == r, "final conversion weights for the final radix");
    chk((real'(r) / 1024.0 - rt) <= 1.0 / 1024.0 && (rt - real'(r) / 1024.0) <= 1.0 / 1024.0,
        $sformatf("true %f found %f", rt, real'(r) / 1024.0));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(r == RW'(2 << RF) && !calibrated && !cal_busy, "reset state");
    calibrate(2.0 ** 0.84);
    calibrate(2.0 ** 1.16);
    calibrate(1.3);
    calibrate(2.0);
    for (int t = 0; t < 6; t++) calibrate(1.01 + real'($urandom % 1980) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
