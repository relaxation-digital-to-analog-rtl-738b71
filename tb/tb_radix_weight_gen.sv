// tb_radix_weight_gen: checks the radix-correction weights against values
// computed in floating point:
//   conversion  w[i] = 2^N (r-1) r^(i-N)
//   calibration w[i] = 2^N r^(i-N)
// and b2 = ceil(2^N/r), for radices on both sides of 2 and at the ends of
// the search range.  Also checks the reset weights (2^i) and the time from
// start to done (Q_FRAC + N + 2 cycles).  Tolerance: 0.002 + 2e-5 relative,
// in units of one input LSB.
module tb_radix_weight_gen;
  import rbdc_pkg::*;
  localparam int unsigned N = 10, RF = 10, W_FRAC = 16, Q_FRAC = 20;
  localparam int unsigned WW = N + W_FRAC, RW = RF + 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  wmode_e mode = WMODE_CAL;
  logic [RW-1:0] r = '0;
  logic [N-1:0][WW-1:0] w;
  logic [N-1:0] b2;
  int checks = 0, failures = 0;

  radix_weight_gen #(.M(N), .RF(RF), .W_FRAC(W_FRAC), .Q_FRAC(Q_FRAC)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int unsigned r_fix, input wmode_e m);
    real rr, exp_w, got_w, top;
    int cyc;
    @(negedge clk);
    r = RW'(r_fix); mode = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0; r = '0;          // inputs are latched at start
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == int'(Q_FRAC + N + 2), $sformatf("latency %0d", cyc));
    rr = real'(r_fix) / real'(1 << RF);
    for (int i = 0; i < int'(N); i++) begin
      exp_w = real'(1 << N) * $pow(rr, real'(i) - real'(N));
      if (m == WMODE_CONV) exp_w *= (rr - 1.0);
      got_w = real'(w[i]) / real'(1 << W_FRAC);
      chk((got_w - exp_w) < 2e-3 + 2e-5 * exp_w && (exp_w - got_w) < 2e-3 + 2e-5 * exp_w,
          $sformatf("r=%f mode %0d w[%0d] got %f exp %f", rr, m, i, got_w, exp_w));
    end
    top = real'(1 << N) / rr;
    if (top - $floor(top) > 1e-3 || top == $floor(top))
      chk(int'(b2) == ((int'($ceil(top)) > int'((1 << N) - 1)) ? int'((1 << N) - 1) : int'($ceil(top))),
          $sformatf("r=%f b2 got %0d exp %f", rr, b2, top));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(N); i++)
      chk(w[i] == WW'(1) << (W_FRAC + i), $sformatf("reset w[%0d]", i));
    chk(b2 == N'(1 << (N - 1)), "reset b2");
    run(2 << RF, WMODE_CONV);
    for (int i = 0; i < int'(N); i++)
      chk(w[i] == WW'(1) << (W_FRAC + i), $sformatf("r=2 conversion weight %0d exact", i));
    run(2 << RF, WMODE_CAL);
    run(1833, WMODE_CONV);   // ~1.79
    run(1833, WMODE_CAL);
    run(1025, WMODE_CAL);    // 1 + 2^-10
    run(1025, WMODE_CONV);
    run(4095, WMODE_CONV);   // just below 4
    run(2304, WMODE_CAL);    // 2.25
    run(1536, WMODE_CONV);   // 1.5
    for (int t = 0; t < 20; t++) run(1025 + ($urandom % 2046), ($urandom % 2) ? WMODE_CONV : WMODE_CAL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
