// tb_rbdc_deviation: the correction should work whatever the clock period,
// as long as it is shorter than T* (radix r < 2).  Four converters with
// T/T* = 0.75, 0.84, 0.92 and 0.99 run side by side on the same stimulus:
// each is calibrated, then plays a full ramp.  For each the test checks the
// radix found (within 0.002 of 2^(T/T*); the search settles where VA = VB,
// slightly above the true radix) and the end-point INL and
// DNL of the corrected ramp (below 1.5 and 1 LSB), after removing the
// leftover of the previous sample.
module tb_rbdc_deviation;
  localparam int unsigned N    = rbdc_pkg::N_BITS_DEF;
  localparam int unsigned M    = rbdc_pkg::M_BITS_DEF;
  localparam int unsigned HOLD = rbdc_pkg::HOLD_DEF;
  localparam int unsigned K    = 4;
  localparam int unsigned LAT  = M + HOLD + M + 1;

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0;
  logic [N-1:0] data_in = '0;
  logic [K-1:0] data_take, sample_valid, cal_busy, calibrated;
  logic [K-1:0][M+1:0] radix;
  real vc[K];
  int checks = 0, failures = 0;

  function automatic real ratio(input int k);
    case (k)
      0:       return 0.75;
      1:       return 0.84;
      2:       return 0.92;
      default: return 0.99;
    endcase
  endfunction

  for (genvar g = 0; g < int'(K); g++) begin : g_dut
    localparam real R = (g == 0) ? 0.75 : (g == 1) ? 0.84 : (g == 2) ? 0.92 : 0.99;
    real vc_g;
    rbdc_redac #(.T_RATIO(R)) dut (
      .clk, .rst_n, .data_in, .data_take(data_take[g]), .sample_valid(sample_valid[g]),
      .vc(vc_g), .cal_start, .radix(radix[g]), .cal_busy(cal_busy[g]),
      .calibrated(calibrated[g]));
    always_comb vc[g] = vc_g;
  end

  always #5 clk = !clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #(20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // All converters share the frame timing, so converter 0's handshake
  // drives the stimulus; the others are checked to agree.
  logic [N-1:0] taken_code[$];
  longint       taken_cycle[$];
  bit           recording = 1'b0;
  real          vstat[K][1 << N];
  real          v_prev[K];
  int           n_rec = 0;

  initial foreach (v_prev[k]) v_prev[k] = 0.0;

  always @(posedge clk) if (rst_n) begin
    if (data_take != '0 && data_take != '1) begin
      failures++;
      $display("FAIL converters out of step");
    end
    if (data_take[0] && recording) begin
      taken_code.push_back(data_in);
      taken_cycle.push_back(cycle);
    end
    if (sample_valid[0]) begin
      if (taken_code.size() > 0 && cycle - taken_cycle[0] == longint'(LAT)) begin
        automatic logic [N-1:0] code = taken_code.pop_front();
        void'(taken_cycle.pop_front());
        for (int k = 0; k < int'(K); k++)
          vstat[k][code] = vc[k] - v_prev[k] / $pow(2.0 ** ratio(k), real'(M));
        n_rec++;
      end
      for (int k = 0; k < int'(K); k++) v_prev[k] = vc[k];
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    cal_start <= 1'b1;
    @(posedge clk) cal_start <= 1'b0;
    @(posedge clk iff calibrated == '1);
    for (int k = 0; k < int'(K); k++) begin
      automatic real rf = real'(radix[k]) / real'(1 << M), rt = 2.0 ** ratio(k);
      $display("T/T* = %f: radix found %f, true %f", ratio(k), rf, rt);
      chk(rf - rt < 0.002 && rt - rf < 0.002,
          $sformatf("radix at T/T* = %f", ratio(k)));
    end
    @(posedge clk iff data_take[0]);
    recording <= 1'b1;
    for (int c = 0; c < (1 << N); c++) begin
      data_in <= N'(c);
      @(posedge clk iff data_take[0]);
    end
    recording <= 1'b0;
    while (taken_code.size() > 0) @(posedge clk);
    chk(n_rec == (1 << N), $sformatf("%0d samples recorded", n_rec));
    for (int k = 0; k < int'(K); k++) begin
      automatic real lsb = (vstat[k][(1 << N) - 1] - vstat[k][0]) / real'((1 << N) - 1);
      automatic real inl_max = 0.0, dnl_max = 0.0;
      for (int c = 0; c < (1 << N); c++) begin
        automatic real inl = (vstat[k][c] - vstat[k][0]) / lsb - real'(c);
        if (inl < 0.0) inl = -inl;
        if (inl > inl_max) inl_max = inl;
        if (c > 0) begin
          automatic real dnl = (vstat[k][c] - vstat[k][c-1]) / lsb - 1.0;
          if (dnl < 0.0) dnl = -dnl;
          if (dnl > dnl_max) dnl_max = dnl;
        end
      end
      $display("T/T* = %f: INL max %f LSB, DNL max %f LSB", ratio(k), inl_max, dnl_max);
      chk(inl_max < 1.5, $sformatf("INL at T/T* = %f", ratio(k)));
      chk(dnl_max < 1.0, $sformatf("DNL at T/T* = %f", ratio(k)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
