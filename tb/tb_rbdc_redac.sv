// tb_rbdc_redac: end-to-end test of the radix-corrected relaxation DAC at
// its default size (10-bit samples, 14-bit radix-r codes, 16 cycles per
// sample, clock period 16 % below the ideal one).
//
// 1. Before calibration the DAC works in radix 2.  The test plays a full
//    ramp and checks that the output is far from VDD*code/2^N (the error
//    of the uncorrected DAC is largest at 2^(N-1)-1 / 2^(N-1)).
// 2. It pulses cal_start, checks that no sample is taken while the search
//    runs, that the search ends within a cycle budget, and that the radix
//    found is within a few steps of 2^T_RATIO, the true radix.
// 3. It plays every code of a full ramp plus random codes and checks each
//    output against VDD*code/2^N plus the known leftover of the previous
//    sample (v_prev / r^N).  The greedy radix-r code truncates, so the error
//    may reach one smallest weight G = 2^N(r-1)/r^M (0.23 LSB here) below
//    the ideal, and the radix found is a few 2^-M steps off.  The bound is
//    -(G+1) .. +1 LSB.
// For both ramps it reports INL and DNL (end-point fit, after removing the
// leftover of the previous sample) and checks the corrected INL and DNL.
// It also checks the sample latency (the code taken by data_take appears
// M + HOLD + M + 1 cycles later) and counts how often each mechanism
// happened: calibration steps up and down, skipped samples, uncorrected
// error, corrected conversions.
module tb_rbdc_redac;
  localparam int unsigned N       = rbdc_pkg::N_BITS_DEF;
  localparam int unsigned M       = rbdc_pkg::M_BITS_DEF;
  localparam int unsigned HOLD    = rbdc_pkg::HOLD_DEF;
  localparam real         T_RATIO = 0.84;
  localparam real         VDD     = 0.7;
  localparam real         R_O     = 2.0 ** T_RATIO;
  localparam real         LSB     = VDD / real'(1 << N);
  localparam int unsigned LAT     = M + HOLD + M + 1;
  localparam real         SCALE   = real'(1 << M);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] data_in = '0;
  logic data_take, sample_valid, cal_start = 1'b0, cal_busy, calibrated;
  logic [M+1:0] radix;
  real vc;

  int checks = 0, failures = 0;
  int n_step_down = 0, n_step_up = 0, n_skipped = 0, n_uncorr = 0, n_corr = 0;
  longint cycle = 0;

  rbdc_redac dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    #(50_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Queue of codes taken, with the cycle they were taken in.
  logic [N-1:0] taken_code[$];
  longint       taken_cycle[$];
  real          v_prev = 0.0;
  real          max_err_corr = 0.0;
  bit           corrected_phase = 1'b0;
  bit           uncorr_phase = 1'b0;
  logic         cmp_d = 1'b0;
  real          max_err_uncorr = 0.0;
  real          vstat[2][1 << N];   // static output per code: 0 plain, 1 corrected
  bit           ramp_phase = 1'b0;

  // INL / DNL with an end-point fit, in LSB.
  task automatic linearity(input int ph, output real inl_max, output real dnl_max);
    real lsb_fit = (vstat[ph][(1 << N) - 1] - vstat[ph][0]) / real'((1 << N) - 1);
    inl_max = 0.0; dnl_max = 0.0;
    for (int k = 0; k < (1 << N); k++) begin
      real inl = (vstat[ph][k] - vstat[ph][0]) / lsb_fit - real'(k);
      if (inl < 0.0) inl = -inl;
      if (inl > inl_max) inl_max = inl;
      if (k > 0) begin
        real dnl = (vstat[ph][k] - vstat[ph][k-1]) / lsb_fit - 1.0;
        if (dnl < 0.0) dnl = -dnl;
        if (dnl > dnl_max) dnl_max = dnl;
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (data_take) begin
      taken_code.push_back(data_in);
      taken_cycle.push_back(cycle);
    end
    if (cal_busy && dut.u_core.load_shift_n) n_skipped++;
    cmp_d <= dut.u_core.comp_compare;
    if (cmp_d) begin
      if (dut.u_core.va_gt_vb) n_step_down++; else n_step_up++;
    end
  end

  // Check every played sample at the cycle its voltage is complete.
  always @(posedge clk) if (rst_n && sample_valid) begin
    if (taken_code.size() > 0 && (cycle - taken_cycle[0]) == longint'(LAT)) begin
      automatic logic [N-1:0] code = taken_code.pop_front();
      automatic longint       tk   = taken_cycle.pop_front();  // latency already checked
      automatic real ideal = VDD * real'(code) / real'(1 << N) + v_prev / (R_O ** M);
      automatic real err   = (vc - ideal) / LSB;
      automatic real g     = real'(1 << N) * (R_O - 1.0) / (R_O ** M);
      if (ramp_phase) vstat[corrected_phase ? 1 : 0][code] = vc - v_prev / (R_O ** M);
      if (corrected_phase) begin
        check(err <= 1.0 && err >= -(g + 1.0),
              $sformatf("corrected code %0d: error %f LSB", code, err));
        if (-err > max_err_corr) max_err_corr = -err;
        if (err > max_err_corr)  max_err_corr = err;
        n_corr++;
      end else if (uncorr_phase) begin
        if (err < 0.0) err = -err;
        if (err > max_err_uncorr) max_err_uncorr = err;
        n_uncorr++;
      end
    end
    v_prev = vc;
  end

  task automatic play(input logic [N-1:0] code);
    data_in <= code;
    @(posedge clk iff data_take);
  endtask

  task automatic drain();
    repeat (2 * (M + HOLD) + 4) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // 1. uncorrected DAC: full ramp
    uncorr_phase = 1'b1;
    ramp_phase = 1'b1;
    for (int k = 0; k < (1 << N); k++) play(N'(k));
    drain();
    ramp_phase = 1'b0;
    uncorr_phase = 1'b0;
    check(n_uncorr == (1 << N), $sformatf("uncorrected samples seen %0d", n_uncorr));
    check(max_err_uncorr > 20.0,
          $sformatf("uncorrected error only %f LSB", max_err_uncorr));
    begin
      real inl, dnl;
      linearity(0, inl, dnl);
      $display("uncorrected: max |error| %f LSB, INL max %f LSB, DNL max %f LSB",
               max_err_uncorr, inl, dnl);
      check(inl > 20.0, "uncorrected INL large");
    end

    // 2. calibration
    begin
      longint t0;
      @(posedge clk);
      cal_start <= 1'b1;
      @(posedge clk);
      cal_start <= 1'b0;
      t0 = cycle;
      @(posedge clk iff calibrated);
      $display("calibration took %0d cycles, radix %f (true %f)",
               cycle - t0, real'(radix) / SCALE, R_O);
      check((cycle - t0) < 20 * (M + 1) * (M + HOLD),
            "calibration cycle budget");
      check(!cal_busy, "cal_busy low after calibration");
      check((real'(radix) / SCALE - R_O) < 8.0 / SCALE &&
            (R_O - real'(radix) / SCALE) < 8.0 / SCALE,
            "radix found close to the true radix");
      check(taken_code.size() == 0, "no sample taken during calibration");
    end

    // 3. corrected DAC: full ramp, then random codes
    corrected_phase = 1'b1;
    ramp_phase = 1'b1;
    for (int k = 0; k < (1 << N); k++) play(N'(k));
    drain();
    ramp_phase = 1'b0;
    for (int k = 0; k < 200; k++) play(N'($urandom));
    drain();
    corrected_phase = 1'b0;
    begin
      real inl, dnl;
      linearity(1, inl, dnl);
      $display("corrected: INL max %f LSB, DNL max %f LSB", inl, dnl);
      check(inl < 1.5, "corrected INL below 1.5 LSB");
      check(dnl < 1.0, "corrected DNL below 1 LSB");
    end
    $display("corrected max |error|: %f LSB over %0d samples", max_err_corr, n_corr);

    // mechanisms
    check(n_step_down > 0, "search never stepped the radix down");
    check(n_step_up > 0, "search never stepped the radix up");
    check(n_skipped > 0, "no frame skipped during calibration");
    check(n_corr >= (1 << N) + 200, $sformatf("corrected samples seen %0d", n_corr));
    $display("steps down %0d, up %0d, frames skipped %0d, uncorrected %0d, corrected %0d",
             n_step_down, n_step_up, n_skipped, n_uncorr, n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
