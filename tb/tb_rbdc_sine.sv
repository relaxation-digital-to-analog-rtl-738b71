// tb_rbdc_sine: dynamic test of the radix-corrected relaxation DAC at its
// default size.  It plays a full-swing sine of 10 periods in 1024 samples
// (about 1 % of the sample rate), once before and once after calibration,
// and from the 1024 capacitor voltages computes the SNDR: the power in the
// sine's DFT bin against everything else except DC.  ENOB =
// (SNDR - 1.76)/6.02.  The uncorrected DAC must stay below 6 effective bits
// and the corrected one must reach at least 9.
module tb_rbdc_sine;
  localparam int unsigned N    = rbdc_pkg::N_BITS_DEF;
  localparam int unsigned M    = rbdc_pkg::M_BITS_DEF;
  localparam int unsigned HOLD = rbdc_pkg::HOLD_DEF;
  localparam int          L    = 1024;     // samples per record
  localparam int          J    = 10;       // sine periods per record
  localparam int unsigned LAT  = M + HOLD + M + 1;
  localparam real         PI   = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0;
  logic [N-1:0] data_in = '0;
  logic data_take, sample_valid, cal_busy, calibrated;
  logic [M+1:0] radix;
  real vc;
  int checks = 0, failures = 0;

  rbdc_redac dut (.*);

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

  // Record: the capacitor voltage of every sample taken while recording.
  real    rec[L];
  int     n_rec = 0, n_taken = 0;
  bit     recording = 1'b0;
  longint taken_cycle[$];
  always @(posedge clk) if (rst_n) begin
    if (data_take && recording && n_taken < L) begin
      taken_cycle.push_back(cycle);
      n_taken++;
    end
    if (sample_valid && taken_cycle.size() > 0 && cycle - taken_cycle[0] == longint'(LAT)) begin
      void'(taken_cycle.pop_front());
      if (n_rec < L) rec[n_rec] = vc;
      n_rec++;
    end
  end

  function automatic logic [N-1:0] sine_code(input int n);
    real full = real'((1 << N) - 1);
    return N'(int'($floor(full / 2.0 + full / 2.0 * $sin(2.0 * PI * real'(J * n) / real'(L)) + 0.5)));
  endfunction

  function automatic real sndr_db();
    real mean = 0.0, tot = 0.0, re = 0.0, im = 0.0, psig;
    for (int n = 0; n < L; n++) mean += rec[n];
    mean /= real'(L);
    for (int n = 0; n < L; n++) begin
      tot += (rec[n] - mean) ** 2;
      re  += rec[n] * $cos(2.0 * PI * real'(J * n) / real'(L));
      im  += rec[n] * $sin(2.0 * PI * real'(J * n) / real'(L));
    end
    tot /= real'(L);
    psig = 2.0 * (re * re + im * im) / (real'(L) * real'(L));
    return 10.0 * $log10(psig / (tot - psig));
  endfunction

  task automatic record();
    n_rec = 0;
    n_taken = 0;
    taken_cycle.delete();
    recording = 1'b1;
    for (int n = 0; n < L; n++) begin
      data_in <= sine_code(n);
      @(posedge clk iff data_take);
    end
    while (n_rec < L) @(posedge clk);
    recording = 1'b0;
    chk(n_rec == L, "whole record captured");
  endtask

  initial begin
    real s0, s1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2 * (M + HOLD)) @(posedge clk);
    record();
    s0 = sndr_db();
    $display("without correction: SNDR %f dB, ENOB %f", s0, (s0 - 1.76) / 6.02);
    chk((s0 - 1.76) / 6.02 < 6.0, "uncorrected ENOB below 6");
    @(posedge clk) cal_start <= 1'b1;
    @(posedge clk) cal_start <= 1'b0;
    @(posedge clk iff calibrated);
    repeat (2 * (M + HOLD)) @(posedge clk);
    record();
    s1 = sndr_db();
    $display("with correction:    SNDR %f dB, ENOB %f", s1, (s1 - 1.76) / 6.02);
    chk((s1 - 1.76) / 6.02 >= 9.0, "corrected ENOB at least 9");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
