// tb_rbdc_core: bit-level test of the digital core.  The testbench collects
// the serial bits the core plays in every frame and
//  1. before calibration checks that each played M-bit code equals the
//     N-bit sample taken M + HOLD + M + 1 cycles earlier, scaled by 2^(M-N)
//     (binary weights, no correction);
//  2. runs a calibration, answering the comparator requests from the played
//     bits with its own model of an RC DAC of radix 2^0.84 (VA and VB computed
//     from the bits), and checks the radix found;
//  3. after calibration checks every played code Dr against the sample D2 it
//     came from: with the radix r found and G = 2^M(r-1)/r^M, the value
//     sum(Dr_i r^i) * G must lie in (D2*2^(M-N) - G, D2*2^(M-N)] (greedy
//     radix-r code), up to a small fixed-point margin.
module tb_rbdc_core;
  localparam int unsigned N = rbdc_pkg::N_BITS_DEF, M = rbdc_pkg::M_BITS_DEF;
  localparam int unsigned HOLD = rbdc_pkg::HOLD_DEF;
  localparam real R_O = 2.0 ** 0.84;
  localparam int unsigned LAT = M + HOLD + M + 1;
  localparam real SCALE = real'(1 << M);

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0;
  logic [N-1:0] data_in = '0;
  logic data_take, dac_bit, dac_enable_n, sample_valid;
  logic comp_sample, comp_compare, va_gt_vb = 1'b0, cal_busy, calibrated;
  logic [M+1:0] radix;
  int checks = 0, failures = 0;

  rbdc_core dut (.*);

  always #5 clk = !clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

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

  // collect played bits
  logic [M-1:0] cur_bits = '0;
  int           nbits = 0;
  logic [N-1:0] taken_code[$];
  longint       taken_cycle[$];
  real          va = 0.0;
  bit           phase_corr = 1'b0;
  int           n_plain = 0, n_corr = 0;

  function automatic real dac_out(input logic [M-1:0] b, input real r);
    real s = 0.0;
    for (int i = 0; i < int'(M); i++) if (b[i]) s += $pow(r, real'(i) - real'(M) + 1.0);
    return (1.0 - 1.0 / r) * s;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (data_take) begin
      taken_code.push_back(data_in);
      taken_cycle.push_back(cycle);
    end
    if (!dac_enable_n) begin
      cur_bits[nbits] <= dac_bit;
      nbits <= nbits + 1;
    end
    if (sample_valid) begin
      nbits <= 0;
      if (comp_sample) va <= dac_out(cur_bits, R_O);
      if (comp_compare) va_gt_vb <= va > dac_out(cur_bits, R_O);
      if (taken_code.size() > 0 && cycle - taken_cycle[0] == longint'(LAT)) begin
        automatic logic [N-1:0] d = taken_code.pop_front();
        void'(taken_cycle.pop_front());
        if (!phase_corr) begin
          chk(cur_bits == {d, {(M - N){1'b0}}},
              $sformatf("plain code %0d played as %0d", d, cur_bits));
          n_plain++;
        end else begin
          automatic real r  = real'(radix) / SCALE;
          automatic real g  = SCALE * (r - 1.0) / $pow(r, real'(M));
          automatic real v  = 0.0;
          automatic real dm = real'(d) * real'(1 << (M - N));
          for (int i = 0; i < int'(M); i++) if (cur_bits[i]) v += $pow(r, real'(i)) * g;
          chk(v <= dm + 0.05 && v > dm - g - 0.05,
              $sformatf("code %0d played as %b (value %f)", d, cur_bits, v));
          n_corr++;
        end
      end
    end
  end

  task automatic play(input logic [N-1:0] code);
    data_in <= code;
    @(posedge clk iff data_take);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 30; k++) play(N'($urandom));
    repeat (3 * (M + HOLD)) @(posedge clk);
    chk(n_plain >= 30, $sformatf("plain samples %0d", n_plain));
    cal_start <= 1'b1;
    @(posedge clk) cal_start <= 1'b0;
    @(posedge clk iff calibrated);
    $display("radix found %f, true %f", real'(radix) / SCALE, R_O);
    chk((real'(radix) / SCALE - R_O) < 0.002 && (R_O - real'(radix) / SCALE) < 0.002,
        "radix close to true radix");
    phase_corr = 1'b1;
    for (int k = 0; k < 300; k++) play(N'($urandom));
    play('1); play('0); play(N'(511)); play(N'(512));
    repeat (3 * (M + HOLD)) @(posedge clk);
    chk(n_corr >= 304, $sformatf("corrected samples %0d", n_corr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
