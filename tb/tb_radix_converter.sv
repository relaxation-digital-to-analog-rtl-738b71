// tb_radix_converter: feeds the serial radix converter random radix-2 codes
// with weights for radices 2, 1.79 and random ones, and compares the result
// with a greedy conversion done in the testbench on the same fixed-point
// weights (bit i set when the remaining value is at least w[i]).  For r = 2
// the result must equal the input.  Also checks the time to done, that dr
// does not change dr_prev done, and that a restart while busy is honoured.
module tb_radix_converter;
  localparam int unsigned N = 10, W_FRAC = 16, WW = N + W_FRAC;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [N-1:0] d2 = '0, dr;
  logic [N-1:0][WW-1:0] w;
  int checks = 0, failures = 0;

  radix_converter #(.M(N), .W_FRAC(W_FRAC)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic set_weights(input real r);
    for (int i = 0; i < int'(N); i++)
      w[i] = WW'(longint'(real'(1 << N) * (r - 1.0) * $pow(r, real'(i) - real'(N))
                          * real'(1 << W_FRAC)));
  endtask

  function automatic logic [N-1:0] greedy(input logic [N-1:0] d);
    longint rem = longint'(d) << W_FRAC;
    logic [N-1:0] res = '0;
    for (int i = int'(N) - 1; i >= 0; i--)
      if (rem >= longint'(w[i])) begin res[i] = 1'b1; rem -= longint'(w[i]); end
    return res;
  endfunction

  task automatic convert(input logic [N-1:0] d, input bit exact);
    logic [N-1:0] dr_prev;
    int cyc;
    @(negedge clk);
    d2 = d; start = 1'b1; dr_prev = dr;
    @(negedge clk);
    start = 1'b0; d2 = ~d;   // input is latched at start
    cyc = 1;
    while (!done) begin
      chk(dr == dr_prev, "dr stable while converting");
      @(negedge clk); cyc++;
    end
    chk(cyc == int'(N) + 1, $sformatf("done after %0d cycles", cyc));
    chk(dr == greedy(d), $sformatf("code %0d got %b exp %b", d, dr, greedy(d)));
    if (exact) chk(dr == d, $sformatf("r=2 code %0d unchanged", d));
  endtask

  initial begin
    set_weights(2.0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) convert(N'($urandom), 1'b1);
    convert('1, 1'b1);
    convert('0, 1'b1);
    set_weights(2.0 ** 0.84);
    for (int t = 0; t < 200; t++) convert(N'($urandom), 1'b0);
    convert('1, 1'b0);
    convert(N'(512), 1'b0);
    for (int k = 0; k < 10; k++) begin
      set_weights(1.0 + real'(1 + ($urandom % 1000)) / 1000.0);
      for (int t = 0; t < 20; t++) convert(N'($urandom), 1'b0);
    end
    // restart while busy: the second start wins
    set_weights(2.0);
    @(negedge clk); d2 = 10'd100; start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (3) @(negedge clk);
    convert(10'd777, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
