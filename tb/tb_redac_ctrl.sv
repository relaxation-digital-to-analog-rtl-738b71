// tb_redac_ctrl: checks the frame of the ReDAC control unit: LOAD/SHIFT
// high once every N + HOLD cycles, ENABLE low for exactly the N cycles that
// follow it, and sample_valid in the first cycle after them.
module tb_redac_ctrl;
  localparam int unsigned N = rbdc_pkg::M_BITS_DEF, HOLD = rbdc_pkg::HOLD_DEF, FRAME = N + HOLD;
  logic clk = 1'b0, rst_n = 1'b0, load_shift_n, enable_n, sample_valid;
  int checks = 0, failures = 0;

  redac_ctrl dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sig(input logic got, input logic exp, input string what, input int c);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %b", what, c, got);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // First cycle after reset is the load cycle.
    for (int c = 0; c < 20 * FRAME; c++) begin
      int pos;
      pos = c % FRAME;                   // 0: load cycle, 1..N: driving
      expect_sig(load_shift_n, pos == 0, "load_shift_n", c);
      expect_sig(enable_n, !(pos >= 1 && pos <= N), "enable_n", c);
      expect_sig(sample_valid, pos == ((N + 1) % FRAME), "sample_valid", c);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
