// tb_va_vb_comparator: stores random voltages as VA, compares them with
// random VB and checks the registered sign, and that VA is held while
// the input moves.
module tb_va_vb_comparator;
  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0, compare = 1'b0, va_gt_vb;
  real vc = 0.0;
  int checks = 0, failures = 0;

  va_vb_comparator dut (.*);

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      real va, vb;
      va = real'($urandom % 1000) / 1000.0;
      vb = real'($urandom % 1000) / 1000.0;
      vc = va; sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      repeat ($urandom % 4) begin vc = real'($urandom % 1000) / 1000.0; @(negedge clk); end
      vc = vb; compare = 1'b1;
      @(negedge clk);
      compare = 1'b0;
      checks++;
      if (va_gt_vb !== (va > vb)) begin
        failures++;
        $display("FAIL VA %f VB %f got %b", va, vb, va_gt_vb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
