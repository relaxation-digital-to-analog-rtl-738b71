// tb_redac_shift_reg: loads random codes into the ReDAC shift register and
// checks that the serial output gives b0, b1, ..., b(N-1) on consecutive
// cycles after the load, one bit per clock.
module tb_redac_shift_reg;
  localparam int unsigned N = rbdc_pkg::M_BITS_DEF;
  logic clk = 1'b0, rst_n = 1'b0, load_shift_n = 1'b0, bit_out;
  logic [N-1:0] din = '0;
  int checks = 0, failures = 0;

  redac_shift_reg dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    checks++; if (bit_out !== 1'b0) failures++;
    for (int t = 0; t < 50; t++) begin
      logic [N-1:0] code;
      code = N'($urandom);
      @(negedge clk);
      din = code; load_shift_n = 1'b1;
      @(negedge clk);
      load_shift_n = 1'b0;
      din = ~code;                       // must not matter while shifting
      for (int b = 0; b < N; b++) begin
        checks++;
        if (bit_out !== code[b]) begin
          failures++;
          $display("FAIL code %h bit %0d: got %b", code, b, bit_out);
        end
        @(negedge clk);
      end
      checks++; if (bit_out !== 1'b0) failures++;   // emptied
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
