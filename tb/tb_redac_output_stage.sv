// tb_redac_output_stage: plays codes into the buffer/RC model and checks the
// capacitor voltage against the closed-form relaxation-DAC output
//   v = VDD*(1 - 1/r) * sum_i b_i r^(i-N+1) + v_start * r^-N,  r = 2^(T/T*),
// and that the voltage holds while the buffer is disabled.  Run at T = T*
// (binary) and at T = 0.84 T*.
module tb_redac_output_stage;
  localparam int unsigned N = 10;
  localparam real VDD = 0.7;
  logic clk = 1'b0, bit_in = 1'b0, enable_n = 1'b1;
  real vc_a, vc_b;
  int checks = 0, failures = 0;

  redac_output_stage #(.VDD(VDD), .T_RATIO(1.0))  dut_a (.clk, .bit_in, .enable_n, .vc(vc_a));
  redac_output_stage #(.VDD(VDD), .T_RATIO(0.84)) dut_b (.clk, .bit_in, .enable_n, .vc(vc_b));

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected(input logic [N-1:0] code, input real r, input real v0);
    real s = 0.0;
    for (int i = 0; i < N; i++) if (code[i]) s += $pow(r, real'(i) - real'(N) + 1.0);
    return VDD * (1.0 - 1.0 / r) * s + v0 / $pow(r, real'(N));
  endfunction

  task automatic chk(input real got, input real exp, input string what);
    checks++;
    if (got - exp > 1e-9 || exp - got > 1e-9) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      logic [N-1:0] code;
      real va0, vb0;
      code = (t == 0) ? 10'd13 : N'($urandom);
      va0 = vc_a; vb0 = vc_b;
      for (int b = 0; b < N; b++) begin
        bit_in = code[b]; enable_n = 1'b0;
        @(negedge clk);
      end
      enable_n = 1'b1; bit_in = $urandom;     // floating buffer: ignored
      chk(vc_a, expected(code, 2.0, va0), $sformatf("binary code %0d", code));
      chk(vc_b, expected(code, 2.0 ** 0.84, vb0), $sformatf("radix 1.79 code %0d", code));
      if (t == 0 && va0 == 0.0)
        chk(vc_a, VDD * 13.0 / 1024.0, "13/1024 of VDD");
      repeat (3) @(negedge clk);
      chk(vc_a, expected(code, 2.0, va0), "hold while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
