// tb_fpadd_effective_op: checks the effective-operation decision for all
// four sign combinations (unlike signs mean subtraction) and the extension of
// the greater significand to the 28-bit adder format.
module tb_fpadd_effective_op;
  logic        sign_grt, sign_less, eff_sub;
  logic [23:0] mant_grt;
  logic [27:0] frac_grt;
  int          checks = 0, failures = 0;

  fpadd_effective_op dut (.sign_grt, .sign_less, .mant_grt, .eff_sub, .frac_grt);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      {sign_grt, sign_less} = 2'(i);
      mant_grt = 24'($urandom);
      #1;
      checks++;
      if (eff_sub != (sign_grt != sign_less) || frac_grt != 28'(mant_grt) * 8) begin
        failures++;
        if (failures < 10) $display("FAIL %0d %0d %h -> %0d %h", sign_grt, sign_less, mant_grt, eff_sub, frac_grt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
