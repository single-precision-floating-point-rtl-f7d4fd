// tb_fpadd_swap_mux: random check of the swap multiplexer. For random
// operands (a quarter of them denormal) and both values of sign_d it checks
// that the restored 24-bit significands, the effective greater exponent and
// the signs are routed to the right outputs.
module tb_fpadd_swap_mux;
  logic [31:0] a, b;
  logic        sign_d, sign_grt, sign_less;
  logic [23:0] mant_grt, mant_less;
  logic [7:0]  exp_grt;
  int          checks = 0, failures = 0;

  fpadd_swap_mux dut (.a, .b, .sign_d, .mant_grt, .mant_less, .exp_grt, .sign_grt, .sign_less);

  function automatic logic [23:0] sig(logic [31:0] x);
    return {x[30:23] != 0, x[22:0]};
  endfunction
  function automatic logic [7:0] eff(logic [31:0] x);
    return (x[30:23] == 0) ? 8'd1 : x[30:23];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] g, l;
      a = $urandom;  b = $urandom;  sign_d = 1'($urandom);
      if ($urandom_range(0, 3) == 0) a[30:23] = 0;
      if ($urandom_range(0, 3) == 0) b[30:23] = 0;
      #1;
      g = sign_d ? b : a;
      l = sign_d ? a : b;
      checks++;
      if (mant_grt != sig(g) || mant_less != sig(l) || exp_grt != eff(g) ||
          sign_grt != g[31] || sign_less != l[31]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h d=%0d", a, b, sign_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
