// tb_fpadd_exp_diff: exhaustive check of the exponent-difference stage over
// all 65536 pairs of exponent fields: shift_amt must be the absolute
// difference of the effective exponents (field 0 counts as 1) and sign_d must
// flag Exp_a < Exp_b.
module tb_fpadd_exp_diff;
  logic [7:0] exp_a, exp_b, shift_amt;
  logic       sign_d;
  int         checks = 0, failures = 0;

  fpadd_exp_diff dut (.exp_a, .exp_b, .shift_amt, .sign_d);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int ea, eb, d;
        exp_a = 8'(i);  exp_b = 8'(j);
        #1;
        ea = (i == 0) ? 1 : i;
        eb = (j == 0) ? 1 : j;
        d  = (ea > eb) ? ea - eb : eb - ea;
        checks++;
        if (shift_amt != 8'(d) || sign_d != (ea < eb)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d %0d -> %0d %0d", i, j, shift_amt, sign_d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
