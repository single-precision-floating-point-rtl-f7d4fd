// tb_fpadd_normalizer: property check of the normaliser on random adder
// magnitudes (carry cases, every leading-one position, zero) and random
// exponents, small exponents included. For a carry the result must be the
// magnitude shifted right by one with the lost bit in the sticky position and
// the exponent incremented. Otherwise the value must be preserved
// (norm = mag * 2^(exp_grt - e), e the effective result exponent) and the
// result must be normalised (norm[26] = 1) unless e has reached 1, in which
// case the exponent field is 0 (denormal).
module tb_fpadd_normalizer;
  logic [27:0] mag;
  logic [7:0]  exp_grt;
  logic [26:0] norm;
  logic [8:0]  exp_norm;
  logic        is_zero;
  int          checks = 0, failures = 0, n_carry = 0, n_denorm = 0, n_left = 0;

  fpadd_normalizer dut (.mag, .exp_grt, .norm, .exp_norm, .is_zero);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 30000; i++) begin
      int  pos, e, d;
      logic ok;
      pos = $urandom_range(0, 28) - 1;        // -1: zero magnitude
      mag = (pos < 0) ? 28'd0 : ((28'd1 << pos) | (28'($urandom) & ((28'd1 << pos) - 28'd1)));
      exp_grt = ($urandom_range(0, 1) == 1) ? 8'($urandom_range(1, 30)) : 8'($urandom_range(1, 254));
      #1;
      ok = 1;
      if (mag == 0) begin
        ok = is_zero;
      end else if (mag[27]) begin
        n_carry++;
        ok = !is_zero && norm == {mag[27:2], mag[1] | mag[0]} && exp_norm == 9'(exp_grt) + 9'd1;
      end else begin
        e = (exp_norm == 0) ? 1 : int'(exp_norm);
        d = int'(exp_grt) - e;
        if (d < 0 || d > 27) ok = 0;
        else begin
          ok = !is_zero && (28'(norm) == (mag << d));
          if (norm[26]) ok = ok && exp_norm != 0;
          else begin
            ok = ok && exp_norm == 0 && e == 1;
            n_denorm++;
          end
          if (d > 0) n_left++;
        end
      end
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL mag=%h e=%0d -> %h %0d %0d", mag, exp_grt, norm, exp_norm, is_zero);
      end
    end
    checks++;
    if (n_carry == 0 || n_denorm == 0 || n_left == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
