// tb_fpadd_rounder: checks rounding, the exponent adjustment and the
// overflow/underflow flags. The expected result picks the truncated
// significand or its successor by comparing the discarded guard/round/sticky
// fraction with one half, per rounding mode; a successor of 2^24 renormalises.
// Normalised inputs, denormal inputs (exponent 0, norm[26] = 0) and exponents
// near 255 are drawn at random for all four modes.
module tb_fpadd_rounder;
  logic        sign;
  logic [26:0] norm;
  logic [8:0]  exp_norm;
  logic [1:0]  rmode;
  logic [31:0] result;
  logic        overflow, underflow, inexact;
  int          checks = 0, failures = 0;

  fpadd_rounder dut (.sign, .norm, .exp_norm, .rmode, .result, .overflow, .underflow, .inexact);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 40000; i++) begin
      int          k, e;
      logic [24:0] trunc, s25;
      logic [2:0]  low;
      logic        pick_up, eo, eu, ei;
      logic [31:0] er;
      k = $urandom_range(0, 3);
      sign  = 1'($urandom);
      rmode = 2'($urandom);
      norm  = 27'($urandom);
      if ($urandom_range(0, 3) == 0) norm[25:3] = 23'h7FFFFF;   // force rounding carries
      if (k == 0) begin
        norm[26] = 1'b0;  exp_norm = 9'd0;                       // denormal
      end else if (k == 1) begin
        norm[26] = 1'b1;  exp_norm = 9'($urandom_range(253, 255));
      end else begin
        norm[26] = 1'b1;  exp_norm = 9'($urandom_range(1, 254));
      end
      #1;
      trunc = {1'b0, norm[26:3]};
      low   = norm[2:0];
      ei    = (low != 0);
      case (rmode)
        2'd0:    pick_up = (low > 3'd4) || (low == 3'd4 && trunc[0]);
        2'd1:    pick_up = 0;
        2'd2:    pick_up = ei && !sign;
        default: pick_up = ei && sign;
      endcase
      s25 = trunc + 25'(pick_up);
      e   = int'(exp_norm);
      if (s25 == 25'h1000000) begin s25 = 25'h800000; e++; end
      else if (e == 0 && s25[23]) e = 1;
      eo = (e >= 255);
      eu = 0;
      if (eo) begin
        ei = 1;
        if (rmode == 0 || (rmode == 2 && !sign) || (rmode == 3 && sign)) er = {sign, 8'hFF, 23'd0};
        else er = {sign, 8'hFE, 23'h7FFFFF};
      end else begin
        er = {sign, 8'(e), s25[22:0]};
        eu = (e == 0) && (s25[22:0] != 0);
      end
      checks++;
      if (result != er || overflow != eo || underflow != eu || inexact != ei) begin
        failures++;
        if (failures < 10) $display("FAIL s=%0d n=%h e=%0d rm=%0d -> %h exp %h", sign, norm, exp_norm, rmode, result, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
