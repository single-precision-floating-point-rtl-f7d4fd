// tb_fpadd_align_shifter: checks the aligning right shifter for every shift
// amount 0..255 with random significands: the upper 26 bits must equal the
// significand (with 3 zero bits appended) shifted right, and the sticky bit
// must be the OR of everything at or below the sticky position.
module tb_fpadd_align_shifter;
  logic [23:0] mant;
  logic [7:0]  shift_amt;
  logic [26:0] shifted;
  int          checks = 0, failures = 0;

  fpadd_align_shifter dut (.mant, .shift_amt, .shifted);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int sh = 0; sh < 256; sh++)
      for (int k = 0; k < 60; k++) begin
        logic [63:0] wide, expv;
        mant = 24'($urandom);
        if (k < 24) mant = 24'd1 << k;           // single bits at every position
        shift_amt = 8'(sh);
        #1;
        // Truncated shift plus the OR of every bit that fell off the end.
        wide = {37'd0, mant, 3'b000};
        if (sh >= 27) begin
          expv = {63'd0, mant != 0};
        end else begin
          expv = wide >> sh;
          expv[0] = expv[0] | ((wide & ((64'd1 << sh) - 64'd1)) != 0);
        end
        checks++;
        if ({37'd0, shifted} != expv) begin
          failures++;
          if (failures < 10) $display("FAIL %h >> %0d = %h exp %h", mant, sh, shifted, expv[26:0]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
