// tb_fpadd_twos_adder: checks the two's complement adder with integer
// arithmetic. For an addition (cin 0) the magnitude is x + y. For a
// subtraction the testbench supplies the inverted subtrahend with cin 1, as
// the inverter does, and expects |x - y| with neg set when y > x.
module tb_fpadd_twos_adder;
  logic [27:0] frac_a, frac_b, mag;
  logic        cin, neg;
  int          checks = 0, failures = 0, negs = 0;

  fpadd_twos_adder dut (.frac_a, .frac_b, .cin, .mag, .neg);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [27:0] x, y;
      longint      ex;
      logic        en;
      x = {1'b0, 27'($urandom)};
      y = (i % 5 == 0) ? x + 28'($urandom_range(0, 3)) - 28'd1 : {1'b0, 27'($urandom)};
      y[27] = 1'b0;
      cin = 1'(i);
      frac_a = x;
      frac_b = cin ? ~y : y;
      #1;
      if (cin) begin
        en = (y > x);
        ex = en ? longint'(y) - longint'(x) : longint'(x) - longint'(y);
      end else begin
        en = 0;
        ex = longint'(x) + longint'(y);
      end
      negs += int'(en);
      checks++;
      if (longint'(mag) != ex || neg != en) begin
        failures++;
        if (failures < 10) $display("FAIL %h %h cin=%0d -> %h %0d", x, y, cin, mag, neg);
      end
    end
    checks++;
    if (negs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
