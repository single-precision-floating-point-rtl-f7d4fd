// tb_fpadd_inverter: random check of the conditional inverter: the output is
// the input when invert is 0 and its bitwise complement (2^28 - 1 - x) when 1.
module tb_fpadd_inverter;
  logic [27:0] data_in, data_out;
  logic        invert;
  int          checks = 0, failures = 0;

  fpadd_inverter dut (.data_in, .invert, .data_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      data_in = 28'($urandom);
      invert  = 1'(i);
      #1;
      checks++;
      if (data_out != (invert ? 28'hFFFFFFF - data_in : data_in)) begin
        failures++;
        if (failures < 10) $display("FAIL %h %0d -> %h", data_in, invert, data_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
