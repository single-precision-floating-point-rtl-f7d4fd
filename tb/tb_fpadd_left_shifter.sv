// tb_fpadd_left_shifter: checks the left barrel shifter for every amount
// 0..31 against multiplication by 2^amt modulo 2^28.
module tb_fpadd_left_shifter;
  logic [27:0] data_in, data_out;
  logic [4:0]  amt;
  int          checks = 0, failures = 0;

  fpadd_left_shifter dut (.data_in, .amt, .data_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++)
      for (int k = 0; k < 200; k++) begin
        longint unsigned p;
        data_in = 28'($urandom);
        amt     = 5'(a);
        #1;
        p = longint'(data_in) * (64'd1 << a);
        checks++;
        if (data_out != 28'(p)) begin
          failures++;
          if (failures < 10) $display("FAIL %h << %0d = %h", data_in, a, data_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
