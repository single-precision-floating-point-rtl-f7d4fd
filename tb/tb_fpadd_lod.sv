// tb_fpadd_lod: checks the leading-zero count for every position of the
// leading one (with random bits below it) and for zero.
module tb_fpadd_lod;
  logic [27:0] data;
  logic [4:0]  lz;
  logic        zero;
  int          checks = 0, failures = 0;

  fpadd_lod dut (.data, .lz, .zero);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pos = -1; pos < 28; pos++)
      for (int k = 0; k < 50; k++) begin
        logic [27:0] below;
        below = 28'($urandom);
        data = (pos < 0) ? 28'd0 : ((28'd1 << pos) | (below & ((28'd1 << pos) - 28'd1)));
        #1;
        checks++;
        if (lz != 5'(27 - pos) || zero != (pos < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL %h -> %0d %0d", data, lz, zero);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
