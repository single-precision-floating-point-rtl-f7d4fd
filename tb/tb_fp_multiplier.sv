// tb_fp_multiplier: self-checking testbench of the single-precision
// multiplier. Directed products (2 x 3 = 6, 1.5 x 1.5 = 2.25 which needs the
// 1-bit normalisation, overflow, underflow, zero, infinity, 0 x inf) and
// biased random operands are applied one per clock; product and flags are
// compared one clock later with the truncating model of fp_ref_pkg.
module tb_fp_multiplier;
  import fp_ref_pkg::*;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [31:0] a = 0, b = 0;
  logic        out_valid, overflow, underflow, invalid;
  logic [31:0] product;
  int          checks = 0, failures = 0;

  fp_multiplier dut (
    .clk, .rst_n, .in_valid, .in1(a), .in2(b),
    .out_valid, .product, .overflow, .underflow, .invalid
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] er;
    logic        eo, eu, ei;
    ref_mul(x, y, er, eo, eu, ei);
    a = x;  b = y;  in_valid = 1;
    @(posedge clk);
    #1;
    in_valid = 0;
    checks++;
    if (!out_valid || product !== er || overflow !== eo || underflow !== eu || invalid !== ei) begin
      failures++;
      if (failures < 20)
        $display("FAIL %h * %h: got %h o%0d u%0d i%0d exp %h o%0d u%0d i%0d",
                 x, y, product, overflow, underflow, invalid, er, eo, eu, ei);
    end
  endtask

  task automatic expect_hex(input logic [31:0] v);
    checks++;
    if (product !== v) begin
      failures++;
      $display("FAIL directed: got %h expected %h", product, v);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    run(32'h40000000, 32'h40400000);  expect_hex(32'h40C00000);   // 2 * 3 = 6
    run(32'h3FC00000, 32'hBFC00000);  expect_hex(32'hC0100000);   // 1.5 * -1.5
    run(32'h7F000000, 32'h40000000);  expect_hex(32'h7F800000);   // 2^127 * 2 -> inf
    run(32'h00800000, 32'h3F000000);  expect_hex(32'h00000000);   // 2^-126 / 2 -> 0
    run(32'h3F800000, 32'h00000000);  expect_hex(32'h00000000);
    run(32'hFF800000, 32'h3F800000);  expect_hex(32'hFF800000);
    run(32'h7F800000, 32'h00000000);  expect_hex(32'h7FC00000);
    run(32'h3FFFFFFF, 32'h3FFFFFFF);                                // truncation
    for (int i = 0; i < 30000; i++) begin
      logic [31:0] x, y;
      x = rand_fp(8'($urandom_range(1, 254)));
      y = rand_fp(8'(254 - int'(x[30:23]) + 1));
      run(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
