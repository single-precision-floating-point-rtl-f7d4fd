// tb_fp_adder: self-checking testbench of the single-precision adder.
// Drives one operation per clock (add or subtract, all four rounding modes)
// from directed cases and biased random operands, and compares sum and flags,
// one clock after in_valid, with the exact-arithmetic model of fp_ref_pkg.
// Also checks the one-clock latency (out_valid follows in_valid).
module tb_fp_adder;
  import fp_ref_pkg::*;

  logic        clk = 0, rst_n = 0, in_valid = 0, op_sub = 0;
  logic [31:0] a = 0, b = 0;
  logic [1:0]  rmode = 0;
  logic        out_valid, overflow, underflow, invalid;
  logic [31:0] sum;
  int          checks = 0, failures = 0;

  fp_adder dut (
    .clk, .rst_n, .in_valid, .num_a(a), .num_b(b), .op_sub, .rmode,
    .out_valid, .sum, .overflow, .underflow, .invalid
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] y,
                     input logic s, input logic [1:0] rm);
    logic [31:0] er;
    logic        eo, eu, ei;
    ref_add(x, y, s, rm, er, eo, eu, ei);
    a = x;  b = y;  op_sub = s;  rmode = rm;  in_valid = 1;
    @(posedge clk);
    #1;
    in_valid = 0;
    checks++;
    if (!out_valid || sum !== er || overflow !== eo || underflow !== eu || invalid !== ei) begin
      failures++;
      if (failures < 20)
        $display("FAIL %h %s %h rm=%0d: got %h v%0d o%0d u%0d i%0d exp %h o%0d u%0d i%0d",
                 x, s ? "-" : "+", y, rm, sum, out_valid, overflow, underflow, invalid,
                 er, eo, eu, ei);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    // Directed: 1.5 + 2.25 = 3.75, 1 - 1 = +0, 3 - 5 = -2, max + max = inf.
    run(32'h3FC00000, 32'h40100000, 0, 0);
    if (sum !== 32'h40700000) failures++;
    checks++;
    run(32'h3F800000, 32'h3F800000, 1, 0);
    if (sum !== 32'h00000000) failures++;
    checks++;
    run(32'h40400000, 32'h40A00000, 1, 0);
    if (sum !== 32'hC0000000) failures++;
    checks++;
    run(32'h7F7FFFFF, 32'h7F7FFFFF, 0, 0);
    if (sum !== 32'h7F800000 || !overflow) failures++;
    checks++;
    run(32'h7F7FFFFF, 32'h7F7FFFFF, 0, 1);     // toward zero: stays at max
    run(32'h00000001, 32'h80000003, 0, 0);     // denormals
    run(32'h00800000, 32'h80000001, 0, 0);     // normal - denormal -> denormal
    run(32'h3F800000, 32'h33800000, 0, 0);     // 1 + 2^-24: tie, to even
    run(32'h3F800001, 32'h33800000, 0, 0);     // tie, rounds up
    run(32'h3F800000, 32'h33800000, 0, 2);
    run(32'h3F800000, 32'hB3800000, 0, 3);
    run(32'h3FFFFFFF, 32'h34000000, 0, 0);     // rounding carry
    run(32'h7F800000, 32'h7F800000, 1, 0);     // inf - inf
    run(32'h7F800000, 32'h3F800000, 1, 0);
    run(32'h3F800000, 32'h3F800000, 1, 3);     // -0 toward -inf
    for (int i = 0; i < 40000; i++) begin
      logic [31:0] x;
      x = rand_fp(8'($urandom_range(1, 254)));
      run(x, rand_fp(x[30:23]), 1'($urandom), 2'($urandom));
    end
    // out_valid must drop when no operand is offered.
    @(posedge clk); #1;
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
