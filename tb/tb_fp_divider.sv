// tb_fp_divider: self-checking testbench of the restoring divider.
// Each division is started with a one-clock start pulse; the testbench checks
// that busy rises, that done is high in the 27th clock after the clock in
// which start is high, and
// compares quotient and flags with the truncating model of fp_ref_pkg.
// Directed cases cover 6 / 3 = 2, 1 / 3 (quotient below 1, exponent
// decrement), overflow, underflow, division by zero, 0/0 and inf/inf; then
// biased random operands follow. A start pulse while busy must be ignored.
module tb_fp_divider;
  import fp_ref_pkg::*;

  localparam int LATENCY = 27;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [31:0] a = 0, b = 0;
  logic        busy, done, overflow, underflow, div_by_zero, invalid;
  logic [31:0] quotient;
  int          checks = 0, failures = 0;

  fp_divider dut (
    .clk, .rst_n, .start, .in1(a), .in2(b),
    .busy, .done, .quotient, .overflow, .underflow, .div_by_zero, .invalid
  );

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] er;
    logic        eo, eu, ez, ei;
    int          n;
    ref_div(x, y, er, eo, eu, ez, ei);
    a = x;  b = y;  start = 1;
    @(posedge clk);
    #1;
    start = 0;
    checks++;
    if (!busy) failures++;
    // A second start while busy must not disturb the division.
    a = 32'h3F800000;  b = 32'h3F800000;  start = 1;
    @(posedge clk);
    #1;
    start = 0;
    n = 2;
    while (!done && n < 100) begin
      @(posedge clk);
      #1;
      n++;
    end
    checks++;
    if (n != LATENCY) begin
      failures++;
      $display("FAIL latency %0d", n);
    end
    checks++;
    if (quotient !== er || overflow !== eo || underflow !== eu ||
        div_by_zero !== ez || invalid !== ei) begin
      failures++;
      if (failures < 20)
        $display("FAIL %h / %h: got %h o%0d u%0d z%0d i%0d exp %h o%0d u%0d z%0d i%0d",
                 x, y, quotient, overflow, underflow, div_by_zero, invalid,
                 er, eo, eu, ez, ei);
    end
    @(posedge clk);
    #1;
  endtask

  task automatic expect_hex(input logic [31:0] v);
    checks++;
    if (quotient !== v) begin
      failures++;
      $display("FAIL directed: got %h expected %h", quotient, v);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    run(32'h40C00000, 32'h40400000);  expect_hex(32'h40000000);   // 6 / 3 = 2
    run(32'h3F800000, 32'h40400000);  expect_hex(32'h3EAAAAAA);   // 1 / 3 truncated
    run(32'h7F000000, 32'h3F000000);  expect_hex(32'h7F800000);   // overflow
    run(32'h00800000, 32'h40000000);  expect_hex(32'h00000000);   // underflow
    run(32'hBF800000, 32'h00000000);  expect_hex(32'hFF800000);   // -1 / 0
    run(32'h00000000, 32'h00000000);  expect_hex(32'h7FC00000);
    run(32'h7F800000, 32'hFF800000);  expect_hex(32'h7FC00000);
    run(32'h3F800000, 32'h7F800000);  expect_hex(32'h00000000);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x;
      x = rand_fp(8'($urandom_range(1, 254)));
      run(x, rand_fp(x[30:23]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
