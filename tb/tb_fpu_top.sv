// tb_fpu_top: end-to-end testbench of the single-precision FPU at its
// default configuration. It first runs the four reference operations (add
// with round mode 00, subtract with 10, multiply with 01, divide with 00),
// then a long random stream of all opcodes, rounding modes and biased
// operands, issued back to back and also while a division is busy (those
// starts must be ignored). A scoreboard holds the expected result, flags and
// completion clock of every accepted operation (2 clocks for add, subtract,
// multiply and unused opcodes, 28 for divide) and checks them when done
// pulses. Counters record that every mechanism of the datapath happened:
// operand swap, effective subtraction, negative sum re-complemented, carry
// normalisation, left normalisation, rounding carry, denormal result,
// product normalisation, quotient below one, overflow, underflow, division
// by zero, invalid operation and ignored start; one that never happened is a
// failure.
module tb_fpu_top;
  import fp_ref_pkg::*;

  typedef struct {
    longint      due;
    logic [31:0] res;
    logic        ovf, unf, dbz, inv;
  } exp_t;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [2:0]  fpu_op = 0;
  logic [1:0]  rmode = 0;
  logic [31:0] opa = 0, opb = 0;
  logic        busy, done, overflow, underflow, div_by_zero, invalid;
  logic [31:0] out;

  int     checks = 0, failures = 0;
  longint cycle = 0;
  exp_t   sb[$];

  // Mechanism counters.
  int n_swap = 0, n_effsub = 0, n_neg = 0, n_carry = 0, n_left = 0, n_rcarry = 0;
  int n_denorm = 0, n_mulnorm = 0, n_divlow = 0, n_ovf = 0, n_unf = 0, n_dbz = 0;
  int n_inv = 0, n_ignored = 0, n_ops[8];

  fpu_top dut (
    .clk, .rst_n, .start, .fpu_op, .rmode, .opa, .opb,
    .busy, .done, .out, .overflow, .underflow, .div_by_zero, .invalid
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Internal events of the adder, multiplier and divider.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_adder.in_valid) begin
      n_swap   += int'(dut.u_adder.sign_d);
      n_effsub += int'(dut.u_adder.eff_sub);
      n_neg    += int'(dut.u_adder.neg);
      n_carry  += int'(dut.u_adder.mag[27]);
      n_left   += int'(!dut.u_adder.mag[27] && !dut.u_adder.mag[26] && dut.u_adder.norm[26]);
      n_rcarry += int'(dut.u_adder.u_round.m[24]);
    end
    if (dut.u_mul.in_valid) n_mulnorm += int'(dut.u_mul.s[47]);
    if (dut.u_div.done)     n_divlow  += int'(!dut.u_div.q[24] && dut.u_div.special_r == 0);
  end

  // Scoreboard check.
  always @(posedge clk) begin
    #1;
    cycle++;
    if (rst_n && done) begin
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL unexpected done at %0d", cycle);
      end else begin
        exp_t e;
        e = sb.pop_front();
        if (cycle != e.due || out !== e.res || overflow !== e.ovf || underflow !== e.unf ||
            div_by_zero !== e.dbz || invalid !== e.inv) begin
          failures++;
          if (failures < 20)
            $display("FAIL at %0d (due %0d): got %h o%0d u%0d z%0d i%0d exp %h o%0d u%0d z%0d i%0d",
                     cycle, e.due, out, overflow, underflow, div_by_zero, invalid,
                     e.res, e.ovf, e.unf, e.dbz, e.inv);
        end
        n_ovf += int'(e.ovf);
        n_unf += int'(e.unf);
        n_dbz += int'(e.dbz);
        n_inv += int'(e.inv);
        if (e.res[30:23] == 0 && e.res[22:0] != 0) n_denorm++;
      end
    end
  end

  // Drive one start for one clock; record the expectation if accepted.
  task automatic issue(input logic [2:0] op, input logic [1:0] rm,
                       input logic [31:0] x, input logic [31:0] y);
    exp_t e;
    logic acc;
    @(negedge clk);
    fpu_op = op;  rmode = rm;  opa = x;  opb = y;  start = 1;
    acc = !busy;
    if (acc) begin
      e.dbz = 0;
      case (op)
        3'b000:  ref_add(x, y, 0, rm, e.res, e.ovf, e.unf, e.inv);
        3'b001:  ref_add(x, y, 1, rm, e.res, e.ovf, e.unf, e.inv);
        3'b010:  ref_mul(x, y, e.res, e.ovf, e.unf, e.inv);
        3'b011:  ref_div(x, y, e.res, e.ovf, e.unf, e.dbz, e.inv);
        default: begin e.res = QNAN; e.ovf = 0; e.unf = 0; e.inv = 1; end
      endcase
      e.due = cycle + ((op == 3'b011) ? 28 : 2);
      sb.push_back(e);
      n_ops[op]++;
    end else begin
      n_ignored++;
    end
    @(negedge clk);
    start = 0;
  endtask

  task automatic wait_idle();
    while (sb.size() != 0) @(negedge clk);
  endtask

  task automatic expect_out(input logic [31:0] v);
    wait_idle();
    checks++;
    if (out !== v) begin
      failures++;
      $display("FAIL reference operation: got %h expected %h", out, v);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // The four reference operations.
    issue(3'b000, 2'b00, 32'h41200000, 32'h40A00000);  expect_out(32'h41700000); // 10 + 5 = 15
    issue(3'b001, 2'b10, 32'h41200000, 32'h40A00000);  expect_out(32'h40A00000); // 10 - 5 = 5
    issue(3'b010, 2'b01, 32'h41200000, 32'h40A00000);  expect_out(32'h42480000); // 10 * 5 = 50
    issue(3'b011, 2'b00, 32'h41200000, 32'h40A00000);  expect_out(32'h40000000); // 10 / 5 = 2
    // Random stream.
    for (int i = 0; i < 20000; i++) begin
      logic [2:0]  op;
      logic [31:0] x, y;
      int          k;
      k  = $urandom_range(0, 99);
      op = (k < 35) ? 3'b000 : (k < 65) ? 3'b001 : (k < 85) ? 3'b010 :
           (k < 97) ? 3'b011 : 3'($urandom_range(4, 7));
      x  = rand_fp(8'($urandom_range(1, 254)));
      y  = rand_fp((op == 3'b010) ? 8'(255 - int'(x[30:23])) : x[30:23]);
      issue(op, 2'($urandom), x, y);
    end
    wait_idle();
    repeat (3) @(negedge clk);
    // Every mechanism must have happened at least once.
    foreach (n_ops[i]) begin
      checks++;
      if (n_ops[i] == 0) begin failures++; $display("FAIL opcode %0d never ran", i); end
    end
    begin
      int cnt[14];
      string nm[14];
      cnt = '{n_swap, n_effsub, n_neg, n_carry, n_left, n_rcarry, n_denorm, n_mulnorm,
              n_divlow, n_ovf, n_unf, n_dbz, n_inv, n_ignored};
      nm  = '{"swap", "effective subtraction", "negative sum", "carry normalisation",
              "left normalisation", "rounding carry", "denormal result", "product normalisation",
              "quotient below one", "overflow", "underflow", "division by zero", "invalid",
              "ignored start"};
      for (int i = 0; i < 14; i++) begin
        checks++;
        $display("  %-22s %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) begin failures++; $display("FAIL %s never happened", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
