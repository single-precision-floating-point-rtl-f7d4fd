// fpu_top: single-precision floating-point unit with four operations.
// A 3-bit operation code selects the unit that receives the operands:
//   000 add and 001 subtract -> fp_adder (rmode selects the rounding),
//   010 multiply             -> fp_multiplier (truncating),
//   011 divide               -> fp_divider (restoring, one bit per clock).
// The opcodes and the 2-bit rounding-mode input follow the FPU's operation
// and round modes; the handshake, the status flags and the treatment of the
// unused opcodes 100-111 (quiet NaN 0x7FC00000 with invalid set) are this
// design's choices.
// Interface and timing: assert start for one clock with fpu_op, rmode, opa
// and opb. The unit registers its result and the FPU registers it again on
// out, so add, subtract and multiply (and unused opcodes) raise the one-clock
// done pulse in the 2nd clock after the clock in which start is high; divide
// takes 28 clocks, with busy high
// while the divider works, during which start is ignored. Operations can be
// issued back to back (one per clock) except behind a division. Results stay
// on out until the next operation completes.
// Synchronous active-low reset.
module fpu_top
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2:0]  fpu_op,
  input  logic [1:0]  rmode,
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  output logic        busy,
  output logic        done,
  output logic [31:0] out,
  output logic        overflow,
  output logic        underflow,
  output logic        div_by_zero,
  output logic        invalid
);
  logic  accept, go_add, go_mul, go_div, go_bad;
  logic  add_valid, add_ovf, add_unf, add_inv;
  logic  mul_valid, mul_ovf, mul_unf, mul_inv;
  logic  div_busy, div_done, div_ovf, div_unf, div_dbz, div_inv;
  logic  bad_valid;
  fp32_t add_res, mul_res, div_res;

  assign accept = start && !div_busy;
  assign go_add = accept && (fpu_op == OP_ADD || fpu_op == OP_SUB);
  assign go_mul = accept && (fpu_op == OP_MUL);
  assign go_div = accept && (fpu_op == OP_DIV);
  assign go_bad = accept && fpu_op[2];

  fp_adder u_adder (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (go_add),
    .num_a     (fp32_t'(opa)),
    .num_b     (fp32_t'(opb)),
    .op_sub    (fpu_op == OP_SUB),
    .rmode     (rmode),
    .out_valid (add_valid),
    .sum       (add_res),
    .overflow  (add_ovf),
    .underflow (add_unf),
    .invalid   (add_inv)
  );

  fp_multiplier u_mul (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (go_mul),
    .in1       (fp32_t'(opa)),
    .in2       (fp32_t'(opb)),
    .out_valid (mul_valid),
    .product   (mul_res),
    .overflow  (mul_ovf),
    .underflow (mul_unf),
    .invalid   (mul_inv)
  );

  fp_divider u_div (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (go_div),
    .in1         (fp32_t'(opa)),
    .in2         (fp32_t'(opb)),
    .busy        (div_busy),
    .done        (div_done),
    .quotient    (div_res),
    .overflow    (div_ovf),
    .underflow   (div_unf),
    .div_by_zero (div_dbz),
    .invalid     (div_inv)
  );

  assign busy = div_busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bad_valid   <= 1'b0;
      done        <= 1'b0;
      out         <= '0;
      overflow    <= 1'b0;
      underflow   <= 1'b0;
      div_by_zero <= 1'b0;
      invalid     <= 1'b0;
    end else begin
      bad_valid <= go_bad;
      done      <= add_valid | mul_valid | div_done | bad_valid;
      if (add_valid) begin
        out <= add_res;  overflow <= add_ovf;  underflow <= add_unf;
        div_by_zero <= 1'b0;  invalid <= add_inv;
      end else if (mul_valid) begin
        out <= mul_res;  overflow <= mul_ovf;  underflow <= mul_unf;
        div_by_zero <= 1'b0;  invalid <= mul_inv;
      end else if (div_done) begin
        out <= div_res;  overflow <= div_ovf;  underflow <= div_unf;
        div_by_zero <= div_dbz;  invalid <= div_inv;
      end else if (bad_valid) begin
        out <= QNAN;  overflow <= 1'b0;  underflow <= 1'b0;
        div_by_zero <= 1'b0;  invalid <= 1'b1;
      end
    end
  end

  // Only one unit may finish in any clock.
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0({add_valid, mul_valid, div_done, bad_valid}));
endmodule
