// fp_adder: IEEE 754 single-precision adder/subtractor.
// Datapath, in the order of the standard addition algorithm:
//   exponent difference -> swap multiplexer (greater exponent first, implicit
//   bit restored) -> right barrel shifter aligns the smaller significand ->
//   effective-operation decision from the signs -> inverter -> two's
//   complement adder (negative sums re-complemented) -> normaliser (leading
//   one detector + left barrel shifter, or 1-bit right shift on a carry) ->
//   rounder (mantissa sum, exponent sum, overflow/underflow check).
// A subtraction is an addition with the sign of num_b flipped. NaN operands
// and infinity minus infinity give the quiet NaN 0x7FC00000 with invalid set;
// an infinite operand otherwise passes through. Denormal operands and results
// are supported. The sign of an exact zero difference is +0 (-0 when rounding
// toward -infinity), an IEEE 754 convention this design adopts.
// Timing: combinational datapath, result registered: sum/flags are valid with
// out_valid one clock after in_valid. Synchronous active-low reset.
module fp_adder
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  fp32_t       num_a,
  input  fp32_t       num_b,
  input  logic        op_sub,
  input  logic [1:0]  rmode,
  output logic        out_valid,
  output fp32_t       sum,
  output logic        overflow,
  output logic        underflow,
  output logic        invalid
);
  fp32_t       b_eff;
  logic [7:0]  shift_amt, exp_grt;
  logic        sign_d, sign_grt, sign_less, eff_sub, neg, is_zero;
  logic [23:0] mant_grt, mant_less;
  logic [26:0] aligned;
  logic [27:0] frac_grt, frac_less, mag;
  logic [26:0] norm;
  logic [8:0]  exp_norm;
  logic        res_sign, r_ovf, r_unf, r_inexact;
  fp32_t       r_result;

  fp32_t       nxt_sum;
  logic        nxt_ovf, nxt_unf, nxt_inv;

  always_comb begin
    b_eff      = num_b;
    b_eff.sign = num_b.sign ^ op_sub;
  end

  fpadd_exp_diff u_exp_diff (
    .exp_a     (num_a.exp),
    .exp_b     (b_eff.exp),
    .shift_amt (shift_amt),
    .sign_d    (sign_d)
  );

  fpadd_swap_mux u_swap (
    .a         (num_a),
    .b         (b_eff),
    .sign_d    (sign_d),
    .mant_grt  (mant_grt),
    .mant_less (mant_less),
    .exp_grt   (exp_grt),
    .sign_grt  (sign_grt),
    .sign_less (sign_less)
  );

  fpadd_align_shifter u_align (
    .mant      (mant_less),
    .shift_amt (shift_amt),
    .shifted   (aligned)
  );

  fpadd_effective_op u_effop (
    .sign_grt  (sign_grt),
    .sign_less (sign_less),
    .mant_grt  (mant_grt),
    .eff_sub   (eff_sub),
    .frac_grt  (frac_grt)
  );

  fpadd_inverter u_inv (
    .data_in  ({1'b0, aligned}),
    .invert   (eff_sub),
    .data_out (frac_less)
  );

  fpadd_twos_adder u_add (
    .frac_a (frac_grt),
    .frac_b (frac_less),
    .cin    (eff_sub),
    .mag    (mag),
    .neg    (neg)
  );

  fpadd_normalizer u_norm (
    .mag      (mag),
    .exp_grt  (exp_grt),
    .norm     (norm),
    .exp_norm (exp_norm),
    .is_zero  (is_zero)
  );

  always_comb begin
    if (is_zero)
      res_sign = eff_sub ? (rmode == RM_TO_NEG_INF) : sign_grt;
    else
      res_sign = sign_grt ^ neg;
  end

  fpadd_rounder u_round (
    .sign      (res_sign),
    .norm      (norm),
    .exp_norm  (exp_norm),
    .rmode     (rmode),
    .result    (r_result),
    .overflow  (r_ovf),
    .underflow (r_unf),
    .inexact   (r_inexact)
  );

  // Special operands bypass the datapath.
  always_comb begin
    nxt_sum = r_result;
    nxt_ovf = r_ovf;
    nxt_unf = r_unf;
    nxt_inv = 1'b0;
    if (is_nan(num_a) || is_nan(b_eff) ||
        (is_inf(num_a) && is_inf(b_eff) && (num_a.sign != b_eff.sign))) begin
      nxt_sum = QNAN;
      nxt_ovf = 1'b0;
      nxt_unf = 1'b0;
      nxt_inv = 1'b1;
    end else if (is_inf(num_a) || is_inf(b_eff)) begin
      nxt_sum = is_inf(num_a) ? num_a : b_eff;
      nxt_ovf = 1'b0;
      nxt_unf = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
      invalid   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sum       <= nxt_sum;
        overflow  <= nxt_ovf;
        underflow <= nxt_unf;
        invalid   <= nxt_inv;
      end
    end
  end
endmodule
