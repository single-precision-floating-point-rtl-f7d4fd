// fp_multiplier: IEEE 754 single-precision multiplier.
// Sign = XOR of the operand signs. The biased exponents are added and the
// bias 127 subtracted. The 24-bit significands (implicit 1 restored) give a
// 48-bit product; when its bit 47 is set the product is shifted right by one
// and the exponent incremented, so bits 46..23 hold the 24-bit result
// significand and the bits below are discarded (truncation, as the algorithm
// prescribes, whatever the rounding mode). A biased exponent above 254 is an
// overflow and gives +-infinity; one below 1 is an underflow and gives +-0.
// This design's choices: a zero exponent field is taken as zero (operands are
// assumed normalised), and special operands follow IEEE 754 (NaN or 0 x inf
// gives the quiet NaN 0x7FC00000 with invalid set, inf x finite gives inf).
// Timing: combinational, result registered; out_valid one clock after
// in_valid. Synchronous active-low reset.
module fp_multiplier
  import fpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t in1,
  input  fp32_t in2,
  output logic  out_valid,
  output fp32_t product,
  output logic  overflow,
  output logic  underflow,
  output logic  invalid
);
  logic        sign_f, zero1, zero2;
  logic [47:0] s;
  logic [9:0]  exp_sum;       // signed-range biased exponent, bit 9 = negative
  logic [22:0] frac;
  fp32_t       nxt;
  logic        nxt_ovf, nxt_unf, nxt_inv;

  always_comb begin
    sign_f  = in1.sign ^ in2.sign;
    zero1   = (in1.exp == 8'd0);
    zero2   = (in2.exp == 8'd0);
    s       = {1'b1, in1.frac} * {1'b1, in2.frac};
    exp_sum = {2'b00, in1.exp} + {2'b00, in2.exp} - 10'(BIAS);
    if (s[47]) begin
      frac    = s[46:24];
      exp_sum = exp_sum + 10'd1;
    end else begin
      frac    = s[45:23];
    end

    nxt     = '{sign: sign_f, exp: exp_sum[7:0], frac: frac};
    nxt_ovf = 1'b0;
    nxt_unf = 1'b0;
    nxt_inv = 1'b0;
    if (is_nan(in1) || is_nan(in2) ||
        (is_inf(in1) && zero2) || (is_inf(in2) && zero1)) begin
      nxt     = QNAN;
      nxt_inv = 1'b1;
    end else if (is_inf(in1) || is_inf(in2)) begin
      nxt = make_inf(sign_f);
    end else if (zero1 || zero2) begin
      nxt = make_zero(sign_f);
    end else if (exp_sum[9] || exp_sum == 10'd0) begin
      nxt     = make_zero(sign_f);
      nxt_unf = 1'b1;
    end else if (exp_sum > 10'd254) begin
      nxt     = make_inf(sign_f);
      nxt_ovf = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      product   <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
      invalid   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        product   <= nxt;
        overflow  <= nxt_ovf;
        underflow <= nxt_unf;
        invalid   <= nxt_inv;
      end
    end
  end
endmodule
