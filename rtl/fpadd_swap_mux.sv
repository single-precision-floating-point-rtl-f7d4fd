// fpadd_swap_mux: swap multiplexer of the floating-point adder. It restores
// the implicit bit of each operand (0 for a denormal, whose exponent field is
// 0, else 1), extending the fraction to 24 bits, and routes the operand with
// the greater exponent to mant_grt/exp_grt/sign_grt and the other one to
// mant_less/sign_less. sign_d (from the exponent-difference stage) selects the
// swap. exp_grt is the effective exponent (1 for a denormal). Combinational.
module fpadd_swap_mux
  import fpu_pkg::*;
(
  input  fp32_t       a,
  input  fp32_t       b,
  input  logic        sign_d,
  output logic [23:0] mant_grt,
  output logic [23:0] mant_less,
  output logic [7:0]  exp_grt,
  output logic        sign_grt,
  output logic        sign_less
);
  logic [23:0] ma, mb;
  logic [7:0]  ea, eb;

  always_comb begin
    ma = {(a.exp != 8'd0), a.frac};
    mb = {(b.exp != 8'd0), b.frac};
    ea = (a.exp == 8'd0) ? 8'd1 : a.exp;
    eb = (b.exp == 8'd0) ? 8'd1 : b.exp;
    if (sign_d) begin
      mant_grt  = mb;  mant_less = ma;
      exp_grt   = eb;  sign_grt  = b.sign;  sign_less = a.sign;
    end else begin
      mant_grt  = ma;  mant_less = mb;
      exp_grt   = ea;  sign_grt  = a.sign;  sign_less = b.sign;
    end
  end
endmodule
