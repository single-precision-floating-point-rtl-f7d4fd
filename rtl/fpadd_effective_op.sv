// fpadd_effective_op: "fraction component effective operation" of the adder.
// The signs of the two aligned operands (after the subtract request has
// flipped the sign of Num_B) decide whether their fractions are added or
// subtracted: unlike signs give an effective subtraction. It also extends the
// greater significand to the 28-bit adder width: a zero carry bit above it
// and three zero guard/round/sticky bits below. Combinational.
module fpadd_effective_op (
  input  logic        sign_grt,
  input  logic        sign_less,
  input  logic [23:0] mant_grt,
  output logic        eff_sub,
  output logic [27:0] frac_grt
);
  always_comb begin
    eff_sub  = sign_grt ^ sign_less;
    frac_grt = {1'b0, mant_grt, 3'b000};
  end
endmodule
