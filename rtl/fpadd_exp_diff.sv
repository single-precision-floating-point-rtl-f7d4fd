// fpadd_exp_diff: exponent-difference stage of the floating-point adder.
// The two 8-bit exponent fields are compared by subtraction; shift_amt is the
// absolute difference, which later aligns the smaller significand, and sign_d
// tells the swap multiplexer that Exp_a is the smaller one. A zero exponent
// field marks a denormal number whose true exponent is that of field 1, so
// both fields are mapped to at least 1 before subtracting (this design's way
// of handling denormals). Purely combinational.
module fpadd_exp_diff (
  input  logic [7:0] exp_a,
  input  logic [7:0] exp_b,
  output logic [7:0] shift_amt,
  output logic       sign_d
);
  logic [7:0] ea, eb;
  logic [8:0] diff;

  always_comb begin
    ea        = (exp_a == 8'd0) ? 8'd1 : exp_a;
    eb        = (exp_b == 8'd0) ? 8'd1 : exp_b;
    diff      = {1'b0, ea} - {1'b0, eb};   // 9-bit subtraction, bit 8 = borrow
    sign_d    = diff[8];
    shift_amt = sign_d ? (eb - ea) : diff[7:0];
  end
endmodule
