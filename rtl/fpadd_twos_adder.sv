// fpadd_twos_adder: two's complement fraction adder. It adds the greater
// fraction, the (possibly inverted) smaller fraction and the carry-in, which
// is 1 for a subtraction, completing the two's complement of the subtrahend.
// Both fractions are below 2^27, so for a subtraction bit 27 of the 28-bit
// sum is its sign: a negative sum is inverted and incremented to give its
// magnitude, and neg tells the sign logic to flip the result sign. For an
// addition bit 27 is the carry of the sum and neg is 0. Combinational.
module fpadd_twos_adder (
  input  logic [27:0] frac_a,
  input  logic [27:0] frac_b,
  input  logic        cin,
  output logic [27:0] mag,
  output logic        neg
);
  logic [27:0] sum;

  always_comb begin
    sum = frac_a + frac_b + {27'd0, cin};
    neg = cin & sum[27];
    mag = neg ? (~sum + 28'd1) : sum;
  end
endmodule
