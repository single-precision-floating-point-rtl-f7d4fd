// fpadd_normalizer: normalisation stage of the floating-point adder.
// The 28-bit magnitude from the two's complement adder has its hidden-bit
// position at bit 26, at exponent exp_grt. A carry into bit 27 is removed by a
// 1-bit right shift (the bit shifted out joins the sticky bit) and the
// exponent is incremented. Otherwise the leading-one detector counts the
// zeros in front of the leading one and the left barrel shifter moves it to
// bit 26, decrementing the exponent by the same amount. The shift is limited
// so the exponent does not fall below 1; a result that cannot be fully
// normalised is a denormal and gets exponent field 0 (this limit is this
// design's addition for denormal results). Outputs: 27-bit significand with
// guard/round/sticky bits, 9-bit exponent field (255 or more means overflow),
// and is_zero for an exactly zero magnitude. Combinational.
module fpadd_normalizer (
  input  logic [27:0] mag,
  input  logic [7:0]  exp_grt,
  output logic [26:0] norm,
  output logic [8:0]  exp_norm,
  output logic        is_zero
);
  logic [4:0]  lz;
  logic [4:0]  lshift;
  logic [27:0] shifted;
  logic        lod_zero;

  fpadd_lod u_lod (
    .data (mag),
    .lz   (lz),
    .zero (lod_zero)
  );

  fpadd_left_shifter u_lshift (
    .data_in  (mag),
    .amt      (lshift),
    .data_out (shifted)
  );

  always_comb begin
    // Shift that puts the leading one at bit 26, clamped at exponent 1.
    if (lod_zero || lz == 5'd0)
      lshift = 5'd0;
    else if ({3'b000, lz - 5'd1} > (exp_grt - 8'd1))
      lshift = 5'(exp_grt - 8'd1);
    else
      lshift = lz - 5'd1;

    is_zero = lod_zero;
    if (mag[27]) begin
      norm     = {mag[27:2], mag[1] | mag[0]};
      exp_norm = {1'b0, exp_grt} + 9'd1;
    end else begin
      norm     = shifted[26:0];
      exp_norm = norm[26] ? ({1'b0, exp_grt} - {4'd0, lshift}) : 9'd0;
    end
  end
endmodule
