// fpadd_lod: leading-one detector (leading-zero counter) of the adder's
// normaliser. lz is the number of zeros above the most significant 1 of the
// 28-bit adder magnitude, 28 when the input is zero (zero is then also set).
// Written as a priority encoder scanning from the least significant bit so
// that the last 1 found, the leading one, wins. Combinational.
module fpadd_lod (
  input  logic [27:0] data,
  output logic [4:0]  lz,
  output logic        zero
);
  always_comb begin
    lz = 5'd28;
    for (int i = 0; i < 28; i++)
      if (data[i]) lz = 5'(27 - i);
    zero = (data == '0);
  end
endmodule
