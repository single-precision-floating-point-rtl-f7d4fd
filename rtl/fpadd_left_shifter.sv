// fpadd_left_shifter: left barrel shifter of the adder's normaliser. It
// shifts the 28-bit value left by amt (0..31) in stages of 1, 2, 4, 8 and 16
// places, filling with zeros. Combinational.
module fpadd_left_shifter (
  input  logic [27:0] data_in,
  input  logic [4:0]  amt,
  output logic [27:0] data_out
);
  always_comb begin
    data_out = data_in;
    for (int s = 0; s < 5; s++)
      if (amt[s]) data_out = data_out << (1 << s);
  end
endmodule
