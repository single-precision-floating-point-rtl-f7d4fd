// fpadd_inverter: conditional inverter of the adder. For an effective
// subtraction the bits of the aligned smaller fraction are inverted; the
// two's complement adder then supplies the +1 as its carry-in. Otherwise the
// fraction passes unchanged. Combinational.
module fpadd_inverter (
  input  logic [27:0] data_in,
  input  logic        invert,
  output logic [27:0] data_out
);
  assign data_out = data_in ^ {28{invert}};
endmodule
