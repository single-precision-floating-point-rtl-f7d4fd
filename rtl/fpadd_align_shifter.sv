// fpadd_align_shifter: right barrel shifter that aligns the smaller
// significand with the larger exponent. The 24-bit significand is extended by
// guard, round and sticky bits (27 bits) and shifted right by shift_amt in
// log2 stages of 1, 2, 4, 8 and 16 places; any 1 shifted out below the round
// bit is ORed into the sticky bit so the rounder still sees that the value
// was inexact. Shifts of 27 or more leave only the sticky bit. Combinational.
module fpadd_align_shifter (
  input  logic [23:0] mant,
  input  logic [7:0]  shift_amt,
  output logic [26:0] shifted
);
  logic [26:0] stage;
  logic        sticky;

  always_comb begin
    stage  = {mant, 3'b000};
    sticky = 1'b0;
    if (shift_amt >= 8'd27) begin
      sticky = |mant;
      stage  = '0;
    end else begin
      for (int s = 0; s < 5; s++) begin
        if (shift_amt[s]) begin
          sticky = sticky | |(stage & ((27'd1 << (1 << s)) - 27'd1));
          stage  = stage >> (1 << s);
        end
      end
    end
    shifted = {stage[26:1], stage[0] | sticky};
  end
endmodule
