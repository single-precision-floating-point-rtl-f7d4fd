// fpadd_rounder: mantissa-sum and exponent-sum stage of the adder. The
// 24-bit significand norm[26:3] is rounded using the guard (norm[2]), round
// (norm[1]) and sticky (norm[0]) bits. Round to nearest even, the default
// mode, is the algorithm's; the other three modes (toward zero, toward
// +infinity, toward -infinity) and their 2-bit encoding are this design's
// reading of the rounding-mode input. A carry out of the rounding adder
// gives 10.000..., which is shifted back by one place with the exponent
// incremented; a denormal that rounds up into the normal range gets
// exponent 1. An exponent of 255 or more is an overflow: the result is
// infinity, or the largest finite number when the mode rounds toward zero
// for that sign (IEEE 754). underflow marks a denormal result. Combinational.
module fpadd_rounder
  import fpu_pkg::*;
(
  input  logic        sign,
  input  logic [26:0] norm,
  input  logic [8:0]  exp_norm,
  input  logic [1:0]  rmode,
  output fp32_t       result,
  output logic        overflow,
  output logic        underflow,
  output logic        inexact
);
  logic        g, r, s, lsb, round_up, to_inf;
  logic [24:0] m;
  logic [23:0] sig;
  logic [8:0]  e;

  always_comb begin
    lsb     = norm[3];
    g       = norm[2];
    r       = norm[1];
    s       = norm[0];
    inexact = g | r | s;
    unique case (rmode_e'(rmode))
      RM_NEAREST_EVEN: round_up = g & (r | s | lsb);
      RM_TO_ZERO:      round_up = 1'b0;
      RM_TO_POS_INF:   round_up = ~sign & inexact;
      RM_TO_NEG_INF:   round_up = sign & inexact;
      default:         round_up = 1'b0;
    endcase

    m = {1'b0, norm[26:3]} + {24'd0, round_up};
    if (m[24]) begin
      sig = m[24:1];
      e   = exp_norm + 9'd1;
    end else begin
      sig = m[23:0];
      e   = (exp_norm == 9'd0 && m[23]) ? 9'd1 : exp_norm;
    end

    overflow  = (e >= 9'd255);
    underflow = 1'b0;
    if (overflow) begin
      to_inf = (rmode == RM_NEAREST_EVEN) ||
               (rmode == RM_TO_POS_INF && !sign) ||
               (rmode == RM_TO_NEG_INF && sign);
      result = to_inf ? make_inf(sign)
                      : '{sign: sign, exp: 8'hFE, frac: 23'h7FFFFF};
      inexact = 1'b1;
    end else begin
      to_inf    = 1'b0;
      result    = '{sign: sign, exp: e[7:0], frac: sig[22:0]};
      underflow = (e == 9'd0) && (sig[22:0] != 23'd0);
    end
  end
endmodule
