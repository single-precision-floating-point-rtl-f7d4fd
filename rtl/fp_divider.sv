// fp_divider: IEEE 754 single-precision divider, restoring binary division.
// Sign = XOR of the operand signs; biased exponent = expo1 - expo2 + 127.
// The significands S1 and S2 (implicit 1 restored) are divided bit by bit:
// in each step the partial remainder is compared with the divisor by
// subtraction; if the difference is not negative the quotient bit is 1 and
// the difference becomes the remainder, otherwise the quotient bit is 0. The
// quotient shifts left and the remainder doubles for the next power of two.
// 25 steps give q = floor(S1 * 2^24 / S2), which lies in (2^23, 2^25); if
// q[24] is 0 the quotient is shifted one place left and the exponent
// decremented. The bits below the 23 fraction bits are discarded
// (truncation). Exponent above 254: overflow, +-infinity; below 1: underflow,
// +-0. This design's choices: one quotient bit per clock; a zero exponent
// field is taken as zero (operands are assumed normalised); x/0 gives
// +-infinity with div_by_zero, and NaN, 0/0 and inf/inf give the quiet NaN
// 0x7FC00000 with invalid, as IEEE 754 prescribes.
// Timing: start (ignored while busy) loads the operands at a clock edge;
// busy is high for the next 26 clocks (25 division steps and one to register
// the result), and done pulses with the result in the 27th clock after the
// clock in which start was high. Special operands take the same time.
// Synchronous active-low reset.
module fp_divider
  import fpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t in1,
  input  fp32_t in2,
  output logic  busy,
  output logic  done,
  output fp32_t quotient,
  output logic  overflow,
  output logic  underflow,
  output logic  div_by_zero,
  output logic  invalid
);
  localparam int unsigned Q_W = 25;

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_DONE} state_e;

  state_e      state;
  logic [4:0]  count;
  logic [24:0] rem;
  logic [23:0] divisor;
  logic [24:0] q;
  logic [9:0]  exp_r;
  logic        sign_r;
  logic [1:0]  special_r;    // 0 none, 1 zero, 2 inf, 3 nan
  logic        dbz_r;

  logic [25:0] diff;
  logic [24:0] q_next;
  logic        sp_nan, sp_inf, sp_zero, sp_dbz;
  fp32_t       res;
  logic [9:0]  exp_adj;
  logic        res_ovf, res_unf;

  // One restoring step.
  always_comb begin
    diff   = {1'b0, rem} - {2'b00, divisor};
    q_next = {q[23:0], ~diff[25]};
  end

  // Classification of the operands at start.
  always_comb begin
    sp_nan  = is_nan(in1) || is_nan(in2) || (is_inf(in1) && is_inf(in2)) ||
              (in1.exp == 8'd0 && in2.exp == 8'd0);
    sp_dbz  = !sp_nan && in2.exp == 8'd0 && !is_inf(in1);
    sp_inf  = !sp_nan && (is_inf(in1) || in2.exp == 8'd0);
    sp_zero = !sp_nan && !sp_inf && (in1.exp == 8'd0 || is_inf(in2));
  end

  // Normalisation and range check of the finished quotient.
  always_comb begin
    res_ovf = 1'b0;
    res_unf = 1'b0;
    if (q[24]) begin
      exp_adj = exp_r;
      res     = '{sign: sign_r, exp: exp_adj[7:0], frac: q[23:1]};
    end else begin
      exp_adj = exp_r - 10'd1;
      res     = '{sign: sign_r, exp: exp_adj[7:0], frac: q[22:0]};
    end
    unique case (special_r)
      2'd1: res = make_zero(sign_r);
      2'd2: res = make_inf(sign_r);
      2'd3: res = QNAN;
      default: begin
        if (exp_adj[9] || exp_adj == 10'd0) begin
          res     = make_zero(sign_r);
          res_unf = 1'b1;
        end else if (exp_adj > 10'd254) begin
          res     = make_inf(sign_r);
          res_ovf = 1'b1;
        end
      end
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      count       <= '0;
      rem         <= '0;
      divisor     <= '0;
      q           <= '0;
      exp_r       <= '0;
      sign_r      <= 1'b0;
      special_r   <= 2'd0;
      dbz_r       <= 1'b0;
      done        <= 1'b0;
      quotient    <= '0;
      overflow    <= 1'b0;
      underflow   <= 1'b0;
      div_by_zero <= 1'b0;
      invalid     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rem       <= {1'b0, 1'b1, in1.frac};
          divisor   <= {1'b1, in2.frac};
          q         <= '0;
          count     <= 5'(Q_W - 1);
          exp_r     <= {2'b00, in1.exp} - {2'b00, in2.exp} + 10'(BIAS);
          sign_r    <= in1.sign ^ in2.sign;
          special_r <= sp_nan ? 2'd3 : sp_inf ? 2'd2 : sp_zero ? 2'd1 : 2'd0;
          dbz_r     <= sp_dbz;
          state     <= S_DIV;
        end
        S_DIV: begin
          q   <= q_next;
          rem <= diff[25] ? {rem[23:0], 1'b0} : {diff[23:0], 1'b0};
          if (count == 5'd0) state <= S_DONE;
          else               count <= count - 5'd1;
        end
        S_DONE: begin
          quotient    <= res;
          overflow    <= res_ovf;
          underflow   <= res_unf;
          div_by_zero <= dbz_r;
          invalid     <= (special_r == 2'd3);
          done        <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The remainder stays below twice the divisor, so it never needs bit 25.
  property p_rem_bound;
    @(posedge clk) disable iff (!rst_n) (state == S_DIV) |-> (rem < {divisor, 1'b0});
  endproperty
  a_rem_bound: assert property (p_rem_bound);
endmodule
