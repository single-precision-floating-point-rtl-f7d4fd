// fpu_pkg: types and constants shared by the single-precision floating-point
// units. An IEEE 754 single-precision number is a sign bit, an 8-bit exponent
// in excess-127 form and a 23-bit fraction with an implicit leading one; its
// value is (-1)^S x 1.F x 2^(E-127). The operation codes follow the FPU's
// operation-mode field (000 add, 001 subtract, 010 multiply, 011 divide). The
// meaning of the 2-bit rounding mode beyond "00 = round to nearest even, the
// default" is this design's choice: 01 toward zero, 10 toward +infinity,
// 11 toward -infinity.
package fpu_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned BIAS   = 127;
  localparam logic [7:0]  EXP_MAX = 8'hFF;


  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  typedef enum logic [2:0] {
    OP_ADD = 3'b000,
    OP_SUB = 3'b001,
    OP_MUL = 3'b010,
    OP_DIV = 3'b011
  } fpu_op_e;

  typedef enum logic [1:0] {
    RM_NEAREST_EVEN = 2'b00,
    RM_TO_ZERO      = 2'b01,
    RM_TO_POS_INF   = 2'b10,
    RM_TO_NEG_INF   = 2'b11
  } rmode_e;

  localparam fp32_t QNAN = '{sign: 1'b0, exp: 8'hFF, frac: 23'h400000};

  function automatic logic is_nan(fp32_t x);
    return (x.exp == EXP_MAX) && (x.frac != '0);
  endfunction

  function automatic logic is_inf(fp32_t x);
    return (x.exp == EXP_MAX) && (x.frac == '0);
  endfunction

  function automatic fp32_t make_inf(logic s);
    return '{sign: s, exp: EXP_MAX, frac: '0};
  endfunction

  function automatic fp32_t make_zero(logic s);
    return '{sign: s, exp: '0, frac: '0};
  endfunction

endpackage
