// fp_ref_pkg: reference models used by the testbenches to work out expected
// results independently of the RTL. The addition model converts each operand
// to an exact wide integer in units of 2^-149 (the smallest denormal), adds
// exactly and rounds the exact sum in one step, so it shares no
// alignment/normalisation structure with the hardware. The multiplication
// and division models follow the truncating algorithms the units implement
// (exponent sum/difference, truncated significand, +-inf on overflow, +-0 on
// underflow) but compute the significand with plain integer arithmetic.
// Rounding modes: 0 nearest even, 1 toward zero, 2 toward +inf, 3 toward -inf.
package fp_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7FC00000;

  function automatic logic f_nan(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction
  function automatic logic f_inf(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] == 0;
  endfunction

  function automatic void ref_add(input logic [31:0] a, input logic [31:0] b_in,
                                  input logic sub, input logic [1:0] rm,
                                  output logic [31:0] r, output logic ovf,
                                  output logic unf, output logic inv);
    logic [31:0]  b;
    logic [299:0] va, vb, mag, rem, half;
    logic [24:0]  sig;
    logic         s, inexact, up;
    int           ea, eb, p, shift, e;
    b = b_in;  b[31] = b_in[31] ^ sub;
    ovf = 0;  unf = 0;  inv = 0;
    if (f_nan(a) || f_nan(b) || (f_inf(a) && f_inf(b) && a[31] != b[31])) begin
      r = QNAN;  inv = 1;  return;
    end
    if (f_inf(a)) begin r = a; return; end
    if (f_inf(b)) begin r = b; return; end
    ea = (a[30:23] == 0) ? 1 : int'(a[30:23]);
    eb = (b[30:23] == 0) ? 1 : int'(b[30:23]);
    va = 300'({(a[30:23] != 0), a[22:0]}) << (ea - 1);
    vb = 300'({(b[30:23] != 0), b[22:0]}) << (eb - 1);
    if (a[31] == b[31]) begin mag = va + vb; s = a[31]; end
    else if (va >= vb)  begin mag = va - vb; s = a[31]; end
    else                begin mag = vb - va; s = b[31]; end
    if (mag == 0) begin
      s = (a[31] == b[31]) ? a[31] : (rm == 2'd3);
      r = {s, 31'd0};
      return;
    end
    p = 0;
    for (int i = 0; i < 300; i++) if (mag[i]) p = i;
    if (p < 23) begin
      r = {s, 8'd0, mag[22:0]};
      unf = 1;
      return;
    end
    shift   = p - 23;
    sig     = 25'(mag >> shift);
    rem     = mag - (300'(sig) << shift);
    half    = (shift > 0) ? (300'(1) << (shift - 1)) : 300'(0);
    inexact = (rem != 0);
    case (rm)
      2'd0:    up = (shift > 0) && ((rem > half) || (rem == half && sig[0]));
      2'd1:    up = 0;
      2'd2:    up = !s && inexact;
      default: up = s && inexact;
    endcase
    sig = sig + 25'(up);
    e   = p - 22;
    if (sig[24]) begin sig = sig >> 1; e++; end
    if (e >= 255) begin
      ovf = 1;
      if (rm == 2'd0 || (rm == 2'd2 && !s) || (rm == 2'd3 && s)) r = {s, 8'hFF, 23'd0};
      else                                                     r = {s, 8'hFE, 23'h7FFFFF};
      return;
    end
    r = {s, 8'(e), sig[22:0]};
  endfunction

  function automatic void ref_mul(input logic [31:0] a, input logic [31:0] b,
                                  output logic [31:0] r, output logic ovf,
                                  output logic unf, output logic inv);
    logic        s;
    logic [63:0] prod;
    int          p, e;
    s = a[31] ^ b[31];
    ovf = 0;  unf = 0;  inv = 0;
    if (f_nan(a) || f_nan(b) || (f_inf(a) && b[30:23] == 0) || (f_inf(b) && a[30:23] == 0)) begin
      r = QNAN;  inv = 1;  return;
    end
    if (f_inf(a) || f_inf(b)) begin r = {s, 8'hFF, 23'd0}; return; end
    if (a[30:23] == 0 || b[30:23] == 0) begin r = {s, 31'd0}; return; end
    prod = 64'({1'b1, a[22:0]}) * 64'({1'b1, b[22:0]});
    p = (prod >= 64'h8000_0000_0000) ? 47 : 46;
    e = int'(a[30:23]) + int'(b[30:23]) - 127 + (p - 46);
    if (e < 1)   begin r = {s, 31'd0};          unf = 1; return; end
    if (e > 254) begin r = {s, 8'hFF, 23'd0};   ovf = 1; return; end
    r = {s, 8'(e), 23'(prod >> (p - 23))};
  endfunction

  function automatic void ref_div(input logic [31:0] a, input logic [31:0] b,
                                  output logic [31:0] r, output logic ovf,
                                  output logic unf, output logic dbz,
                                  output logic inv);
    logic        s;
    logic [63:0] ma, mb, q;
    int          e;
    s = a[31] ^ b[31];
    ovf = 0;  unf = 0;  inv = 0;  dbz = 0;
    if (f_nan(a) || f_nan(b) || (f_inf(a) && f_inf(b)) ||
        (a[30:23] == 0 && b[30:23] == 0)) begin
      r = QNAN;  inv = 1;  return;
    end
    if (f_inf(a)) begin r = {s, 8'hFF, 23'd0}; return; end
    if (b[30:23] == 0) begin r = {s, 8'hFF, 23'd0}; dbz = 1; return; end
    if (a[30:23] == 0 || f_inf(b)) begin r = {s, 31'd0}; return; end
    ma = 64'({1'b1, a[22:0]});
    mb = 64'({1'b1, b[22:0]});
    e  = int'(a[30:23]) - int'(b[30:23]) + 127;
    if (ma >= mb) q = (ma << 23) / mb;          // quotient in [1,2)
    else begin    q = (ma << 24) / mb; e--; end // quotient in (0.5,1)
    if (e < 1)   begin r = {s, 31'd0};        unf = 1; return; end
    if (e > 254) begin r = {s, 8'hFF, 23'd0}; ovf = 1; return; end
    r = {s, 8'(e), q[22:0]};
  endfunction

  // Random operand with a bias toward interesting cases.
  function automatic logic [31:0] rand_fp(input logic [7:0] near_exp);
    logic [31:0] x;
    int          k, t;
    x = $urandom;
    k = $urandom_range(0, 15);
    case (k)
      0:       x[30:23] = 8'd0;                                   // denormal / zero
      1:       x[30:0]  = {8'hFF, ($urandom_range(0, 3) == 0) ? 23'd1 << $urandom_range(0, 22) : 23'd0};
      2:       x[22:0]  = 23'h7FFFFF;                             // all ones fraction
      3:       x[30:23] = 8'($urandom_range(250, 254));           // near overflow
      4:       x[30:23] = 8'($urandom_range(1, 4));               // near underflow
      5, 6, 7, 8, 9, 10: begin                                  // close exponents
        t = int'(near_exp) + int'($urandom_range(0, 4)) - 2;
        x[30:23] = 8'((t > 254) ? 254 : (t < 1) ? 1 : t);
      end
      default: ;
    endcase
    return x;
  endfunction

endpackage
