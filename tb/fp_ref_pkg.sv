// fp_ref_pkg: reference model for the FP testbenches.
//
// Computes expected binary32 results independently of the RTL: operands are
// converted exactly to double precision, the operation is done in double
// precision (for +, -, x, / and square root of binary32 operands the double
// result, rounded once more to binary32, equals the correctly rounded binary32
// result, because 53 >= 2*24 + 2), and r2f() rounds to nearest-even with
// subnormals. Special values are handled explicitly. Also provides random
// operand generators biased toward the interesting cases.
package fp_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic logic isnan(logic [31:0] a);
    return a[30:23] == 8'hFF && a[22:0] != 0;
  endfunction
  function automatic logic isinf(logic [31:0] a);
    return a[30:23] == 8'hFF && a[22:0] == 0;
  endfunction
  function automatic logic iszero(logic [31:0] a);
    return a[30:0] == 0;
  endfunction

  // 2^e for a normal double exponent.
  function automatic real pow2(int e);
    logic [10:0] be;
    be = 11'(e + 1023);
    return $bitstoreal({1'b0, be, 52'd0});
  endfunction

  function automatic real f2r(logic [31:0] a);
    real v;
    if (a[30:23] == 0) v = real'(a[22:0]) * pow2(-149);
    else v = (1.0 + real'(a[22:0]) / 8388608.0) * pow2(int'(a[30:23]) - 127);
    return a[31] ? -v : v;
  endfunction

  // Round a finite double to binary32, nearest-even, with gradual underflow.
  function automatic logic [31:0] r2f(real x);
    logic [63:0]  d;
    logic         s;
    int           e;
    logic [52:0]  m;
    logic [127:0] w;
    logic [31:0]  r;
    logic         g, st;
    int           sh;
    d = $realtobits(x);
    s = d[63];
    if (d[62:0] == 0) return {s, 31'd0};
    e = int'(d[62:52]) - 1023;
    m = {1'b1, d[51:0]};
    if (e > 127) return {s, 8'hFF, 23'd0};
    if (e >= -126) begin
      r  = {s, 8'(e + 127), m[51:29]};
      g  = m[28];
      st = |m[27:0];
      if (g && (st || r[0])) r = r + 1;   // carries into the exponent as needed
      return r;
    end
    sh = -97 - e;                          // value / 2^-149 = m >> sh
    if (sh > 60) return {s, 31'd0};
    w  = {75'd0, m};
    r  = 32'(w >> sh);
    g  = w[sh-1];
    st = (w & ((128'd1 << (sh - 1)) - 1)) != 0;
    r  = {1'b0, r[30:0]};
    if (g && (st || r[0])) r = r + 1;
    return {s, r[30:0]};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b, logic sub);
    logic [31:0] bb;
    real v;
    bb = {b[31] ^ sub, b[30:0]};
    if (isnan(a) || isnan(bb)) return QNAN;
    if (isinf(a) && isinf(bb)) return (a[31] == bb[31]) ? a : QNAN;
    if (isinf(a)) return a;
    if (isinf(bb)) return bb;
    v = f2r(a) + f2r(bb);
    if (v == 0.0) return {a[31] & bb[31], 31'd0};
    return r2f(v);
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    logic s;
    s = a[31] ^ b[31];
    if (isnan(a) || isnan(b)) return QNAN;
    if ((isinf(a) && iszero(b)) || (iszero(a) && isinf(b))) return QNAN;
    if (isinf(a) || isinf(b)) return {s, 8'hFF, 23'd0};
    if (iszero(a) || iszero(b)) return {s, 31'd0};
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_div(logic [31:0] a, logic [31:0] b);
    logic s;
    s = a[31] ^ b[31];
    if (isnan(a) || isnan(b)) return QNAN;
    if ((iszero(a) && iszero(b)) || (isinf(a) && isinf(b))) return QNAN;
    if (isinf(a) || iszero(b)) return {s, 8'hFF, 23'd0};
    if (iszero(a) || isinf(b)) return {s, 31'd0};
    return r2f(f2r(a) / f2r(b));
  endfunction

  function automatic logic [31:0] ref_sqrt(logic [31:0] a);
    if (iszero(a)) return a;
    if (isnan(a) || a[31]) return QNAN;
    if (isinf(a)) return a;
    return r2f($sqrt(f2r(a)));
  endfunction

  function automatic logic [31:0] ref_i2f(logic [31:0] a, logic uns);
    real v;
    v = uns ? real'(a) : real'($signed(a));   // exact in double
    return r2f(v);
  endfunction

  function automatic logic [31:0] ref_f2i(logic [31:0] a, logic uns);
    real v;
    if (isnan(a)) return uns ? 32'hFFFF_FFFF : 32'h7FFF_FFFF;
    v = f2r(a);
    if (isinf(a)) v = a[31] ? -1.0e40 : 1.0e40;
    if (uns) begin
      if (v <= -1.0) return 0;
      if (v >= 4294967296.0) return 32'hFFFF_FFFF;
      if (v < 1.0) return 0;
      return 32'(longint'($floor(v)));
    end
    if (v >= 2147483648.0) return 32'h7FFF_FFFF;
    if (v <= -2147483649.0) return 32'h8000_0000;
    if (v >= 0.0) return 32'(longint'($floor(v)));
    return 32'(-longint'($floor(-v)));
  endfunction

  // 0: LE, 1: LT, 2: EQ
  function automatic logic [31:0] ref_cmp(logic [31:0] a, logic [31:0] b, int op);
    real x, y;
    if (isnan(a) || isnan(b)) return 0;
    x = f2r(a);
    y = f2r(b);
    if (isinf(a)) x = a[31] ? -1.0e300 : 1.0e300;
    if (isinf(b)) y = b[31] ? -1.0e300 : 1.0e300;
    case (op)
      0: return {31'd0, x <= y};
      1: return {31'd0, x < y};
      default: return {31'd0, x == y};
    endcase
  endfunction

  // Random binary32 operand: uniform bits, subnormals, zeros, infinities,
  // NaNs, or values near a given exponent (to provoke cancellation).
  function automatic logic [31:0] rnd_f32(logic [7:0] near_exp);
    int unsigned k;
    logic [31:0] r;
    k = $urandom_range(0, 19);
    r = $urandom;
    case (k)
      0: return {r[31], 31'd0};
      1: return {r[31], 8'hFF, 23'd0};
      2: return {r[31], 8'hFF, 1'b1, r[21:0]};
      3, 4: return {r[31], 8'd0, r[22:0]};
      5, 6, 7, 8, 9: return {r[31], near_exp + 8'(r[24:23]) - 8'd1, r[22:0]};
      10: return {r[31], 8'd1, r[22:0]};
      11: return {r[31], 8'd254, r[22:0]};
      default: return (r[30:23] == 8'hFF) ? {r[31], 8'd128, r[22:0]} : r;
    endcase
  endfunction

endpackage
