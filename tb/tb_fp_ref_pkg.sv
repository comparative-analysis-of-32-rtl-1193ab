// tb_fp_ref_pkg: behavioural reference model for the testbenches.
//
// Single-precision multiply and add/subtract with truncation (the adder also truncates the
// aligned smaller operand), flush of zero/subnormal
// inputs to zero, overflow to infinity, underflow to zero and the quiet NaN 0x7FC00000,
// written with plain integer arithmetic ('*', '+', wide shifts) and independently of the RTL
// structure. Also random operand generators that favour close exponents and special values.
package tb_fp_ref_pkg;

  function automatic logic [31:0] pack(logic s, int e, logic [22:0] f);
    if (e >= 255) return {s, 8'hFF, 23'h0};
    if (e <= 0)   return {s, 31'h0};
    return {s, 8'(e), f};
  endfunction

  function automatic logic isnan(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction
  function automatic logic isinf(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] == 0;
  endfunction
  function automatic logic iszero(logic [31:0] x);
    return x[30:23] == 8'h00;
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    logic s;
    logic [47:0] m;
    int e;
    s = a[31] ^ b[31];
    if (isnan(a) || isnan(b) || (isinf(a) && iszero(b)) || (isinf(b) && iszero(a)))
      return 32'h7FC00000;
    if (isinf(a) || isinf(b)) return {s, 8'hFF, 23'h0};
    if (iszero(a) || iszero(b)) return {s, 31'h0};
    m = 48'({1'b1, a[22:0]}) * 48'({1'b1, b[22:0]});
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (m[47]) return pack(s, e + 1, m[46:24]);
    return pack(s, e, m[45:23]);
  endfunction

  // sum of the larger operand and the truncated aligned smaller one in a 64-bit frame,
  // then truncation of the result
  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    logic sa, sb, sl;
    int ea, eb, el, d, msb;
    logic [63:0] ma, mb, ml, ms, r;
    if (isnan(a) || isnan(b)) return 32'h7FC00000;
    if (isinf(a) && isinf(b)) return (a[31] == b[31]) ? a : 32'h7FC00000;
    if (isinf(a)) return a;
    if (isinf(b)) return b;
    sa = a[31]; sb = b[31];
    ea = int'(a[30:23]); eb = int'(b[30:23]);
    ma = iszero(a) ? 64'd0 : 64'({1'b1, a[22:0]});
    mb = iszero(b) ? 64'd0 : 64'({1'b1, b[22:0]});
    if (ma == 0) ea = 0;
    if (mb == 0) eb = 0;
    if (ea > eb || (ea == eb && ma >= mb)) begin
      sl = sa; el = ea; d = ea - eb; ml = ma; ms = mb;
    end else begin
      sl = sb; el = eb; d = eb - ea; ml = mb; ms = ma;
    end
    // the smaller mantissa is truncated to the larger one's 24-bit grid before the sum
    ml = ml << 36;
    ms = (d >= 24) ? 64'd0 : (ms >> d) << 36;
    r = (sa == sb) ? ml + ms : ml - ms;
    if (r == 0) return 32'h0;
    msb = 63;
    while (!r[msb]) msb--;
    // value = r * 2^(el - 127 - 23 - 36); leading one at msb
    return pack(sl, el + (msb - 59), 23'((r << (63 - msb)) >> 40));
  endfunction

  function automatic logic [31:0] rand_fp(int unsigned base_exp, int spread);
    logic [31:0] x;
    int e;
    int unsigned r;
    r = $urandom_range(99);
    x = $urandom;
    if (r < 3)       x[30:0] = 31'h0;                       // zero
    else if (r < 5)  x[30:23] = 8'hFF;                      // inf / NaN
    else if (r < 8)  x[30:23] = 8'(1 + $urandom_range(4));  // near underflow
    else if (r < 11) x[30:23] = 8'(250 + $urandom_range(4));// near overflow
    else if (r < 60) begin
      e = int'(base_exp) + $urandom_range(2 * spread) - spread;
      if (e < 1) e = 1;
      if (e > 254) e = 254;
      x[30:23] = 8'(e);
    end
    return x;
  endfunction

endpackage
