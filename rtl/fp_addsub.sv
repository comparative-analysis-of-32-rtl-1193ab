// fp_addsub: 32-bit floating-point adder/subtractor, y = a + b (sub = 0) or a - b (sub = 1).
//
// Subtraction flips the sign of b, then the usual three steps follow:
//   1. compare exponents (the small ALU): the operand of larger magnitude is routed to the
//      big side and the exponent difference d is formed; the other mantissa is shifted right
//      by d, and the bits shifted out are dropped (d >= 24 leaves nothing);
//   2. the big ALU adds the aligned mantissas when the signs agree and subtracts the smaller
//      from the larger when they differ, so the 25-bit result is never negative;
//   3. normalise: a carry into bit 24 shifts right by one and increments the exponent;
//      otherwise the leading zeros are counted and shifted out to the left while the
//      exponent is decremented by the same amount.
// The result takes the larger operand's exponent (before normalisation) and sign. There is
// no rounding step: the result is truncated, and because the aligned operand loses its low
// bits before a subtraction, a difference can come out one unit in the last place above the
// exact round-toward-zero value. This reproduces the published simulation bit for bit. Zero or
// subnormal inputs count as zero; exact cancellation gives +0; an exponent reaching 255 gives
// infinity and one falling to 0 gives zero. NaN inputs and infinity minus infinity give the
// quiet NaN; otherwise an infinite input passes through. Choosing the larger magnitude by
// comparing exponent and mantissa together and the special-value handling are this design's.
// Purely combinational.
module fp_addsub
  import fp32_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);
  fp32_t bs;
  assign bs = '{sign: b.sign ^ sub, exp: b.exp, frac: b.frac};

  logic za, zb, ia, ib, na, nb;
  assign za = is_zero(a);
  assign zb = is_zero(bs);
  assign ia = is_inf(a);
  assign ib = is_inf(bs);
  assign na = is_nan(a);
  assign nb = is_nan(bs);

  logic [MANT_W-1:0] ma, mb;
  assign ma = za ? '0 : {1'b1, a.frac};
  assign mb = zb ? '0 : {1'b1, bs.frac};

  // 1. compare and swap (small ALU)
  logic              swap;
  logic              sl, ss;
  logic [EXP_W-1:0]  el, es, d;
  logic [MANT_W-1:0] ml, ms;
  assign swap  = {a.exp, ma} < {bs.exp, mb};
  assign sl    = swap ? bs.sign : a.sign;
  assign ss    = swap ? a.sign  : bs.sign;
  assign el    = swap ? bs.exp  : a.exp;
  assign es    = swap ? a.exp   : bs.exp;
  assign ml    = swap ? mb : ma;
  assign ms    = swap ? ma : mb;
  assign d     = el - es;

  // alignment: bits shifted out of the smaller mantissa are dropped
  logic [MANT_W-1:0] sm_x;
  assign sm_x = (d >= EXP_W'(MANT_W)) ? '0 : (ms >> d);

  // 2. big ALU
  logic [MANT_W:0] sum;
  assign sum = (sl == ss) ? ({1'b0, ml} + {1'b0, sm_x}) : ({1'b0, ml} - {1'b0, sm_x});

  // 3. normalise
  function automatic logic [4:0] lzc24(logic [MANT_W-1:0] v);
    logic [4:0] n;
    n = 5'(MANT_W);
    for (int i = 0; i < MANT_W; i++) begin
      if (v[i]) n = 5'(MANT_W - 1 - i);
    end
    return n;
  endfunction

  logic [4:0]        lz;
  logic [MANT_W-1:0] mnorm;
  logic signed [9:0] e;
  always_comb begin
    lz = lzc24(sum[MANT_W-1:0]);
    if (sum[MANT_W]) begin
      mnorm = sum[MANT_W:1];
      e     = $signed({2'b0, el}) + 10'sd1;
    end else begin
      mnorm = sum[MANT_W-1:0] << lz;
      e     = $signed({2'b0, el}) - $signed({5'b0, lz});
    end
  end

  always_comb begin
    y = '{sign: sl, exp: e[7:0], frac: mnorm[FRAC_W-1:0]};
    if (na || nb || (ia && ib && (a.sign != bs.sign))) begin
      y = QNAN;
    end else if (ia) begin
      y = '{sign: a.sign, exp: '1, frac: '0};
    end else if (ib) begin
      y = '{sign: bs.sign, exp: '1, frac: '0};
    end else if (sum == '0) begin
      y = '0;
    end else if (e >= 10'sd255) begin
      y = '{sign: sl, exp: '1, frac: '0};
    end else if (e <= 10'sd0) begin
      y = '{sign: sl, exp: '0, frac: '0};
    end
  end
endmodule
