// fp_mul: 32-bit floating-point real multiplier, p = a * b (IEEE-754 single layout).
//
// The three fields are handled separately, as in the classic single-precision multiplier:
//   sign     : sign(a) XOR sign(b);
//   exponent : an 8-bit ripple carry adder adds the two biased exponents (its carry-out is the
//              ninth bit), then the bias 127 is taken off once so the result is biased again;
//   mantissa : the two 24-bit mantissas (hidden 1 prepended) go through the 24x24 real
//              multiplier (style chosen by MULT); the 48-bit product lies in [1, 4), so when
//              bit 47 is set it is shifted right by one and the exponent is incremented, and the
//              23 bits below the leading 1 are the fraction.
// Bits below the fraction are dropped (rounding toward zero). The exponent is kept 10 bits
// wide and signed after the bias is removed, so overflow (>= 255) gives infinity and
// underflow (<= 0) gives zero. Exponent-0 inputs count as zero (subnormals are flushed). A NaN
// input or 0 * infinity gives the quiet NaN; otherwise an infinite input gives infinity.
// The field handling and the truncation follow the reference design; the special-value
// handling is this design's. Purely combinational.
module fp_mul
  import fp32_pkg::*;
#(
  parameter mult_kind_e MULT = MULT_CIFM_CLA
) (
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);
  logic za, zb, ia, ib, na, nb;
  assign za = is_zero(a);
  assign zb = is_zero(b);
  assign ia = is_inf(a);
  assign ib = is_inf(b);
  assign na = is_nan(a);
  assign nb = is_nan(b);

  // sign
  logic sign;
  assign sign = a.sign ^ b.sign;

  // exponent: 8-bit ripple adder, then remove one bias
  logic [7:0] esum;
  logic       ecy;
  rca #(.W(8)) u_exp_add (.a(a.exp), .b(b.exp), .cin(1'b0), .s(esum), .cout(ecy));

  // mantissa
  logic [23:0] ma, mb;
  logic [47:0] prod;
  assign ma = {1'b1, a.frac};
  assign mb = {1'b1, b.frac};
  mant_mul24 #(.MULT(MULT)) u_mant (.a(ma), .b(mb), .p(prod));

  logic              norm;    // product in [2, 4)
  logic [FRAC_W-1:0] frac;
  logic signed [9:0] e;
  assign norm = prod[47];
  assign frac = norm ? prod[46:24] : prod[45:23];
  assign e    = $signed({1'b0, ecy, esum}) - $signed(10'(BIAS)) + $signed({9'b0, norm});

  always_comb begin
    p = '{sign: sign, exp: e[7:0], frac: frac};
    if (na || nb || (ia && zb) || (ib && za)) begin
      p = QNAN;
    end else if (ia || ib) begin
      p = '{sign: sign, exp: '1, frac: '0};
    end else if (za || zb) begin
      p = '{sign: sign, exp: '0, frac: '0};
    end else if (e >= 10'sd255) begin
      p = '{sign: sign, exp: '1, frac: '0};
    end else if (e <= 10'sd0) begin
      p = '{sign: sign, exp: '0, frac: '0};
    end
  end
endmodule
