// complex_fp_mul: single-precision complex multiplier, (ar + j ai) * (br + j bi) = pr + j pi.
//
//   pr = ar*br - ai*bi      pi = ar*bi + ai*br
//
// Four 32-bit floating-point real multipliers work in parallel on the pairs (ar, bi),
// (ai, br), (ar, br) and (ai, bi). A floating-point adder sums the first two products into pi
// and a floating-point subtractor takes the fourth from the third into pr. Each real
// multiplier uses the 24x24 mantissa multiplier chosen by MULT; the default, the combined
// integer/floating-point (CIFM) multiplier with carry look ahead adders, is the fastest of the
// four styles. All operands and results use the IEEE-754 single layout; multiplier and adder
// truncate (round toward zero). The unit is purely combinational: results follow the inputs
// after the combinational delay, with no clock and no handshake.
module complex_fp_mul
  import fp32_pkg::*;
#(
  parameter mult_kind_e MULT = MULT_CIFM_CLA
) (
  input  fp32_t ar,
  input  fp32_t ai,
  input  fp32_t br,
  input  fp32_t bi,
  output fp32_t pr,
  output fp32_t pi
);
  fp32_t ar_bi, ai_br, ar_br, ai_bi;

  fp_mul #(.MULT(MULT)) u_mul_ar_bi (.a(ar), .b(bi), .p(ar_bi));
  fp_mul #(.MULT(MULT)) u_mul_ai_br (.a(ai), .b(br), .p(ai_br));
  fp_mul #(.MULT(MULT)) u_mul_ar_br (.a(ar), .b(br), .p(ar_br));
  fp_mul #(.MULT(MULT)) u_mul_ai_bi (.a(ai), .b(bi), .p(ai_bi));

  fp_addsub u_adder      (.a(ar_bi), .b(ai_br), .sub(1'b0), .y(pi));
  fp_addsub u_subtractor (.a(ar_br), .b(ai_bi), .sub(1'b1), .y(pr));
endmodule
