// mant_mul24: the 24x24 "real multiplier" of the floating-point multiplier, p = a * b.
//
// Instantiates one of the four unsigned multiplier styles, chosen by MULT:
// MULT_VEDIC (nine 8x8 Vedic blocks), MULT_ARRAY (24x24 cell array), MULT_CIFM (CIFM with
// ripple carry adders) or MULT_CIFM_CLA (CIFM with carry look ahead adders, the default and
// fastest). All four give the same exact 48-bit product; they differ in delay and power.
// Making the style a parameter is this design's choice. Purely combinational.
module mant_mul24
  import fp32_pkg::*;
#(
  parameter mult_kind_e MULT = MULT_CIFM_CLA
) (
  input  logic [23:0] a,
  input  logic [23:0] b,
  output logic [47:0] p
);
  if (MULT == MULT_VEDIC) begin : g_vedic
    vedic_mul24 u_mul (.a(a), .b(b), .s(p));
  end else if (MULT == MULT_ARRAY) begin : g_array
    array_mul #(.N(24)) u_mul (.m(a), .q(b), .p(p));
  end else if (MULT == MULT_CIFM) begin : g_cifm
    cifm_mul24 #(.USE_CLA(1'b0)) u_mul (.a(a), .b(b), .p(p));
  end else begin : g_cifm_cla
    cifm_mul24 #(.USE_CLA(1'b1)) u_mul (.a(a), .b(b), .p(p));
  end
endmodule
