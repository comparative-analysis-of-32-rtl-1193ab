// vedic_mul4: 4x4 unsigned Vedic multiplier, s = a * b (8 bits).
//
// Four 2x2 Vedic multipliers form B0A0, B0A1, B1A0 and B1A1 from the 2-bit halves of the
// operands, and three 4-bit ripple carry adders (vedic_combine) add them with the right
// weights, as in the published 4x4 Vedic module. Purely combinational.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] s
);
  logic [3:0] b0a0, b0a1, b1a0, b1a1;
  vedic_mul2 u_b0a0 (.a(a[1:0]), .b(b[1:0]), .s(b0a0));
  vedic_mul2 u_b0a1 (.a(a[3:2]), .b(b[1:0]), .s(b0a1));
  vedic_mul2 u_b1a0 (.a(a[1:0]), .b(b[3:2]), .s(b1a0));
  vedic_mul2 u_b1a1 (.a(a[3:2]), .b(b[3:2]), .s(b1a1));
  vedic_combine #(.N(4)) u_comb (.b0a0(b0a0), .b0a1(b0a1), .b1a0(b1a0), .b1a1(b1a1), .s(s));
endmodule
