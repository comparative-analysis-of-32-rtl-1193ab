// vedic_mul8: 8x8 unsigned Vedic multiplier, s = a * b (16 bits).
//
// The 4x4 scheme one level up: four 4x4 Vedic multipliers on the nibbles of the operands and
// three 8-bit ripple carry adders (vedic_combine). Nine of these make the 24x24 Vedic
// multiplier. Using the same structure as the 4x4 module is this design's choice.
// Purely combinational.
module vedic_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] s
);
  logic [7:0] b0a0, b0a1, b1a0, b1a1;
  vedic_mul4 u_b0a0 (.a(a[3:0]), .b(b[3:0]), .s(b0a0));
  vedic_mul4 u_b0a1 (.a(a[7:4]), .b(b[3:0]), .s(b0a1));
  vedic_mul4 u_b1a0 (.a(a[3:0]), .b(b[7:4]), .s(b1a0));
  vedic_mul4 u_b1a1 (.a(a[7:4]), .b(b[7:4]), .s(b1a1));
  vedic_combine #(.N(8)) u_comb (.b0a0(b0a0), .b0a1(b0a1), .b1a0(b1a0), .b1a1(b1a1), .s(s));
endmodule
