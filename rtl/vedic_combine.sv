// vedic_combine: adder stage that builds an NxN Vedic product from the four N/2 x N/2
// products of the operand halves (A = {A1, A0}, B = {B1, B0}).
//
// Three N-bit ripple carry adders:
//   RCA1 = B0A1 + B1A0                           carry c1
//   RCA2 = RCA1 + {0, upper half of B0A0}        carry c2; its lower half is s[N-1:N/2]
//   RCA3 = B1A1 + {0, c1|c2, upper half of RCA2} gives s[2N-1:N]
// and s[N/2-1:0] is the lower half of B0A0. c1 and c2 have the same weight and can never both
// be 1, so one OR merges them; this merge is this design's (the published 4x4 diagram shows
// c1 entering the third adder). Purely combinational.
module vedic_combine #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   b0a0,
  input  logic [N-1:0]   b0a1,
  input  logic [N-1:0]   b1a0,
  input  logic [N-1:0]   b1a1,
  output logic [2*N-1:0] s
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] r1, r2, r3, r3b;
  logic         c1, c2, c3;
  rca #(.W(N)) u_rca1 (.a(b0a1), .b(b1a0), .cin(1'b0), .s(r1), .cout(c1));
  rca #(.W(N)) u_rca2 (.a(r1), .b({{H{1'b0}}, b0a0[N-1:H]}), .cin(1'b0), .s(r2), .cout(c2));
  assign r3b = {{(H-1){1'b0}}, c1 | c2, r2[N-1:H]};
  rca #(.W(N)) u_rca3 (.a(b1a1), .b(r3b), .cin(1'b0), .s(r3), .cout(c3));
  // c3 is always 0: the product fits in 2N bits
  assign s = {r3, r2[H-1:0], b0a0[H-1:0]};
endmodule
