// vedic_mul24: 24x24 unsigned Vedic multiplier, s = a * b (48 bits).
//
// The operands are cut into bytes A0 = a[7:0], A1 = a[15:8], A2 = a[23:16] (and B likewise),
// and nine 8x8 Vedic multipliers form every byte product BjAi, which has weight 8(i+j).
// Three 16-bit ripple carry adders add the crosswise pairs of equal weight, B1A0+B0A1 (w 8),
// B2A0+B0A2 (w 16) and B2A1+B1A2 (w 24), and a fourth adds B1A1 to the weight-16 pair. The
// vertical products B0A0 and B2A2 do not overlap, so {B2A2, 16 zero bits, B0A0} is one
// word; the three column sums are folded into it by 40-, 32- and 24-bit ripple carry adders
// that start at bits 8, 16 and 24. s0 = s[7:0] is B0A0's low byte.
//
// The byte split, the nine 8x8 blocks and the first 16-bit adders follow the published 24x24
// Vedic diagram; the later adders are arranged by this design (the diagram's carry routing
// between its 8- and 16-bit adders is not given). Purely combinational.
module vedic_mul24 (
  input  logic [23:0] a,
  input  logic [23:0] b,
  output logic [47:0] s
);
  logic [15:0] q [3][3];  // q[j][i] = Bj * Ai
  for (genvar j = 0; j < 3; j++) begin : g_b
    for (genvar i = 0; i < 3; i++) begin : g_a
      vedic_mul8 u_vm (.a(a[8*i +: 8]), .b(b[8*j +: 8]), .s(q[j][i]));
    end
  end

  // crosswise pairs
  logic [16:0] t1, t2, t3;
  rca #(.W(16)) u_t1 (.a(q[1][0]), .b(q[0][1]), .cin(1'b0), .s(t1[15:0]), .cout(t1[16]));
  rca #(.W(16)) u_t2 (.a(q[2][0]), .b(q[0][2]), .cin(1'b0), .s(t2[15:0]), .cout(t2[16]));
  rca #(.W(16)) u_t3 (.a(q[2][1]), .b(q[1][2]), .cin(1'b0), .s(t3[15:0]), .cout(t3[16]));
  // weight-16 column: B2A0 + B0A2 + B1A1
  logic [17:0] t2m;
  rca #(.W(17)) u_t2m (.a(t2), .b({1'b0, q[1][1]}), .cin(1'b0), .s(t2m[16:0]), .cout(t2m[17]));

  // vertical products B0A0 and B2A2 do not overlap
  logic [47:0] v;
  assign v = {q[2][2], 16'b0, q[0][0]};

  logic [39:0] sa;  // bits 47:8
  logic [31:0] sb;  // bits 47:16
  logic [23:0] sc;  // bits 47:24
  logic        ca, cb, cc;  // always 0
  rca #(.W(40)) u_sa (.a(v[47:8]),   .b({23'b0, t1}),  .cin(1'b0), .s(sa), .cout(ca));
  rca #(.W(32)) u_sb (.a(sa[39:8]),  .b({14'b0, t2m}), .cin(1'b0), .s(sb), .cout(cb));
  rca #(.W(24)) u_sc (.a(sb[31:8]),  .b({7'b0, t3}),   .cin(1'b0), .s(sc), .cout(cc));

  assign s = {sc, sb[7:0], sa[7:0], q[0][0][7:0]};
endmodule
