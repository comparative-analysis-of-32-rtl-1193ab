// cifm_mul4: 4x4 unsigned "optimised" multiplier of the CIFM (combined integer and
// floating-point multiplier), p = x * y.
//
// The sixteen partial products XiYj are reduced in three levels of half adders (HA) and full
// adders (FA), grouped in eight blocks. Level 1 works on two-bit slices of adjacent partial-
// product rows in parallel: blocks 1 and 2 add rows Y0 and Y1, blocks 3 and 4 add rows Y2 and
// Y3, and no carry passes between these blocks. Level 2 (block 5: HA+FA+FA, block 6: FA)
// merges the level-1 sums with X0Y2 and the loose carries; level 3 (block 7: HA+HA, block 8:
// FA+FA+HA) resolves the last carries. P0 is X0Y0, P1 comes from block 1, P2 from block 5,
// P3-P4 from block 7 and P5-P7 from block 8.
//
// The block composition and level assignment follow the published 4x4 CIFM diagram; the
// exact carry routing between blocks is this design's, chosen so that the sum is exact.
// Purely combinational.
module cifm_mul4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [7:0] p
);
  // partial products: pp[j][i] = x[i] & y[j]
  logic [3:0] pp [4];
  for (genvar j = 0; j < 4; j++) begin : g_pp
    assign pp[j] = x & {4{y[j]}};
  end

  // ---------------- level 1 ----------------
  // block 1: weight 1 and 2 of rows 0,1
  logic p1, b1_s2, b1_c1, b1_c3;
  half_adder u_b1_ha (.a(pp[0][1]), .b(pp[1][0]), .s(p1),    .c(b1_c1));
  full_adder u_b1_fa (.a(pp[0][2]), .b(pp[1][1]), .ci(b1_c1), .s(b1_s2), .co(b1_c3));
  // block 2: weight 3 and 4 of rows 0,1
  logic b2_s3, b2_s4, b2_c4, b2_c5;
  half_adder u_b2_ha0 (.a(pp[0][3]), .b(pp[1][2]), .s(b2_s3), .c(b2_c4));
  half_adder u_b2_ha1 (.a(pp[1][3]), .b(b2_c4),    .s(b2_s4), .c(b2_c5));
  // block 3: weight 3 and 4 of rows 2,3
  logic b3_s3, b3_s4, b3_c4, b3_c5;
  half_adder u_b3_ha (.a(pp[2][1]), .b(pp[3][0]), .s(b3_s3), .c(b3_c4));
  full_adder u_b3_fa (.a(pp[2][2]), .b(pp[3][1]), .ci(b3_c4), .s(b3_s4), .co(b3_c5));
  // block 4: weight 5 and 6 of rows 2,3
  logic b4_s5, b4_s6, b4_c6, b4_c7;
  half_adder u_b4_ha0 (.a(pp[2][3]), .b(pp[3][2]), .s(b4_s5), .c(b4_c6));
  half_adder u_b4_ha1 (.a(pp[3][3]), .b(b4_c6),    .s(b4_s6), .c(b4_c7));

  // ---------------- level 2 ----------------
  // block 5: weights 2..4
  logic p2, b5_c3, b5_s3, b5_c4, b5_s4, b5_c5;
  half_adder u_b5_ha  (.a(pp[2][0]), .b(b1_s2), .s(p2), .c(b5_c3));
  full_adder u_b5_fa0 (.a(b2_s3), .b(b1_c3), .ci(b5_c3), .s(b5_s3), .co(b5_c4));
  full_adder u_b5_fa1 (.a(b2_s4), .b(b3_s4), .ci(b5_c4), .s(b5_s4), .co(b5_c5));
  // block 6: weight 5
  logic b6_s5, b6_c6;
  full_adder u_b6_fa (.a(b2_c5), .b(b3_c5), .ci(b4_s5), .s(b6_s5), .co(b6_c6));

  // ---------------- level 3 ----------------
  // block 7: weights 3, 4
  logic p3, p4, b7_c4, b7_c5;
  half_adder u_b7_ha0 (.a(b5_s3), .b(b3_s3), .s(p3), .c(b7_c4));
  half_adder u_b7_ha1 (.a(b5_s4), .b(b7_c4), .s(p4), .c(b7_c5));
  // block 8: weights 5..7
  logic p5, p6, p7, b8_c6, b8_c7, b8_c8;
  full_adder u_b8_fa0 (.a(b6_s5), .b(b5_c5), .ci(b7_c5), .s(p5), .co(b8_c6));
  full_adder u_b8_fa1 (.a(b4_s6), .b(b6_c6), .ci(b8_c6), .s(p6), .co(b8_c7));
  half_adder u_b8_ha  (.a(b4_c7), .b(b8_c7), .s(p7), .c(b8_c8));
  // b8_c8 is always 0: a 4x4 product fits in 8 bits.

  assign p = {p7, p6, p5, p4, p3, p2, p1, pp[0][0]};
endmodule
