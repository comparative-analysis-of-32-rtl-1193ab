// cifm_mul24: 24x24 unsigned CIFM multiplier, p = a * b (48 bits).
//
// The operands are split into 12-bit halves AH, AL, BH, BL. Four 12x12 CIFM modules form
// AH*BH, AL*BH, AH*BL and AL*BL in parallel. P0-P11 are the low half of AL*BL. ADDER 2 adds
// the middle terms, {AH*BH[11:0], AL*BL[23:12]} + AL*BH + AH*BL, as two 24-bit additions and
// gives P12-P35; its two carries go to ADDER 1, which adds them to AH*BH[23:12] and gives
// P36-P47. Two checkers watch AH and BH: a zero half switches off the 12x12 modules that
// multiply by it. With USE_CLA = 1 every adder is a carry look ahead adder (the fastest
// configuration); with 0 they are ripple carry adders.
//
// The split, the four modules, the two adders and the output bit ranges follow the published
// 24x24 CIFM diagram; the checkers' zero test and the exact adder wiring are this design's.
// Purely combinational.
module cifm_mul24 #(
  parameter bit USE_CLA = 1'b1
) (
  input  logic [23:0] a,
  input  logic [23:0] b,
  output logic [47:0] p
);
  logic [11:0] ah, al, bh, bl;
  assign {ah, al} = a;
  assign {bh, bl} = b;

  logic ah_nz, bh_nz;
  cifm_checker #(.W(12)) u_chk_a (.x(ah), .en(ah_nz));
  cifm_checker #(.W(12)) u_chk_b (.x(bh), .en(bh_nz));

  logic [23:0] hh, lh, hl, ll;   // hh = AH*BH, lh = AL*BH, hl = AH*BL, ll = AL*BL
  cifm_mul12 #(.USE_CLA(USE_CLA)) u_hh (.en(ah_nz & bh_nz), .a(ah), .b(bh), .p(hh));
  cifm_mul12 #(.USE_CLA(USE_CLA)) u_lh (.en(bh_nz),         .a(al), .b(bh), .p(lh));
  cifm_mul12 #(.USE_CLA(USE_CLA)) u_hl (.en(ah_nz),         .a(ah), .b(bl), .p(hl));
  cifm_mul12 #(.USE_CLA(USE_CLA)) u_ll (.en(1'b1),          .a(al), .b(bl), .p(ll));

  // ADDER 2: P35..P12
  logic [23:0] m1, m2;
  logic        c1, c2;
  cifm_add #(.W(24), .USE_CLA(USE_CLA)) u_adder2a (
    .a({hh[11:0], ll[23:12]}), .b(lh), .cin(1'b0), .s(m1), .cout(c1));
  cifm_add #(.W(24), .USE_CLA(USE_CLA)) u_adder2b (
    .a(m1), .b(hl), .cin(1'b0), .s(m2), .cout(c2));

  // ADDER 1: P47..P36
  logic [11:0] top;
  logic        top_co;  // always 0: the product fits in 48 bits
  cifm_add #(.W(12), .USE_CLA(USE_CLA)) u_adder1 (
    .a(hh[23:12]), .b({11'b0, c1}), .cin(c2), .s(top), .cout(top_co));

  assign p = {top, m2, ll[11:0]};
endmodule
