// vedic_mul2: 2x2 unsigned Vedic multiplier, s = a * b (4 bits).
//
// Urdhva Tiryagbhyam on two bits: the vertical product a0b0 is s0; a half adder adds the two
// crosswise products a1b0 and a0b1 into s1; a second half adder adds the vertical product
// a1b1 and that carry into s2, its carry is s3. The insides of the 2x2 cell are this
// design's choice. Purely combinational.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] s
);
  logic c0;
  assign s[0] = a[0] & b[0];
  half_adder u_ha0 (.a(a[1] & b[0]), .b(a[0] & b[1]), .s(s[1]), .c(c0));
  half_adder u_ha1 (.a(a[1] & b[1]), .b(c0),          .s(s[2]), .c(s[3]));
endmodule
