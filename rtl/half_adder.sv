// half_adder: one-bit half adder, s = a xor b, c = a and b. Purely combinational.
// Used by the 4x4 CIFM multiplier and the 2x2 Vedic multiplier.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
