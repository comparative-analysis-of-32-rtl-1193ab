// full_adder: one-bit full adder, s = a xor b xor ci, co = majority(a, b, ci).
// Purely combinational. Building block of the ripple carry adders and array cells.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule
