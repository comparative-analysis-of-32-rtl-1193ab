// rca: W-bit ripple carry adder.
//
// A chain of W full adders; bit i's carry-out is bit i+1's carry-in, so the delay grows
// linearly with W. It is the adder of the exponent path of the real multiplier (8 bits) and
// of the Vedic multipliers (4, 8, 16 bits and the wider final additions), and of the CIFM
// multiplier when it is built without carry look ahead. Combinational:
// {cout, s} = a + b + cin.
module rca #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign cout = c[W];
endmodule
