// cla_adder: W-bit carry look ahead adder.
//
// Each bit forms generate g = a&b and propagate p = a^b. Bits are grouped by four; inside a
// group every carry is computed directly from the group's g, p and carry-in (two gate levels)
// instead of rippling. Each group also forms a group generate G and propagate P, and the
// carry into the next group is G | P & c, so only one step per four bits remains in series.
// W need not be a multiple of 4 (the top group is shorter). Combinational:
// {cout, s} = a + b + cin. The grouping by four is this design's choice.
module cla_adder #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NG = (W + 3) / 4;

  logic [4*NG-1:0] g, p, c;
  logic [NG:0]     gc;   // carry into each group

  assign g = {{(4*NG-W){1'b0}}, a & b};
  assign p = {{(4*NG-W){1'b0}}, a ^ b};
  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    logic [3:0] gg, pp;
    assign gg = g[4*k +: 4];
    assign pp = p[4*k +: 4];
    // look-ahead carries inside the group
    assign c[4*k]   = gc[k];
    assign c[4*k+1] = gg[0] | (pp[0] & gc[k]);
    assign c[4*k+2] = gg[1] | (pp[1] & gg[0]) | (pp[1] & pp[0] & gc[k]);
    assign c[4*k+3] = gg[2] | (pp[2] & gg[1]) | (pp[2] & pp[1] & gg[0])
                    | (pp[2] & pp[1] & pp[0] & gc[k]);
    // group generate / propagate
    logic G, Pg;
    assign G  = gg[3] | (pp[3] & gg[2]) | (pp[3] & pp[2] & gg[1]) | (pp[3] & pp[2] & pp[1] & gg[0]);
    assign Pg = &pp;
    assign gc[k+1] = G | (Pg & gc[k]);
  end

  assign s = p[W-1:0] ^ c[W-1:0];
  // carry out of bit W-1 (the padding bits above W have g = p = 0)
  if (W % 4 == 0) begin : g_full
    assign cout = gc[NG];
  end else begin : g_part
    assign cout = c[W];
  end
endmodule
