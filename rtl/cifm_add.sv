// cifm_add: the adder used inside the CIFM multiplier, either a carry look ahead adder
// (USE_CLA = 1) or a ripple carry adder (USE_CLA = 0). Same ports as both:
// {cout, s} = a + b + cin, combinational.
module cifm_add #(
  parameter int unsigned W       = 24,
  parameter bit          USE_CLA = 1'b1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  if (USE_CLA) begin : g_cla
    cla_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  end else begin : g_rca
    rca #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  end
endmodule
