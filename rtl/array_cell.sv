// array_cell: the typical cell of the array multiplier.
//
// An AND gate forms the partial-product bit m_j & q_i; a full adder adds it to the incoming
// partial-product bit PP(i) and the carry from the cell on the right, giving the outgoing
// partial-product bit PP(i+1) and a carry to the cell on the left. Purely combinational.
module array_cell (
  input  logic m,       // multiplicand bit m_j
  input  logic q,       // multiplier bit q_i
  input  logic pp_in,   // bit of incoming partial product
  input  logic cin,
  output logic pp_out,  // bit of outgoing partial product
  output logic cout
);
  full_adder u_fa (.a(m & q), .b(pp_in), .ci(cin), .s(pp_out), .co(cout));
endmodule
