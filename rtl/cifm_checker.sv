// cifm_checker: operand checker of the 24x24 CIFM multiplier.
//
// Looks at one W-bit operand half and raises en when it holds any 1. The 24x24 multiplier
// uses en as the control signal of the 12x12 modules that multiply by this half: when the
// half is zero their product is known to be zero, so they are switched off and do not toggle.
// The zero test is this design's reading of the checker, whose insides are not published.
// Purely combinational.
module cifm_checker #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] x,
  output logic         en
);
  assign en = |x;
endmodule
