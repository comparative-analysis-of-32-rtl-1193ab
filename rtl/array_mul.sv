// array_mul: NxN unsigned array multiplier, p = m * q (2N bits).
//
// A grid of N rows of N array cells. Row i adds the multiplicand ANDed with multiplier bit
// q_i to the partial product left by row i-1, shifted down one place (the shift-and-add of
// pencil-and-paper multiplication). Inside a row the carries ripple from right to left, and
// the row's last carry becomes the top bit of its partial product. The lowest sum bit of row
// i is product bit i; the last row gives the upper N bits. Row 0 has a zero incoming partial
// product. The delay grows with about 2N cell delays. Purely combinational.
module array_mul #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0]   m,
  input  logic [N-1:0]   q,
  output logic [2*N-1:0] p
);
  logic [N-1:0] ppo [N];   // outgoing partial product of each row
  logic [N:0]   cy  [N];   // carry chain of each row, cy[i][0] = 0

  for (genvar i = 0; i < N; i++) begin : g_row
    logic [N-1:0] ppi;
    if (i == 0) begin : g_first
      assign ppi = '0;
    end else begin : g_next
      assign ppi = {cy[i-1][N], ppo[i-1][N-1:1]};
    end
    assign cy[i][0] = 1'b0;
    for (genvar j = 0; j < N; j++) begin : g_cell
      array_cell u_cell (.m(m[j]), .q(q[i]), .pp_in(ppi[j]), .cin(cy[i][j]),
                         .pp_out(ppo[i][j]), .cout(cy[i][j+1]));
    end
    assign p[i] = ppo[i][0];
  end

  assign p[2*N-1:N] = {cy[N-1][N], ppo[N-1][N-1:1]};
endmodule
