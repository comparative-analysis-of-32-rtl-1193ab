// cifm_mul12: 12x12 unsigned multiplication module of the CIFM multiplier.
//
// Both operands are cut into three 4-bit digits and the nine digit products a_i*b_j are made
// by nine parallel 4x4 CIFM multipliers. For each digit b_j the products a_0*b_j and a_2*b_j
// do not overlap and are simply concatenated; a_1*b_j is added at weight 4, giving a 16-bit
// row. The three rows are then added at weights 0, 4 and 8. All additions use carry look
// ahead adders when USE_CLA is 1 and ripple carry adders otherwise.
//
// en is the checker's control signal: when it is 0 the operands are held at zero before the
// 4x4 multipliers (operand isolation) and the product is 0. The division into 4x4 blocks
// follows the CIFM description; the order of the additions is this design's choice.
// Purely combinational.
module cifm_mul12 #(
  parameter bit USE_CLA = 1'b1
) (
  input  logic        en,
  input  logic [11:0] a,
  input  logic [11:0] b,
  output logic [23:0] p
);
  logic [11:0] ag, bg;
  assign ag = en ? a : '0;
  assign bg = en ? b : '0;

  logic [7:0] d [3][3];  // d[j][i] = a_i * b_j
  for (genvar j = 0; j < 3; j++) begin : g_row
    for (genvar i = 0; i < 3; i++) begin : g_col
      cifm_mul4 u_m4 (.x(ag[4*i +: 4]), .y(bg[4*j +: 4]), .p(d[j][i]));
    end
  end

  // row j = d[j][0] + d[j][1]<<4 + d[j][2]<<8, 16 bits
  logic [15:0] row [3];
  for (genvar j = 0; j < 3; j++) begin : g_sum
    logic [11:0] hi;
    logic        co;
    cifm_add #(.W(12), .USE_CLA(USE_CLA)) u_add (
      .a({d[j][2], d[j][0][7:4]}), .b({4'b0, d[j][1]}), .cin(1'b0), .s(hi), .cout(co));
    assign row[j] = {hi, d[j][0][3:0]};
    // co is always 0: a 12x4 product fits in 16 bits
  end

  // total = row0 + row1<<4 + row2<<8
  logic [15:0] t;       // bits 19:4 of row0 + row1<<4
  logic        t_co;
  cifm_add #(.W(16), .USE_CLA(USE_CLA)) u_add1 (
    .a({4'b0, row[0][15:4]}), .b(row[1]), .cin(1'b0), .s(t), .cout(t_co));
  logic [15:0] u;       // bits 23:8
  logic        u_co;
  cifm_add #(.W(16), .USE_CLA(USE_CLA)) u_add2 (
    .a({4'b0, t[15:4]}), .b(row[2]), .cin(1'b0), .s(u), .cout(u_co));

  assign p = {u, t[3:0], row[0][3:0]};
endmodule
