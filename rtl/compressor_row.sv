// compressor_row: a W-bit row of 4:2 compressors that reduces four W-bit
// operands to a sum row and a carry row with the same total modulo 2^W.
// The lateral carry of column j feeds the carry-in of column j+1 (column 0
// gets 0); the carry output of column j lands in column j+1 of carry_row.
// Combinational.
// The lateral carry chain follows the usual arrangement; the top column's
// lateral carry-out is dropped because results are taken modulo 2^W.
module compressor_row #(
  parameter int W = 64
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);
  logic [W:0] lat;     // lateral carries between columns
  logic [W:0] cy;      // carry outputs, weight j+1
  assign lat[0] = 1'b0;
  assign cy[0]  = 1'b0;
  for (genvar j = 0; j < W; j++) begin : g_col
    compressor_4_2 u_c (
      .in1(x0[j]), .in2(x1[j]), .in3(x2[j]), .in4(x3[j]), .cin(lat[j]),
      .sum(sum_row[j]), .carry(cy[j+1]), .cout(lat[j+1])
    );
  end
  assign carry_row = cy[W-1:0];
endmodule
