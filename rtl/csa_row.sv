// csa_row: a W-bit row of full adders used as a 3:2 carry-save adder.
// Three operands in, a sum row and a carry row (shifted up one column) out,
// with the same total modulo 2^W. Where one operand is zero in a column the
// cell reduces to a half adder. Combinational.
// The top carry is dropped because results are taken modulo 2^W.
module csa_row #(
  parameter int W = 64
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);
  logic [W:0] cy;
  assign cy[0] = 1'b0;
  for (genvar j = 0; j < W; j++) begin : g_col
    full_adder u_fa (.a(x0[j]), .b(x1[j]), .cin(x2[j]), .sum(sum_row[j]), .cout(cy[j+1]));
  end
  assign carry_row = cy[W-1:0];
endmodule
