// booth_wallace_mult: signed N x N modified-Booth Wallace-tree multiplier.
// Stage 1, booth_pp_array: N/2 modified Booth recoders give N/2 rows of
// N+1 bits with the sign extension folded into constants.
// Stage 2, tree_4to2: rows of 4:2 compressors reduce them to a sum and a
// carry row (3 compressor rows for N = 16, 7 for N = 32); a row of half
// adders (a csa_row whose third operand holds only the last row's +1 bit)
// then absorbs the one bit that did not fit in the tree.
// Stage 3, cla_adder: a 2N-bit carry look-ahead adder forms the product.
// Operands are two's complement; prod is the full 2N-bit signed product.
// Purely combinational: prod follows a and b after the adder delay.
// Booth recoders, a 4:2 tree and a CLA follow the described multiplier; the
// separate row for the last +1 bit follows the MAC's treatment of that bit.
module booth_wallace_mult #(
  parameter int N = 32
) (
  input  logic [N-1:0]   a,       // multiplier
  input  logic [N-1:0]   b,       // multiplicand
  output logic [2*N-1:0] prod
);
  localparam int W = 2 * N;
  localparam int K = N / 2;
  logic [W-1:0] rows [K];
  logic [W-1:0] cs   [2];
  logic         neg_last;
  logic [W-1:0] s2, c2, fix;

  booth_pp_array #(.N(N), .W(W)) u_pp (.a(a), .b(b), .rows(rows), .neg_last(neg_last));
  tree_4to2 #(.ROWS(K), .W(W)) u_tree (.in_rows(rows), .out_rows(cs));

  always_comb begin
    fix = '0;
    fix[N-2] = neg_last;
  end
  csa_row #(.W(W)) u_ha (.x0(cs[0]), .x1(cs[1]), .x2(fix), .sum_row(s2), .carry_row(c2));

  logic unused_cout;
  cla_adder #(.WIDTH(W)) u_cla (.a(s2), .b(c2), .cin(1'b0), .sum(prod), .cout(unused_cout));
endmodule
