// wallace_mult: unsigned N x N Wallace-tree multiplier. The N AND-gate
// partial products (2N bits each, already shifted to their columns) are
// reduced by levels of 3:2 carry-save adder rows: each level takes the rows
// in threes, turns every three into a sum and a carry row and passes the one
// or two rows left over, until two rows remain (32 rows need 8 levels). A
// 2N-bit carry look-ahead adder adds the last two rows. Combinational.
// Reduction with 3:2 counters follows the Wallace scheme described; the exact
// grouping of rows at each level and the CLA at the end are this design's own choice.
module wallace_mult #(
  parameter int N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] prod
);
  localparam int W = 2 * N;

  function automatic int rows_after(int r);
    return 2 * (r / 3) + (r % 3);
  endfunction
  function automatic int rows_at(int lvl);
    int r = N;
    for (int i = 0; i < lvl; i++) r = rows_after(r);
    return r;
  endfunction
  function automatic int num_levels();
    int l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction
  localparam int LV = num_levels();

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    localparam int NR = rows_at(l);
    logic [W-1:0] r [NR];
    if (l == 0) begin : g_pp
      for (genvar k = 0; k < N; k++) begin : g_and
        assign r[k] = W'(a & {N{b[k]}}) << k;
      end
    end else begin : g_csa
      localparam int PR = rows_at(l - 1);
      for (genvar k = 0; k < PR / 3; k++) begin : g_row
        csa_row #(.W(W)) u_csa (
          .x0(g_lvl[l-1].r[3*k]), .x1(g_lvl[l-1].r[3*k+1]), .x2(g_lvl[l-1].r[3*k+2]),
          .sum_row(r[2*k]), .carry_row(r[2*k+1])
        );
      end
      for (genvar k = 0; k < PR % 3; k++) begin : g_pass
        assign r[2*(PR/3) + k] = g_lvl[l-1].r[3*(PR/3) + k];
      end
    end
  end

  logic unused_cout;
  cla_adder #(.WIDTH(W)) u_cla (.a(g_lvl[LV].r[0]), .b(g_lvl[LV].r[1]), .cin(1'b0), .sum(prod), .cout(unused_cout));
endmodule
