// tree_4to2: binary tree of 4:2 compressor rows. Each level groups the rows
// of the level above in fours and replaces every group by the sum and carry
// rows of one compressor_row, halving the row count. LEVELS levels reduce
// ROWS rows to ROWS >> LEVELS rows with the same total modulo 2^W; the
// default runs the tree down to carry-save form (two rows). For 8 rows this is
// three compressor rows (two, then one), for 16 rows seven (four, two, one).
// LEVELS = 0 passes the rows through, so a pipeline can split the tree.
// ROWS must be a power of two and at least 2 << LEVELS. Combinational.
// The binary tree of 4:2 rows follows the described compressor organisation.
module tree_4to2 #(
  parameter int ROWS   = 16,
  parameter int W      = 64,
  parameter int LEVELS = $clog2(ROWS) - 1
) (
  input  logic [W-1:0] in_rows  [ROWS],
  output logic [W-1:0] out_rows [ROWS >> LEVELS]
);
  // one generate block per level; level l holds ROWS >> l rows
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [W-1:0] r [ROWS >> l];
    if (l == 0) begin : g_in
      for (genvar k = 0; k < ROWS; k++) begin : g_cp
        assign r[k] = in_rows[k];
      end
    end else begin : g_red
      for (genvar k = 0; k < (ROWS >> l) / 2; k++) begin : g_cr
        compressor_row #(.W(W)) u_row (
          .x0(g_lvl[l-1].r[4*k]),   .x1(g_lvl[l-1].r[4*k+1]),
          .x2(g_lvl[l-1].r[4*k+2]), .x3(g_lvl[l-1].r[4*k+3]),
          .sum_row(r[2*k]), .carry_row(r[2*k+1])
        );
      end
    end
  end

  for (genvar k = 0; k < (ROWS >> LEVELS); k++) begin : g_out
    assign out_rows[k] = g_lvl[LEVELS].r[k];
  end
  initial assert ((ROWS & (ROWS - 1)) == 0 && (ROWS >> LEVELS) >= 2)
    else $error("tree_4to2: ROWS must be a power of two reducible to >= 2 rows");
endmodule
