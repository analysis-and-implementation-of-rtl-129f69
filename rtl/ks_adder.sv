// ks_adder: Kogge-Stone parallel prefix adder, in three stages.
// Pre-processing: bit generate g_i = a_i b_i and propagate p_i = a_i ^ b_i;
// the carry-in is merged into position 0 as g_0 = a_0 b_0 + (a_0 ^ b_0) cin.
// Prefix network: log2(WIDTH) levels; at level l every position i >= 2^l
// combines with position i - 2^l by the prefix operator
//   (G, P) o (G', P') = (G + P G', P P'),
// the others pass unchanged. After the last level G_i is the carry into bit
// i+1. Post-processing: s_i = p_i ^ c_i. Combinational.
// The Kogge-Stone prefix structure follows the description; merging the
// carry-in into bit 0's generate is this design's own choice.
module ks_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int LV = $clog2(WIDTH);
  logic [WIDTH-1:0] p, g0;
  assign p  = a ^ b;
  always_comb begin
    g0    = a & b;
    g0[0] = (a[0] & b[0]) | (p[0] & cin);
  end

  // one generate block per prefix level; level l reads level l-1's vectors
  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    logic [WIDTH-1:0] gv, pv;
    if (l == 0) begin : g_pre
      assign gv = g0;
      assign pv = p;
    end else begin : g_net
      localparam int D = 1 << (l - 1);
      for (genvar i = 0; i < WIDTH; i++) begin : g_node
        if (i >= D) begin : g_black
          assign gv[i] = g_lvl[l-1].gv[i] | (g_lvl[l-1].pv[i] & g_lvl[l-1].gv[i-D]);
          assign pv[i] = g_lvl[l-1].pv[i] & g_lvl[l-1].pv[i-D];
        end else begin : g_white
          assign gv[i] = g_lvl[l-1].gv[i];
          assign pv[i] = g_lvl[l-1].pv[i];
        end
      end
    end
  end

  assign sum  = p ^ {g_lvl[LV].gv[WIDTH-2:0], cin};
  assign cout = g_lvl[LV].gv[WIDTH-1];
endmodule
