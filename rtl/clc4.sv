// clc4: 4-bit carry look-ahead logic. From four generate/propagate pairs and
// a carry-in it forms the three internal carries
//   c1 = g0 + p0 c0, c2 = g1 + p1 c1, c3 = g2 + p2 c2 (expanded to two levels)
// and the group generate/propagate of the four positions:
//   G = g3 + p3 g2 + p3 p2 g1 + p3 p2 p1 g0,  P = p3 p2 p1 p0.
// The same cell is used at every level of the hierarchical CLA. Combinational.
// Group generate and propagate use the standard look-ahead equations.
module clc4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       c0,
  output logic [3:1] c,
  output logic       gg,
  output logic       gp
);
  assign c[1] = g[0] | (p[0] & c0);
  assign c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
  assign c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
  assign gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  assign gp   = &p;
endmodule
