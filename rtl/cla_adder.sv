// cla_adder: hierarchical carry look-ahead adder.
// Level 0 is a row of partial full adders (g, p, sum per bit). Each further
// level groups four generate/propagate pairs of the level below in a clc4
// cell, which returns the group G/P upwards and, once the group carry-in is
// known, the three carries into its upper sub-groups downwards. With
// L = ceil(log4 WIDTH) levels the top cell covers all bits; its G/P and c0
// give the carry out through the output-carry (OC) term cout = G + P c0.
// For WIDTH = 32 this is the structure of eight 4-bit PFA groups, eight
// level-1 CLCs, two level-2 CLCs and one level-3 CLC (which uses two of its
// four inputs); for 64 bits the level-3 cell uses all four. Unused positions
// above WIDTH are tied to g = p = 0. Combinational.
// pfa cells, 4-bit look-ahead units and the output-carry term follow the
// described adder; padding a width that is not a power of 4 with zero inputs is
// this design's own choice.
module cla_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  function automatic int levels4(int w);
    int l = 1, span = 4;
    while (span < w) begin
      span = span * 4;
      l++;
    end
    return l;
  endfunction

  localparam int L  = levels4(WIDTH);
  localparam int PW = 4 ** L;            // padded width

  // g_l[l][j], p_l[l][j]: generate/propagate of node j at level l
  // c_l[l][j]           : carry into node j at level l
  logic [PW-1:0] g_l [0:L];
  logic [PW-1:0] p_l [0:L];
  logic [PW-1:0] c_l [0:L];

  logic [PW-1:0] a_p, b_p;
  assign a_p = PW'(a);
  assign b_p = PW'(b);

  // level 0: partial full adders
  logic [PW-1:0] s_p;
  for (genvar i = 0; i < PW; i++) begin : g_pfa
    pfa u_pfa (.a(a_p[i]), .b(b_p[i]), .cin(c_l[0][i]), .g(g_l[0][i]), .p(p_l[0][i]), .sum(s_p[i]));
  end

  // levels 1..L of carry look-ahead logic
  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int NN = 4 ** (L - l);    // nodes at this level
    for (genvar j = 0; j < NN; j++) begin : g_clc
      clc4 u_clc (
        .g (g_l[l-1][4*j +: 4]),
        .p (p_l[l-1][4*j +: 4]),
        .c0(c_l[l][j]),
        .c (c_l[l-1][4*j+1 +: 3]),
        .gg(g_l[l][j]),
        .gp(p_l[l][j])
      );
      assign c_l[l-1][4*j] = c_l[l][j];
    end
    if (NN < PW) begin : g_unused
      assign g_l[l][PW-1:NN] = '0;
      assign p_l[l][PW-1:NN] = '0;
      if (l < L) begin : g_uc
        assign c_l[l][PW-1:NN] = '0;
      end
    end
  end
  assign c_l[L][0] = cin;
  if (PW > 1) begin : g_topc
    assign c_l[L][PW-1:1] = '0;
  end

  assign sum  = s_p[WIDTH-1:0];
  // output carry (OC) circuit
  if (WIDTH == PW) begin : g_oc_full
    assign cout = g_l[L][0] | (p_l[L][0] & cin);
  end else begin : g_oc_part
    assign cout = c_l[0][WIDTH];
  end
endmodule
