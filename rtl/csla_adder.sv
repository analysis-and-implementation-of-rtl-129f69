// csla_adder: linear carry select adder. The first GROUP-bit section is a
// plain ripple carry adder fed by cin. Every further section holds two
// GROUP-bit ripple adders, one with carry-in 0 and one with carry-in 1, that
// work in parallel; the carry out of the section below then selects, through a
// (GROUP+1)-bit 2-to-1 mux, the sum bits and carry of one of them.
// 32 bits in 4-bit sections follow the described implementation. Combinational.
// 4-bit sections follow the described 32-bit implementation; the linear
// (equal-size) section layout is this design's own choice.
module csla_adder #(
  parameter int WIDTH = 32,
  parameter int GROUP = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NG = WIDTH / GROUP;
  logic [NG:0] sc;     // section carries
  rca_adder #(.WIDTH(GROUP)) u_first (
    .a(a[GROUP-1:0]), .b(b[GROUP-1:0]), .cin(cin), .sum(sum[GROUP-1:0]), .cout(sc[1])
  );
  assign sc[0] = cin;
  for (genvar k = 1; k < NG; k++) begin : g_sec
    logic [GROUP-1:0] s0, s1;
    logic             c0, c1;
    rca_adder #(.WIDTH(GROUP)) u_rca0 (
      .a(a[k*GROUP +: GROUP]), .b(b[k*GROUP +: GROUP]), .cin(1'b0), .sum(s0), .cout(c0)
    );
    rca_adder #(.WIDTH(GROUP)) u_rca1 (
      .a(a[k*GROUP +: GROUP]), .b(b[k*GROUP +: GROUP]), .cin(1'b1), .sum(s1), .cout(c1)
    );
    assign {sc[k+1], sum[k*GROUP +: GROUP]} = sc[k] ? {c1, s1} : {c0, s0};
  end
  assign cout = sc[NG];
  initial assert (WIDTH % GROUP == 0 && NG >= 1) else $error("WIDTH must be a multiple of GROUP");
endmodule
