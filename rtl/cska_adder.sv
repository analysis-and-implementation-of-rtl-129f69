// cska_adder: carry skip (carry bypass) adder. The WIDTH bits are split into
// WIDTH/GROUP groups; each group is a GROUP-bit ripple carry adder, an AND of
// its bit propagates (p = a ^ b) and a 2-to-1 mux. When every propagate of a
// group is 1 the group carry-in is passed straight to the group carry-out,
// otherwise the ripple adder's own carry-out is taken. 32 bits in groups of 4
// follow the described implementation. Combinational.
// The mux-based skip and the ripple groups follow the description.
module cska_adder #(
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
  logic [NG:0] gc;     // group carries
  assign gc[0] = cin;
  for (genvar k = 0; k < NG; k++) begin : g_grp
    logic rc;          // ripple carry-out of this group
    logic gprop;       // group propagate
    rca_adder #(.WIDTH(GROUP)) u_rca (
      .a(a[k*GROUP +: GROUP]), .b(b[k*GROUP +: GROUP]), .cin(gc[k]),
      .sum(sum[k*GROUP +: GROUP]), .cout(rc)
    );
    assign gprop   = &(a[k*GROUP +: GROUP] ^ b[k*GROUP +: GROUP]);
    assign gc[k+1] = gprop ? gc[k] : rc;
  end
  assign cout = gc[NG];
  initial assert (WIDTH % GROUP == 0) else $error("WIDTH must be a multiple of GROUP");
endmodule
