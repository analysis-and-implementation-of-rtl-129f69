// rca_adder: WIDTH-bit ripple carry adder, a chain of full adders in which the
// carry-out of each cell is the carry-in of the next. Delay grows linearly
// with WIDTH. Combinational: sum and cout follow a, b, cin.
// A chain of full adders, as described.
module rca_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule
