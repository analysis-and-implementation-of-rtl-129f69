// array_mult: unsigned N x N array multiplier. Partial product r is the
// multiplicand ANDed with multiplier bit r. Row r of the array is an N-bit
// ripple carry adder that adds partial product r to the upper N bits of the
// running sum left by row r-1; its lowest sum bit is product bit r and its
// carry-out becomes the top bit of the next running sum. The carry ripples
// along each row and the partial sum moves down the rows, so the delay grows
// with 2N. Combinational.
// The AND array with ripple rows follows the described array multiplier;
// treating the operands as unsigned is read from its published results.
module array_mult #(
  parameter int N = 32
) (
  input  logic [N-1:0]   a,       // multiplicand
  input  logic [N-1:0]   b,       // multiplier
  output logic [2*N-1:0] prod
);
  // run[r]: upper N bits of the running sum after row r
  logic [N-1:0] run [N];
  logic [N-1:0] pp0;

  assign pp0     = a & {N{b[0]}};
  assign prod[0] = pp0[0];
  assign run[0]  = {1'b0, pp0[N-1:1]};

  for (genvar r = 1; r < N; r++) begin : g_row
    logic [N-1:0] s;
    logic         c;
    rca_adder #(.WIDTH(N)) u_row (.a(run[r-1]), .b(a & {N{b[r]}}), .cin(1'b0), .sum(s), .cout(c));
    assign prod[r] = s[0];
    assign run[r]  = {c, s[N-1:1]};
  end
  assign prod[2*N-1:N] = run[N-1];
endmodule
