// booth_mult: unsigned N x N multiplier using radix-2 Booth recoding.
// The multiplier is extended with a 0 above its MSB (so the operands are
// treated as positive) and a 0 below its LSB. Each pair (b_i, b_(i-1)),
// i = 0..N, selects a partial product of the multiplicand shifted by i:
// 01 -> +A, 10 -> -A, 00 / 11 -> 0. The N+1 partial products are added by a
// chain of 2N-bit adder rows; a subtraction row adds the inverted operand with
// carry-in 1. Combinational.
// Radix-2 Booth recoding follows the description; summing the rows with a
// chain of ripple adder rows is this design's own choice.
module booth_mult #(
  parameter int N = 32
) (
  input  logic [N-1:0]   a,       // multiplicand
  input  logic [N-1:0]   b,       // multiplier
  output logic [2*N-1:0] prod
);
  localparam int W = 2 * N;
  logic [N+1:0] bx;              // {0, b, 0}
  logic [W-1:0] part [N+2];      // running sum before row i
  assign bx      = {1'b0, b, 1'b0};
  assign part[0] = '0;

  for (genvar i = 0; i <= N; i++) begin : g_row
    logic         add_a, sub_a;
    logic [W-1:0] sh, opnd;
    logic         unused_c;
    assign add_a = ~bx[i+1] &  bx[i];
    assign sub_a =  bx[i+1] & ~bx[i];
    assign sh    = W'(a) << i;
    assign opnd  = sub_a ? ~sh : (add_a ? sh : '0);
    rca_adder #(.WIDTH(W)) u_add (.a(part[i]), .b(opnd), .cin(sub_a), .sum(part[i+1]), .cout(unused_c));
  end
  assign prod = part[N+1];
endmodule
