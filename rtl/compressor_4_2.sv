// compressor_4_2: 4:2 carry-save compressor built from two cascaded full
// adders. The first full adder takes in2..in4 and produces the lateral carry
// cout; the second adds its sum to in1 and the lateral carry-in cin. Because
// cout never depends on cin, a row of these cells has no ripple path.
// Weights: in1..in4 and cin at 2^i, sum at 2^i, carry and cout at 2^(i+1).
// Combinational, no clock.
// Two cascaded full adders, as described.
module compressor_4_2 (
  input  logic in1,
  input  logic in2,
  input  logic in3,
  input  logic in4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;
  full_adder u_fa1 (.a(in2), .b(in3), .cin(in4), .sum(s1),  .cout(cout));
  full_adder u_fa2 (.a(s1),  .b(in1), .cin(cin), .sum(sum), .cout(carry));
endmodule
