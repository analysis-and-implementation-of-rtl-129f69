// full_adder: one-bit full adder (3:2 counter).
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Combinational, no clock.
// Standard sum and majority-carry equations.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (b & cin) | (a & cin);
endmodule
