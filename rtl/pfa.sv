// pfa: partial full adder. Produces the bit generate g = a & b, the bit
// propagate p = a ^ b (the XOR form, which the sum logic needs anyway) and the
// sum p ^ cin. The carry out is left to the look-ahead logic. Combinational.
// Standard partial full adder, as described.
module pfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic g,
  output logic p,
  output logic sum
);
  assign g   = a & b;
  assign p   = a ^ b;
  assign sum = p ^ cin;
endmodule
