// booth_encoder: radix-4 (modified) Booth encoder for one partial-product row.
// Inputs are three overlapping multiplier bits m2 = b(2i+1), m1 = b(2i),
// m0 = b(2i-1). Outputs are the one-hot selects for the row selector and the
// negate control:
//   selectm  = m1 ^ m0                  (digit +-1)
//   select2m = ~m2 m1 m0 + m2 ~m1 ~m0   (digit +-2)
//   select0  = ~m2 ~m1 ~m0 + m2 m1 m0   (digit 0)
//   sign     = m2                       (invert the selected multiple)
// Exactly one of selectm, select2m, select0 is high. Combinational.
// The truth table is followed as described; selectm is taken as m1 ^ m0,
// the form that agrees with that table.
module booth_encoder (
  input  logic m2,
  input  logic m1,
  input  logic m0,
  output logic selectm,
  output logic select2m,
  output logic select0,
  output logic sign
);
  assign selectm  = m1 ^ m0;
  assign select2m = (~m2 & m1 & m0) | (m2 & ~m1 & ~m0);
  assign select0  = (~m2 & ~m1 & ~m0) | (m2 & m1 & m0);
  assign sign     = m2;
endmodule
