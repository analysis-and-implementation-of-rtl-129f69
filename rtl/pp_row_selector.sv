// pp_row_selector: one Booth partial-product row. N+1 bit selectors each pick
// the multiplicand bit (selectm), the bit one place lower (select2m, i.e. twice
// the multiplicand) or 0 (select0), and XOR the choice with sign:
//   bit_j = sign ^ (selectm mcand_j + select2m mcand_(j-1))
// with the multiplicand sign-extended to N+1 bits and mcand_(-1) = 0. The
// result is the one's complement of the multiple when sign = 1; the missing +1
// is returned separately as neg. An inverter on the top bit delivers the
// inverted sign bit (~row sign) that the sign-extension scheme needs, so
// row[N] = ~(selected multiple's sign after the XOR). Combinational.
// The select-and-invert bit cell follows the description; the row's top bit
// is inverted here so that booth_pp_array can clear the sign extension.
module pp_row_selector #(
  parameter int N = 32
) (
  input  logic [N-1:0] mcand,
  input  logic         selectm,
  input  logic         select2m,
  input  logic         sign,
  output logic [N:0]   row,      // {~s, bits N-1..0}
  output logic         neg       // +1 to add at the row's LSB
);
  logic [N:0]   mext;            // sign-extended multiplicand
  logic [N+1:0] mlow;            // mext with a 0 below bit 0
  logic [N:0]   bits;
  assign mext = {mcand[N-1], mcand};
  assign mlow = {mext, 1'b0};
  for (genvar j = 0; j <= N; j++) begin : g_sel
    assign bits[j] = sign ^ ((selectm & mext[j]) | (select2m & mlow[j]));
  end
  assign row = {~bits[N], bits[N-1:0]};
  assign neg = sign;
endmodule
