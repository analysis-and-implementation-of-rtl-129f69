# Pipelined Booth–Wallace multiply-accumulate unit, with its adder and multiplier building blocks

Digital signal processing relies on multiply-accumulate (`acc += a·b`), and the
unit that does it usually sits on the critical path. This design is a signed
32 × 32-bit MAC unit with a 72-bit accumulator. It does not multiply first and
then add the result to the accumulator. Instead, the accumulator is folded into
the carry-save partial-product tree, so a MAC needs only one carry-propagate
addition, the same as a plain multiply. The unit has three pipeline stages. A
new instruction can be issued every cycle, and its result is in the
accumulator three cycles later.

The MAC's parts were picked by comparing alternatives:

- five 32-bit adders: ripple carry, carry skip, carry look-ahead, carry select and Kogge-Stone;
- four 32 × 32 multipliers: array, radix-2 Booth, Wallace tree and modified-Booth Wallace tree.

All nine are included as RTL. They stand beside the MAC in the top level
(`arith_top`) with their own ports, so they can be simulated and synthesised
side by side.

## Arithmetic of the MAC

### Modified Booth recoding (radix 4)

The multiplier `a` is read in overlapping 3-bit windows `(a[2i+1], a[2i], a[2i-1])`, with `a[-1] = 0`.
Each window gives one digit in {−2, −1, 0, +1, +2}, so a 32-bit operand gives
16 partial products instead of 32. `booth_encoder` turns a window into one-hot
selects plus a negate bit:

| m2 m1 m0 | digit | selectm | select2m | select0 | sign |
|---|---|---|---|---|---|
| 000 | 0 | 0 | 0 | 1 | 0 |
| 001, 010 | +1 | 1 | 0 | 0 | 0 |
| 011 | +2 | 0 | 1 | 0 | 0 |
| 100 | −2 | 0 | 1 | 0 | 1 |
| 101, 110 | −1 | 1 | 0 | 0 | 1 |
| 111 | 0 | 0 | 0 | 1 | 1 |

`pp_row_selector` has 33 bit cells, one more than the operand width, to hold
±2M. Each cell picks the sign-extended multiplicand bit (M) or the bit one
place lower (2M), then XORs it with `sign`. A negative digit therefore gives
the one's complement of the multiple. The missing +1 comes out as a separate
bit, `neg`.

### Sign extension without sign extension (`booth_pp_array`)

Each row is a signed 33-bit number. Sign-extending every row to full width
would put many copies of the same bit in the high columns. The design uses the
usual trick instead. Treat every row as negative, so it is extended with ones,
and sum all those ones into one constant. Then add back the inverted sign bit
`~s` of each row, which turns the ones of a positive row back into zeros. The
constant is spread over the rows so that it needs no row of its own. With `N = 32` and rows of width `W`:

```
row 0      : bits[31:0] at columns 31..0,  s0 at 32,  s0 at 33,  ~s0 at 34
row i >= 1 : bits[31:0] at 2i+31..2i,      ~si at 2i+32,  1 at 2i+33
             (row 15 also carries 1s in every column above 2i+33, up to W-1)
+1 of row i (neg_i) is placed in the empty column 2i of row i+1
```

The +1 of the last row (`neg_last`, column N−2 = 30) has nowhere to go. It is
carried separately and added after the tree. The sum of the 16 rows plus
`neg_last` equals `a·b` modulo 2^W, for any `W ≥ 2N`. The MAC builds its rows
at `W = 72` (the accumulator width), so the product is already sign-extended
to 72 bits in carry-save form.

### 4:2 compressor tree (`compressor_4_2`, `compressor_row`, `tree_4to2`)

A 4:2 compressor is two cascaded full adders. Its lateral carry-out depends
only on `in2..in4` and never on the carry-in. As a result, a whole row of them
(`compressor_row`) has no rippling carry. `tree_4to2` is a binary tree of such
rows, and each level halves the row count:

- 8 rows go to 2 rows through 3 compressor rows (16 × 16);
- 16 rows go to 2 rows through 7 compressor rows (32 × 32).

`LEVELS` sets how many levels one instance performs, which is how the MAC
splits the tree across pipeline stages.

### Final adder (`cla_adder`)

This is a hierarchical carry look-ahead adder:

- 4-bit partial full adders (`pfa`) produce bit generate `g = a&b` and propagate `p = a^b`;
- `clc4` cells are the 4-bit look-ahead logic, one kind of cell reused at every level;
- an output-carry term, `cout = G + P·cin`, forms the carry out.

The number of levels is ⌈log₄ WIDTH⌉. A 32-bit adder has eight level-1 cells,
two level-2 cells and one level-3 cell, and the level-3 cell uses two of its
four inputs. At 64 bits the level-3 cell uses all four. At 72 bits there are
four levels, and the inputs above bit 71 are tied to zero.

## The MAC pipeline (`mac_unit`)

```
          a,b ──► Booth recoders ──► 16 rows ──► 4:2 level 1 ──► [8 rows, neg_last]   stage 1
                                                                      │
          [8 rows] ──► 4:2 levels 2,3 ──► 2 rows ──► half-adder row (+neg_last) ──► [S, C]   stage 2
                                                                      │
 acc ──► AND row (0 for MUL) ──┐                                      │
                               ├─► full-adder row ──► 72-bit CLA ──┐  │
          [S, C] ──────────────┘                                   ├─► acc             stage 3
 acc ──► arithmetic right shifter (shamt) ─────────────────────────┘
```

Instructions (`arith_pkg::mac_op_e`):

| op | effect |
|---|---|
| `OP_MUL` | `acc ← a·b` (the AND row feeds zero instead of the accumulator) |
| `OP_MAC` | `acc ← acc + a·b` |
| `OP_SHR` | `acc ← acc >>> shamt` (arithmetic) |
| `OP_NOP` | `acc` holds |

**Timing.** An instruction is sampled when `in_valid` is high at clock edge
*t*. It updates `acc` at edge *t+2*, and `out_valid` is high for the cycle
after that edge. The latency is three cycles, counted from the cycle in which
the instruction is presented.

All instructions update the accumulator in stage 3, in issue order. So a MAC
issued right behind another MAC sees the first one's result, without a stall
or a bypass. The accumulator is only fed back inside stage 3, and it is fed
back in carry-save form through the full-adder row. That is why back-to-back
accumulation costs nothing extra.

**Widths and overflow.** Operands are two's complement. The accumulator is
2N + 8 = 72 bits. The 8 guard bits allow at least 2^8 worst-case products to
be accumulated before overflow is possible. There is no saturation: on
overflow the accumulator wraps modulo 2^72.

**Reset.** `rst_n` is synchronous and active-low. It clears all three stages
and the accumulator.

**Parameters.** `N` (default 32, must be a multiple of 8) and `GUARD`
(default 8). With `N = 16` the unit becomes a 16 × 16 MAC with a 40-bit
accumulator. The tree then splits 8 rows → 4 in stage 1 and 4 → 2 in stage 2.

## The comparison set

| module | what it is |
|---|---|
| `rca_adder` | chain of full adders |
| `cska_adder` | 4-bit ripple groups. A group whose bits all propagate passes its carry-in straight to its carry-out through a mux. |
| `cla_adder` | hierarchical look-ahead, as above |
| `csla_adder` | The first 4-bit section ripples. Each later section computes with carry-in 0 and with carry-in 1, and the incoming carry selects the result. |
| `ks_adder` | Kogge-Stone prefix adder. Level *l* combines (G,P) pairs 2^l apart. The carry-in is merged into g₀. |
| `array_mult` | unsigned. One ripple-adder row per multiplier bit adds the next AND row to the running sum. |
| `booth_mult` | unsigned radix-2 Booth. A 0 is appended above the MSB. There are N+1 rows of add/subtract/skip, summed by ripple adders. |
| `wallace_mult` | unsigned. AND rows are reduced three at a time by 3:2 carry-save rows (8 levels for 32 rows), then a CLA. |
| `booth_wallace_mult` | signed. Booth rows, the 4:2 tree, a half-adder row for `neg_last`, then a 64-bit CLA. This is the MAC's datapath without the pipeline registers or the accumulator. |

Every adder has `{cout, sum}` outputs and a carry-in. All of them are
combinational.

## Where this RTL departs from, or adds to, its source description

- **Operand size.** The MAC is 32 × 32 with 8 guard bits. A 16 × 16 MAC with
  a 40-bit accumulator, the other configuration described, is obtained with
  `N = 16`.
- **Final adder.** The MAC's final adder is a carry look-ahead adder, not a
  carry select adder. The CLA was the adder chosen for accumulation.
- **Compressor row width.** Every 4:2 row spans the full width. A narrower
  row would be enough in stage 2, because the low columns are already down
  to two bits there, but the full-width row gives the same result.
- **Booth encoder equation.** `selectm` is `m1 ^ m0`, which matches the
  encoder's truth table. It is not `m1 ^ m2`.
- **Row sign.** The sign that clears the leading ones of a row is taken from
  the inverted top bit of the selected row. It is not computed as an XNOR of
  the multiplicand sign and the Booth sign. The two differ only for a zero
  digit with a negative multiplicand, where the inverted top bit is the
  correct one.
- **Things that are this design's own choices:**
  - the instruction encoding;
  - the `in_valid`/`out_valid` flags;
  - the `shamt` port and the arithmetic shift;
  - the reset;
  - wrap-around on overflow;
  - the meaning of the stage-3 AND row (it gates the accumulator feedback for a plain multiply);
  - the exact Wallace reduction schedule;
  - the add-row structure of the radix-2 Booth multiplier.
- **Not modelled:**
  - a separate 16-bit product register in stage 3;
  - an early-lower-bits variant of the merged accumulator, which adds the low half of sum and carry ahead of time;
  - the character-LCD wrapper used to show products on an FPGA board.
- **Wrong published value.** One published example (0x41892112 × 0x0000ACD5)
  lists an upper product word that does not match the arithmetic. The correct
  product, 0x00002C3E_A9509BFA, is what the RTL produces and what the test
  checks.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. In summary:

- **Adders:** full-length carry chains, skip patterns and 5000 random operand
  pairs for each of the five. The CLA is also tested at 16 and 64 bits.
- **Multipliers:** corner operands, random pairs and the published operand
  pairs. `booth_wallace_mult` is tested at 32 and 16 bits, and exhaustively at 8 bits.
- **`booth_pp_array`:** checked at W = 64 and 72, and at N = 16.
- **`booth_encoder` and `compressor_4_2`:** exhaustive. The compressor test
  also checks that `cout` never depends on `cin`.
- **`tb_mac_unit`:** two instances of the checker `mac_check`. One runs the
  default 32 × 32 unit and the other the 16 × 16 unit with a 40-bit
  accumulator. Each checker is a cycle-by-cycle reference model. It checks
  `acc` and `out_valid` after every edge and measures the three-cycle latency.
  It runs 4000 random instructions with bubbles and back-to-back MACs, a reset
  in mid-stream, and 600 accumulations of the most negative operand squared to
  force an accumulator wrap. It counts each of these events and fails if one
  never happens.
- **`tb_arith_top`:** the same MAC test at the top level, with default
  parameters. On every cycle it also checks all adders and multipliers with
  fresh random operands.

Run a test with plain Verilator (the package first):

```
verilator --binary --timing -Irtl --top-module tb_mac_unit \
    rtl/arith_pkg.sv tb/tb_mac_unit.sv tb/mac_check.sv \
    $(ls rtl/*.sv | grep -v arith_pkg)
./obj_dir/Vtb_mac_unit
```

Replace `tb_mac_unit` with any other testbench name. Only `tb_mac_unit` needs
`tb/mac_check.sv`; `tb_arith_top` has its own copy of the MAC model. Verilator's `-Wall` lint
reports only unused-signal warnings. These are the top carry bit of each
compressor or CSA row, which falls outside the modulo-2^W result, the padded
upper bits of the look-ahead adder, and the `select0` output, which the row
selector does not need.
