# 16×16 radix-4 Booth multiplier with an inverter-free two-stage 4-2 compressor tree

A combinational signed 16×16 → 32-bit multiplier built for short delay. It has three steps:

1. **Partial products.** Modified (radix-4) Booth encoding turns the 16-bit multiplier `b` into eight
   digits in {−2, −1, 0, +1, +2}. Each digit selects one 17-bit row from the multiplicand `a`.
2. **Reduction.** The eight rows go through two stages of 4-2 compressors and come out as two rows.
3. **Final addition.** A carry-select adder adds the two rows.

The main idea is in step 2. A fast 4-2 compressor cell from earlier work produces all of its
outputs **inverted**. Used as it is, each of its outputs needs an inverter before the next stage.
This design pairs that cell with a second compressor cell that takes **inverted inputs** and gives
true outputs. The first-stage cells then feed the second-stage cells directly, with no inverters
between the two stages. The second cell's delay is about two XOR gates plus one pass transistor.

Everything is combinational. There is no clock, no register and no reset. A product is valid once
the logic settles after `a` and `b` change, so the latency is zero cycles.

## Files

| file | block |
|---|---|
| `rtl/mult_pkg.sv` | widths (16, 8 rows, the 8/20/4 split of the product) and the Booth select struct `booth_sel_t` |
| `rtl/booth_mult16.sv` | **top**: `a[15:0]`, `b[15:0]` → `p[31:0]`, all two's complement |
| `rtl/booth_encoder.sv` | one Booth digit: (b[2i+1], b[2i], b[2i−1]) → {neg, x, z} and z̄ |
| `rtl/booth_decoder.sv` | one 17-bit partial-product row (parameter `AW`, default 16) |
| `rtl/comp42_inv.sv` | first-stage 4-2 compressor with inverted outputs |
| `rtl/comp42_prop.sv` | second-stage 4-2 compressor with inverted inputs |
| `rtl/pprt.sv` | reduction tree: row layout, the two stages, and the low 8-bit adder |
| `rtl/fa_mux.sv`, `rtl/fa_mux_inv.sv` | the two full-adder cells (final adder, and the full adders of stage 1) |
| `rtl/half_add.sv` | half adder (short columns of stage 1, and the row-7 increment) |
| `rtl/ripple_add.sv` | ripple adder that alternates the two full-adder cells |
| `rtl/csa_block4.sv` | 4-bit carry-select block |
| `rtl/csa20.sv` | 20-bit carry-select adder, five blocks (parameter `NBLK`, default 5) |
| `tb/tb_<module>.sv` | self-checking testbench for each module above |

## Booth digits and partial-product rows

Digit *i* looks at b[2i+1], b[2i] and b[2i−1], with b[−1] = 0:

| b[2i+1] b[2i] b[2i−1] | digit | neg | x | z |
|---|---|---|---|---|
| 000 | 0 | 0 | 0 | 0 |
| 001, 010 | +1 | 0 | 1 | 1 |
| 011 | +2 | 0 | 0 | 1 |
| 100 | −2 | 1 | 0 | 1 |
| 101, 110 | −1 | 1 | 1 | 1 |
| 111 | −0 | 1 | 0 | 0 |

The encoder builds x = b[2i] ⊕ b[2i−1] and x2 = b[2i] ⊕ b[2i+1]. The non-zero flag is formed
inverted, as z̄ = ¬(x | x2), and then inverted again to give z.

The decoder first XORs every multiplicand bit with `neg`. A mux on `x` then picks the 1× bit a[j]
or the 2× bit a[j−1]. A second mux on `z` passes that bit or forces the row bit to `neg`:

    pp[j] = z ? ((x ? a[j] : a[j-1]) ^ neg) : neg,   j = 0..16, a[-1] = 0, a[16] = a[15]

For a negative digit the row holds the one's complement of the selected multiple. The missing +1
leaves as the `neg` bit, and the reduction tree adds it at the row's LSB. The "−0" code gives an
all-ones row, and with its +1 that is zero. This design treats `a` as signed, so it sign-extends
`a` into the 17th row bit.

## The two compressor cells

Both cells satisfy I1+I2+I3+I4+Cin = Sum + 2·(Carry + Cout), where Cout depends only on I1..I4.
Carry and Cout both have the weight of the next column. Cout drives the next cell's Cin, so a
row of cells has no carry ripple.

**`comp42_inv` (stage 1)** takes true inputs and gives inverted `sum_n`, `carry_n` and `cout_n`.
It also takes its horizontal carry inverted (`cin_n`), so a row chains `cout_n → cin_n` directly.
It is built from six pair signals, A = I1^I2, B = I3^I4, C = ~(I1&I2), D = ~(I1|I2),
E = ~(I3|I4) and F = ~(I3&I4), and three muxes:

    sum_n   = Cin ? (A ^ B) : ~(A ^ B)
    carry_n = Cin ? (A ? B : E) : (A ? 1 : F)
    cout_n  = E ? C : D

When exactly two inputs are high, the general 4-2 truth table leaves Carry and Cout open. These
muxes settle them as Cout = (I3|I4)==0 ? I1&I2 : I1|I2 and Carry = (I1^I2^I3^I4) ? Cin : I3&I4.

**`comp42_prop` (stage 2)** takes inverted inputs `i_n` and a true `cin`, and gives true outputs:

    E     = I1^I2^I3^I4          (the same value whether the inputs are inverted or not)
    F     = ~(i_n1|i_n2|i_n3|i_n4) = all four inputs high
    Sum   = E ^ Cin              (a mux on Cin between E and ~E)
    Carry = F | (E & Cin)        (a mux on Cin between 0 and E, then a mux on F forcing 1)
    Cout  = at least two of I1..I4 high

Cout is built from four pair terms of the inverted inputs: n1 = I1|I3, n2 = I2|I4, n3 = I1&I3 and
n4 = I2&I4. Then Cout = (n1&n2) | n3 | n4.

Both cells produce Cout = 1 whenever two inputs are high, except that `comp42_inv` routes the
case I3 = I4 = 1 (with I1 = I2 = 0) through Carry instead. Both choices are valid.

## Reduction tree (`pprt.sv`): the part to read carefully

**Row layout.** Row *i* is weighted 4^i and holds pp_i[15:0] at columns 2i..2i+15. The tree
never sign-extends a row. Each row's sign is instead folded into a constant,
−Σ 2^(16+2i) = 0xAAAB0000 (mod 2^32), which is spread over the rows:

* row 0 puts `s0, s0, ~s0` in columns 16, 17 and 18, where s0 = pp0[16];
* row *i* ≥ 1 puts `~s_i` in column 2i+16 and a constant 1 in column 2i+17.

**Where the +1 bits go.** The +1 of a negative row *i* (`neg[i]`) belongs at column 2i. Row i+1
starts at column 2i+2, so its slot at column 2i is empty, and `neg[i]` goes there. Column 14 is the
exception. Rows 0–7 all cover it, and with `neg[7]` it would hold nine bits, one more than two 4-2
stages can absorb. So `neg[7]` is instead added to the five low bits of row 7 by a chain of five
half adders. Their carry goes into column 19, an empty slot just above row 0.

**Stage 1.** Rows 0–3 (with neg0–neg2 and the increment carry) form group 1. Rows 4–7 (with
neg3–neg6) form group 2. Each group has four input slots per column and must leave at most two
rows per column. The cell of each column is picked from the LSB up, by constant functions at
elaboration time:

* inside a compressor chain, a column with three or four bits gets another `comp42_inv`; one with
  two bits gets a full adder (`fa_mux`, with the chain carry on its late `cin` input), which ends
  the chain; one with one bit gets a half adder; an empty column just passes the chain carry on;
* outside a chain, a column that already fits in two rows (counting the carry from the column
  below) passes through; two bits plus a carry from below get a half adder; three or four bits
  start a new chain.

For group 1 this gives a compressor at column 2, a full adder at 3, compressors at 4–19, a full
adder at 20 and a half adder at 21. Group 2 has the same pattern 8 columns higher. A group leaves
two inverted rows. The compressor outputs are already inverted; the outputs of the half adders,
the full adders and the passed bits are inverted in the tree.

**Stage 2.** In each column, one `comp42_prop` takes the four inverted rows directly. Its outputs
are the true rows S (Sum at column k) and C (Carry of column k−1). This direct connection is the
point of the design.

**Low byte.** Columns 0–7 of S and C are added inside the tree by an 8-bit ripple of the
full-adder cells. So product bits 7..0 leave the tree finished, together with a carry into column
8. Columns 8–31 leave as two rows.

Carries out of column 31 are dropped. The tree is exact modulo 2^32, which is all a 32-bit signed
product needs.

## Final adder

**Full-adder cells.** Both cells choose their outputs with the carry-in:

* `fa_mux` computes Sum = Cin ? XNOR(a,b) : XOR(a,b) and Carry = Cin ? a|b : a&b.
* `fa_mux_inv` selects the inverted candidates and then inverts its outputs.

A ripple row alternates the two cells: bits 0, 2, … use `fa_mux` and bits 1, 3, … use
`fa_mux_inv`. This keeps the carry from passing through a long string of bare muxes.

**`csa_block4`.** Two 4-bit ripple rows run in parallel, one with carry-in 0 and one with
carry-in 1. The real carry-in then only drives the output muxes.

**`csa20`.** Five such blocks add product columns 8–27. Each block's selected carry (`se[k]`, the
select lines SE0–SE4) steers the next block. Its carry-in is the carry out of the low byte.

**Top four bits.** Product bits 31..28 depend on the carry out of bit 27. They are added after
`csa20` by a 4-bit ripple of the same cells, fed by the `csa20` carry-out.

The critical path is Booth encode/decode → one `comp42_inv` → one `comp42_prop` → final adder.

## Where this design departs from, or adds to, its source

* **Signedness.** Both operands are two's complement. The source does not say. Its decoder drawing
  shows a fixed ground level at the top row bit, which would suit an unsigned multiplicand.
* **Sign handling and `neg` bits.** The sign scheme, where each `neg` bit goes, and the row-7 +1
  increment are this design's own. The source's dot diagram shows neither sign bits nor `neg` bits.
* **Cells in short columns.** The source places half adders and full adders in the short columns at
  each end of a group, but their exact positions are not given. The rule that picks them here is
  this design's own.
  The second stage uses a compressor in every column, including the short ones where the source
  also shows full adders; the unused inputs there are held at inverted 0.
* **Don't-care entries of `comp42_inv`.** The source reuses this cell from earlier work without
  stating how its don't-care truth-table entries are resolved. They follow here from reading its
  carry network as the muxes above.
* **Top four bits.** The source counts the low 8 and the top 4 product bits as produced by the
  tree, with a 20-bit carry-select adder in between. The low 8 bits are produced in the tree here
  too. The top 4 bits cannot be finished before the carry from bit 27 arrives, so they are added
  after the 20-bit adder.
* **Function only.** The source describes transistor-level cells (pass-transistor muxes, CMOS
  networks) and gives delay, power and area for a 0.18 µm process. The RTL models the logic
  function and cell structure only. No timing or power claim carries over.

## Verification

Each testbench checks its block against values worked out independently. Each ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.

* `tb_booth_encoder`: all eight input codes against the digit table.
* `tb_booth_decoder`: all six select values × about 5000 multiplicands. Checks that
  signed(row) + neg = digit × a.
* `tb_comp42_inv`, `tb_comp42_prop`: all 32 input combinations. Checks the arithmetic identity,
  that Cout does not depend on Cin, and every fixed entry of the 4-2 truth table.
* `tb_fa_mux`, `tb_fa_mux_inv`, `tb_half_add`, `tb_csa_block4`: exhaustive.
* `tb_csa20`: 100 000 random and corner sums. Checks every select line against the carry of the
  matching low bits, and counts that each line was seen at 0 and at 1.
* `tb_pprt`: arbitrary rows and `neg` bits, not only those a decoder can produce. Checks that the
  tree's outputs sum to Σ(signed row + neg)·4^i mod 2^32. Forces the row-7 increment to carry.
* `tb_booth_mult16` (the whole multiplier): 100 corner pairs, 512 walking-one/walking-zero pairs
  and 2 000 000 random pairs against the simulator's signed multiply. It counts every Booth code in
  every row and carries out of the row-7 increment, and fails if one never occurs. It runs in a few
  seconds.

Run a testbench with plain Verilator, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -y rtl rtl/mult_pkg.sv tb/tb_booth_mult16.sv \
              --top-module tb_booth_mult16 -o sim && ./obj_dir/sim

To run a different testbench, replace `tb_booth_mult16` with its name. Lint the RTL with
`verilator --lint-only -Wall -y rtl rtl/mult_pkg.sv rtl/booth_mult16.sv --top-module booth_mult16`.
The remaining warnings are unused signals: the carries out of column 31 and out of the top
4-bit adder (the product is taken modulo 2^32), the inverted z̄ of each encoder, which only the
encoder test reads, and the carry-select lines, which `csa20` brings out for observation.

## Changing it

* The partial-product layout in `pprt.sv` is written for 16-bit operands. The column numbers of
  the sign constants, the `neg` slots and the row-7 increment all follow from 16.
* `booth_decoder` (`AW`), `ripple_add` (`W`) and `csa20` (`NBLK`) are parameterised and can be
  reused at other widths.
* To change the top/bottom product split, change `LO_BITS` and `CSA_BITS` in `mult_pkg`.
  `CSA_BITS` must stay a multiple of 4.
