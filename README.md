# Radix-10 combinational multiplier with column-wise binary summation

This is a 16 × 16 digit decimal (BCD) multiplier built entirely from
combinational logic. Its distinguishing idea is how the partial products are
added. A conventional decimal multiplier adds partial-product rows with a tree
of decimal carry-save adders. Here every column of the partial product array is
summed on its own, **in binary**, with ordinary full and half adders, and only
the column totals are converted back to decimal. Binary carry-save adders are
small and fast, and a column total never exceeds 160. The conversion is
therefore a short array of identical cells. What remains afterwards is three
skewed decimal numbers. They are compressed to two and added with one decimal
carry-propagate adder.

The architecture was reported at 2.51 ns and about 297,000 µm² in a 90 nm
standard-cell library, compared with 2.65 ns for a decimal carry-save tree.
Those figures belong to the architecture. This RTL has not been synthesised to
timing.

## Data flow

```
 x[15:0], y[15:0] (BCD)
        │
   ppg ─┤  16 partial products, each 17 digit-bit pairs, row j shifted by j
        ▼
 32 columns, column i holds c = min(i+1, 32-i) pairs (c = 1..16)
        │
   column_adder (binary 3:2 tree + CLA)  ─►  binary column sum ≤ 10c
   bd_converter (array of bd_cell)       ─►  units / tens / hundreds digits
        ▼
 major partial product array: three skewed decimal rows
        │
   column_compressor ×31  ─►  one BCD row + one row of 0/1 carries
        ▼
   decimal_adder (30 digits; positions 0 and 1 bypass it)
        ▼
 p[31:0] (BCD)
```

All blocks are combinational. The design has no clock and no reset. The
product is valid one propagation delay after the operands change.

## Partial products as digit-bit pairs

Each multiplier digit y_j gives one partial product, y_j·X. It is kept as 17
*digit-bit pairs*: a BCD digit and a single bit of the same decimal weight. A
pair is therefore worth at most 10. This format is what makes every column sum
small: a column of c pairs is worth at most 10c.

`ppg` builds the rows from carry-free multiples of X (`bcd_multiples`):

* 2X digit k = 2·(x_k mod 5) + [x_{k−1} ≥ 5]
* 5X digit k = 5·(x_k mod 2) + ⌊x_{k−1}/2⌋
* 4X is 2X doubled by the same rule.

Each multiplier digit selects two of them:

| y | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| A | 0 | X | 0 | X | 0 | 5X | 4X | 5X | 4X | 5X |
| B | 0 | 0 | 2X | 2X | 4X | 0 | 2X | 2X | 4X | 4X |

The two selected multiples are added digit by digit. Each digit sum
t_k = A_k + B_k is at most 18:

* t_k mod 10 stays in position k as the pair's digit.
* The decimal carry [t_k ≥ 10] becomes the bit of position k+1.

No carry propagates. The bit of position 0 is always 0.

This recoding is this design's own. The architecture only asks for a recoding
that needs a few easy multiples and for rows of digit-bit pairs. This recoding
was chosen because it needs no negative multiples.

## Column adders: binary reduction of one column

This is the core of the design (`column_adder`, parameter `C` = pairs in the
column). Read as binary dots, a column of C pairs contains:

| binary weight | 8 | 4 | 2 | 1 |
|---|---|---|---|---|
| dots | C | C | C | 2C (digit LSBs and the single bits) |

The tree is generated at elaboration from C by three rules.

1. **Divide-by-three stages.** This rule repeats while some binary column holds
   more than three dots. In each stage, a column of n dots gets ⌊n/3⌋ full
   adders. Their sums stay in the column and their carries move one binary
   weight up. The n mod 3 leftover dots pass through unchanged.
2. **Early half adders.** In each of those stages, the lowest column that
   still holds exactly two dots gets a half adder, unless its carry would make
   the next stage taller. Its sum is then a finished result bit. Each stage
   thus peels off one more low-order bit without adding stages.
3. **Final stage.** This rule applies once no column holds more than three
   dots. The stage is built from the least significant column upward, and
   every column ends with at most two dots:
   * A column of three gets a full adder.
   * A column of two gets a half adder if it receives a carry from below or is
     the lowest two-dot column.
   * Every other column passes its dots on.

The low columns that are left with a single dot are result bits. From the
lowest two-dot column up to the highest occupied column, a carry-lookahead
adder (`cla_adder`) adds the two remaining rows. The second dot of the lowest
column enters on the adder's carry input, and the adder's carry out is the
next result bit. The output `sum` is `bits_for(10*C)` bits wide; this is 8 bits
for the tallest columns, whose maximum is 160.

Resulting shapes:

| C | 1 | 2–3 | 4 | 5–7 | 8–9 | 10–12 | 13 | 14 | 15 | 16 |
|---|---|---|---|---|---|---|---|---|---|---|
| reduction stages | 0 | 2 | 3 | 4–5 | 5 | 6 | 6 | 7 | 6 | 7 |
| single low bits | 0 | 1 | 1 | 2 | 2 | 3 | 2 | 3 | 2 | 3 |
| final CLA width | 4 | 4 | 5 | 4 | 5 | 4 | 5 | 4 | 5 | 5 |

The generator implements these rules. It does not copy any particular
hand-optimised dot diagram. The function `sim` in `column_adder.sv` computes
the dot count of every binary column at every stage, and where the half
adders go. The generate loops place one `full_adder` or `half_adder` per
counted adder.

## Binary-to-decimal conversion

`bd_cell` is the Nicoud cell. Its inputs are a BCD digit d (entering from above)
and a bit b (entering from the right). It computes S = 2d + b, which is at most
19:

* The tens of S leave to the left as a bit.
* The units of S leave downward as a digit.

`bd_converter` reads the binary column sum MSB first. It keeps the decimal value
of the bits read so far, and each new bit doubles that value and adds itself.
Per decimal digit, that is exactly one cell. A cell is placed only where the
digit being doubled can reach 5 for some input up to `MAXV`. Everywhere else,
doubling is a plain shift. This is why the top digit is simply the first three
or four input bits.

Converters are shared over ranges of column height. Each is sized for 10× the
top of its range:

| column height c | 1 | 2–3 | 4–6 | 7 | 8–12 | 13–15 | 16 (–19) |
|---|---|---|---|---|---|---|---|
| `MAXV` | 10 | 30 | 60 | 70 | 120 | 150 | 190 |
| cells | 1 | 2 | 3 | 3 | 5 | 5 | 6 |

## Major partial products and compressors

The converter of column i delivers three digits:

* its units, at position i;
* its tens, at position i+1;
* its hundreds, at position i+2. The hundreds digit is only 0 or 1, and only
  columns with c ≥ 10 have one, so hundreds bits land on positions 11..24.

`column_compressor` reduces each position to a digit d0 and a carry bit d1,
where a + b + ci = 10·d1 + d0. It works in two steps:

1. A 4-bit CLA adds the two digits, with the hundreds bit on its carry input.
2. A single `bd_cell` converts the 5-bit result. The upper four bits go to the
   cell's digit input and the LSB to its binary input.

Positions without a hundreds bit use the same circuit with ci = 0. As a result,
all carry bits form a single operand whose digits are only 0 or 1.

## Final decimal adder

`decimal_adder` adds a BCD number and a 0/1-digit number. Each position's sum
is at most 10. This gives the decimal generate and propagate signals:

* generate = digit sum equals 10;
* propagate = digit sum equals 9.

A Kogge-Stone prefix network forms all carries. Position 0 (the units of column
0) and position 1 (which receives no compressor carry) pass straight to the
product, so the adder covers positions 2..31. Carries out of position 31 are
dropped. The product of two 16-digit numbers is below 10^32, so they are always
zero.

## Where this RTL departs from the reference architecture

These parts are this design's own:

* **Partial product generation.** The recoding and multiple selection shown
  above are this design's own. The reference architecture uses a recoding that
  needs only the 2X and 5X multiples. Its exact form, including any sign
  handling, is not reproduced. The only property the rest of the design relies
  on is that each row is 17 digit-bit pairs worth y_j·X.
* **Column adder trees.** The trees are generated from the reduction rules, not
  copied from hand-drawn schemes, so adder counts and final adder widths can
  differ from a hand-optimised tree of the same height. The rule for placing
  the early half adders is this design's own.
* **Converter sharing.** Columns of heights 5 and 6 use the converter for
  heights 4–6, and height 7 uses its own.
* **Internals of the adders.** The internals of the binary CLA (single-level
  lookahead) and of the final decimal adder (prefix network) are this design's
  own. Only their role and the CLA widths are given by the architecture.
* **Timing elements.** There are no registers, clock or reset. The
  architecture is purely combinational.

## Files

Design (`rtl/`). Each file holds one module or package:

| file | role |
|---|---|
| `dec_mult.sv` | top: ports `x`, `y` (16 BCD digits each), `p` (32 digits); parameter `N` = 16 (2..19) |
| `dec_mult_pkg.sv` | `bcd_t`, column height and converter sizing functions |
| `ppg.sv`, `bcd_multiples.sv` | partial product generation |
| `column_adder.sv`, `full_adder.sv`, `half_adder.sv`, `cla_adder.sv` | binary column summation |
| `bd_cell.sv`, `bd_converter.sv` | binary-to-decimal conversion |
| `column_compressor.sv` | decimal carry-save compressor |
| `decimal_adder.sv` | final carry-propagate decimal adder |

Testbenches (`tb/`): there is one per module, named `tb_<module>.sv`.

* The small blocks are checked exhaustively:
  * `full_adder`, `half_adder`, `bd_cell`, `column_compressor`;
  * `cla_adder` at widths 4–6;
  * `bd_converter` at every size used.
* `column_adder` is checked at every height from 1 to 16.
* `tb_dec_mult` runs the full 16-digit multiplier:
  * about 20,000 products, compared with 128-bit integer arithmetic;
  * it also counts whether each mechanism was exercised, and fails if one never
    was: every multiplier digit value, column sums ≥ 100 (hundreds bits),
    compressor carries, and carry propagation in the final adder.

* `tb_dec_mult_sizes` builds the multiplier at N = 2, 3, 5, 8, 12 and 19 and
  checks random and all-nines products at each size.

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.

## Simulating

Verilator 5 with timing support is enough. For example, for the top:

```
verilator --binary --timing -Irtl -y rtl rtl/dec_mult_pkg.sv tb/tb_dec_mult.sv \
          --top-module tb_dec_mult -Mdir obj_dec_mult
./obj_dec_mult/Vtb_dec_mult
```

The same pattern works for any `tb_<module>.sv`. The package must come first on
the command line; `-y rtl` finds the other modules.

To try another size, change `N` on `dec_mult`. It may be any value from 2 to 19.
The testbench reference model handles products up to 128 bits, which is enough
for N ≤ 19. The column adder and converter sizes follow from `N` automatically.
