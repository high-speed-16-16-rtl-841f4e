# 16×16-bit pipelined radix-4 Booth multiplier, five stages, no extra partial-product row

This is synthesizable SystemVerilog for a signed 16×16 → 32-bit multiplier. It takes a new operand pair every
clock and delivers each product five clock edges later. It follows a published transistor-level design
("High Speed 16×16-bit Low-Latency Pipelined Booth Multiplier", Ghasemizadeh, Fathi and Ghasemizadeh, 2012).
That design got its speed and short pipeline from three ideas, and all three are kept here at the logic level:

1. **No ninth partial-product row.** Radix-4 Booth recoding of a 16-bit multiplier gives 8 rows. Negative rows
   also need a +1 at their least significant column, and the +1 of the last row normally becomes a ninth row.
   Here that row disappears: rows 1–7 fold their +1 into their own bit 0. The last row instead receives the low
   five multiplicand bits already two's-complemented, and puts the single carry of that complement into an empty
   column. Eight rows then split into two groups of four, and every reduction step is a 4:2 compressor row.
2. **Early low bits.** After the compressors, product bits 0–6 are finished with one 5-bit adder. The final
   adder therefore needs only 25 bits, not 32.
3. **A two-cycle carry-select final adder.** Five 5-bit blocks each compute their sum for carry-in 0 and say
   which bits flip for carry-in 1. In the next cycle a block carry generator ripples across the five blocks and
   each block picks its sum.

## Pipeline

| rank / stage     | module                       | work                                                                         |
|------------------|------------------------------|------------------------------------------------------------------------------|
| input register   | `pipe_reg`                   | samples `a`, `b`, `in_valid`                                                 |
| stage 1          | `pp_generator`               | 8 Booth encoders, 8 selector rows, 5-bit two's complement of the last row    |
| register         | `pipe_reg`                   | eight 32-bit column vectors                                                  |
| stage 2          | `wallace_tree`               | two rows of 4:2 compressors: rows 1–4 → 2, rows 5–8 → 2                      |
| register         | `pipe_reg` in `wallace_tree` |                                                                              |
| stage 3          | `wallace_tree`               | one row of 4:2 compressors (columns 7–31); 5-bit adder on columns 2–6        |
| register         | `pipe_reg`                   | product bits 6..0 and two 25-bit rows                                        |
| stage 4          | `final_adder`                | five 5-bit block adders (`cla5`) and four add-one cells (`add_one5`)         |
| register         | `pipe_reg` in `final_adder`  | plus a plain register for product bits 6..0                                  |
| stage 5          | `final_adder`                | block carry generator (`bcg`) and sum-select cells (`mux_cell`)              |
| output register  | `pipe_reg`                   | `p`, `out_valid`                                                             |

The published timing budget puts the slowest cells (5-bit two's complement, 5-bit adder) at about one stage
each, so all five stages are roughly equally deep. That balance is a property of the original circuits. The
RTL keeps the same split of work across stages, so a synthesized version keeps the same shape.

### Interface and timing (`booth_multiplier16`)

| port        | dir | width | meaning                                                       |
|-------------|-----|-------|---------------------------------------------------------------|
| `clk`       | in  | 1     | rising-edge clock                                             |
| `rst_n`     | in  | 1     | asynchronous, active low; clears only the valid tags          |
| `in_valid`  | in  | 1     | `a`, `b` hold a pair to multiply                              |
| `a`, `b`    | in  | 16    | two's complement multiplicand and multiplier                  |
| `out_valid` | out | 1     | `p` holds a product                                           |
| `p`         | out | 32    | `a * b`, two's complement                                     |

A pair sampled on rising edge *n* is in `p` right after edge *n*+5, with `out_valid` high
(`booth_pkg::LATENCY` = 5). There is no stall and no back-pressure: one pair can enter per cycle, and idle
cycles simply travel down the pipe as `out_valid` = 0. The data registers are not reset.

## Stage 1: Booth rows without a ninth row

### Recoding and selection

Rows are numbered 1..8. Row *r* has weight 4^(r−1) and, with i = r−1, looks at the multiplier bits
{b[2i+1], b[2i], b[2i−1]}, with b[−1] = 0.
`booth_encoder` produces three signals:

* `one` = b[2i] ⊕ b[2i−1]
* `two` = ¬one ∧ (b[2i] ⊕ b[2i+1])
* `neg` = b[2i+1]

Digits ±A set `one`, digits ±2A set `two`, and ±0 set neither. `booth_selector` computes one row bit as
PP = (A_j·one + A_{j−1}·two) ⊕ neg. It does this as a choice of three branches: A_j ⊕ neg, A_{j−1} ⊕ neg, or neg
alone for the ±0 digits. The digit −0 (triple 111) therefore produces an all-ones row, and its +1 turns it into
zero. A row has 17 bits (j = 0..16), because 2A needs one bit more than A. The multiplicand is sign-extended by
one bit.

A row's value is its 17-bit two's-complement field plus `neg`. The hard part is adding all those `neg` bits and
sign extensions without more rows.

### Rows 1–7: K and H

Bit 0 of a row is (A0·one) ⊕ neg, and the row's `neg` must be added in that same column. `kh_generator` replaces
the pair with its two-bit sum:

* K = A0·one, in the row's own LSB column
* H = neg·¬(one·A0), one column to the left

Row *r* starts at column 2(r−1), so its H lands at column 2r−1. That column is empty in row *r*+1, which starts
at column 2r, so H goes into row *r*+1's vector. The H of row 4 goes into the first vector of the lower group. The H of
row 7 goes into row 8's vector.

### Row 8: five-bit two's complement

Row 8 has no row below it, so its `neg` cannot be handled that way. `twos_complementer5` works on the
multiplicand instead.

* **Low five selectors.** When neg = 1, these selectors receive the 5-bit two's complement of A[4:0] and run
  with inversion turned off.
* **Upper selectors.** They work as usual: inverted, in ones'-complement form.
* **Carry C6.** The complement's carry (C6) has weight 2^19. Column 19 is free: it is the first column left of
  row 1's sign bits, and row 8 starts at column 14, exactly five columns to the right. That distance fixes the
  width at five bits.

C6 is chosen per digit:

| digit | C6                       |
|-------|--------------------------|
| ±A    | neg ∧ (A[4:0] = 0)       |
| ±2A   | neg ∧ (A[3:0] = 0)       |
| ±0    | neg                      |

The selector of bit *j* < 5 gets x_j (for ±A) or x_{j−1} (for ±2A). This is exact because −(2A) = 2·(−A).

Inside the cell, x[0] = A[0]. A zero-detect chain over the lower bits drives one XNOR per bit to form the
complement. A 4-bit 2:1 mux then picks A[4:1] or the complemented bits, selected by `neg`.

### Sign extension

Each row's sign bit E_r is its bit 16. Its sign extension to 32 bits is replaced by a few bits per row, so that
all rows together add the same amount modulo 2^32:

* row 1 gets ¬E1, E1, E1 in columns 18, 17, 16;
* rows r = 2..8 get ¬E_r in column 2r+14 and a constant 1 in column 2r+15.

This works because the eight rows' sign weights sum to Σ_{i=0..7} 4^i·(−2^16) ≡ 0xAAAB0000 (mod 2^32). That constant's bits are exactly column 16, column
17 and the odd columns 19–31. Folding each row's E_r into them gives the prefixes above.

`pp_generator` outputs the eight rows as eight 32-bit vectors (`booth_pkg::rowset_t`); vector r−1 holds row
r, plus the H bit of row r−1 and, in vector 0, C6. The vectors add up to
a·b mod 2^32. Vectors 4–7 are empty below column 7. Column 0 is used only by vector 0, and column 1 only by
vectors 0 and 1.

## Stages 2 and 3: 4:2 compressor rows and early low bits

`compressor42` is the usual pair of cascaded full adders. It satisfies x0+x1+x2+x3+cin = sum + 2·(carry+cout),
and its `cout` does not depend on `cin`, so a row of cells has no ripple. `compressor42_row` places one cell per
column. Its `carry` output is already shifted one column left. Columns whose inputs are always 0 reduce, after
synthesis, to 3:2 compressors or half adders.

* **Stage 2.** One compressor row for vectors 0–3 and one for vectors 4–7 give four vectors.
* **Stage 3, columns 7–31.** One compressor row gives two 25-bit rows.
* **Stage 3, columns 0–6.** By the layout above, columns 0 and 1 already hold one bit each, and columns 2–6 hold
  exactly two (rows 5–8 start at column 7). A `cla5` adds columns 2–6, so product bits 0–6 are final.
* **Carry into column 7.** The 5-bit adder's carry goes into column 7 as the incoming carry of that column's
  stage-3 compressor. The published design does not say where this carry goes; this placement is one
  consistent choice.

`wallace_tree` also checks the empty-column assumptions with an assertion at every valid cycle.

## Stages 4 and 5: the 25-bit final adder

The two 25-bit rows are cut into five 5-bit blocks.

**Stage 4.**

* **`cla5`.** Bit 0 is a half adder (the carry-in is 0). Bits 1–4 use C_i = A_iB_i + (A_i⊕B_i)·C_{i−1}. The
  cell gives S⁰, the block sum for carry-in 0, and G, the block carry out.
* **Block 1.** Its sum is final, and its carry out C2 starts the block carry chain.
* **`add_one5`, blocks 2–5.** Adding 1 to S⁰ flips the bits up to and including the first 0. Because S⁰ was
  formed with carry-in 0, its run of low 1s is exactly the run of low 1s in A⊕B. The cell therefore reads A⊕B,
  which settles earlier than S⁰. It gives prefix flags (bit *k*+1 flips when bits 0..k all propagate) and the
  block propagate P.

**Stage 5.**

* **`bcg`.** Ripples C_{j+1} = G_j + P_j·C_j from C2. G and P of one block are never both 1.
* **`mux_cell`.** Each block flips bit 0 when its carry-in is 1, and bit *k* when the carry-in and prefix[k−1]
  are 1.

The carry out of the 25-bit sum is dropped, because the product is taken modulo 2^32.

## How this RTL differs from the published circuit

The published design is a full-custom 0.35 µm CMOS circuit. It reports 1.6 GHz maximum clock, 3.1 ns latency,
169 mW at 1 GHz and 3.3 V, and 9221 transistors. None of these can be checked from RTL, and none is claimed
here. What is kept: the stage split, the row arrangement, the five-bit complement, the 25-bit final adder and
every cell's logic function. Where this RTL departs:

* **Registers.** Pipeline registers are edge-triggered flip-flops. The original uses static level-sensitive
  latches.
* **Valid tag and reset.** The valid tag, and the reset that clears it, are additions.
* **Transistor-level devices.** The following are not modelled. Each is written as the equivalent logic:
  * transmission-gate branches;
  * alternating true/complement carry cells;
  * latency-matching inverters;
  * buffer sizing.
* **Where the stage-3 carry goes.** The carry of the stage-3 five-bit adder goes into column 7's compressor.
  The original does not specify this.
* **Fixed width.** The multiplier is fixed at 16×16. The package derives its constants from `N`, but the
  compressor and final-adder layout (7 early bits, 25-bit adder) is worked out for N = 16 only. The row
  construction itself does not depend on the width. `pp_generator` takes the operand width as a parameter `W`
  (any even width from 6 up; the multiplier uses 16). At every width the last row starts five columns right of
  the free column W+3, so the complement stays five bits.

## Files

* `rtl/booth_pkg.sv` holds the sizes (`N`, `ROWS`, `TC_BITS`, `LOW_BITS`, `FA_W`, `BLK_W`, `LATENCY`) and the
  types (`booth_sel_t`, `colvec_t`, `rowset_t`).
* `rtl/booth_multiplier16.sv` is the top.
* Every other file in `rtl/` is one module from the tables above.
* `tb/tb_<module>.sv` is a self-checking testbench per module.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops by itself, with a watchdog. Build and run
one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/booth_pkg.sv tb/tb_booth_multiplier16.sv \
          --top-module tb_booth_multiplier16 -Mdir obj_top
./obj_top/Vtb_booth_multiplier16
```

Modules are found through `-Irtl` by file name. Only the package has to be listed first.

What the testbenches check:

* **Leaf cells.** Exhaustive checks of `booth_encoder`, `booth_selector`, `kh_generator`,
  `twos_complementer5`, `compressor42`, `cla5`, `add_one5` and `mux_cell`.
* **Arithmetic checks.** `pp_generator`'s eight vectors must add to a·b and leave the required columns empty.
  `compressor42_row` and `wallace_tree` must preserve the sum. `bcg` must match the real block carries.
  `final_adder` must give x+y.
* **Latency.** `wallace_tree` and `final_adder` run pipelined streams with random bubbles and check that each
  result appears one cycle after its input.
* **End to end (`tb_booth_multiplier16`).** It covers about 55,000 products:
  * all pairs of 12 corner values;
  * 40,000 random pairs, with idle cycles;
  * a 20,000-pair stream in which every input bit toggles with probability 0.3102, the input activity the
    original power figure was measured at.

  Each product is compared with a·b, and each must arrive exactly five edges after sampling. The testbench also
  counts, and requires at least once:
  * every Booth triple;
  * a negative last row;
  * C6 = 1;
  * a carry out of the stage-3 five-bit adder;
  * a block carry passed through a propagating block;
  * a block sum taken for carry-in 1;
  * an idle cycle.

  It runs in well under a second.
* **Other widths (`tb_row_removal_widths`).** `pp_generator` is instantiated at 8, 16, 32, 64 and 128 bits,
  through the helper `tb/pp_width_check.sv`. At each width, the W/2 rows must add up to a·b over corner and
  random operands.
