# A 16 × 16 Vedic multiplier built from counting compressors

This design is an unsigned 16 × 16 → 32-bit multiplier. It is purely
combinational. It uses the Vedic "vertically and crosswise" rule
(Urdhva-tiryagbhyam). Under that rule, product bit `k` depends only on the
partial products `a[i] & b[k-i]` in column `k` and on the carries from the
columns below it. An array or Wallace multiplier adds rows of partial
products. This one instead computes every product bit separately:

* One **counter** per column counts how many of that column's bits are 1.
* Bit 0 of the count is the product bit.
* Bit `j` of the count is a carry into column `k + j`.

The counters are **compressor adders**: 5-3, 10-4, 15-4 and 20-5. An `N-r`
compressor counts the ones among `N` inputs and gives an `r`-bit count. The
10-4, 15-4 and 20-5 compressors are built from smaller ones. At the bottom of
the hierarchy is a 5-3 compressor made of multiplexers, which needs only the
XOR gates of a 3-input parity.

Two more compressors of the same family are included as stand-alone blocks:
a 4-2 compressor and a 7-2 compressor built from two 4-2 compressors. The
multiplier does not use them.

## Column schedule (the heart of the multiplier)

Column `k` of an `N × N` product holds `min(k+1, 2N-1-k)` partial products,
plus the carries that reach it. Those carries are bit 1 of column `k-1`'s
count, bit 2 of column `k-2`'s, and so on up to bit 4. The rule that picks
each column's counter is:

| bits in the column | counter      | count width |
|--------------------|--------------|-------------|
| 1                  | wire         | 1           |
| 2                  | half adder   | 2           |
| 3                  | full adder   | 2           |
| 4–5                | 5-3          | 3           |
| 6–10               | 10-4         | 4           |
| 11–15              | 15-4         | 4           |
| 16–20              | 20-5         | 5           |

Unused compressor inputs are tied to 0. Because of this rule, the number of
carries into a column depends on the counters chosen below it. The package
`vedic_pkg` therefore works the schedule out at elaboration time, one column
after the other:

* `pp_count` gives the partial products in a column.
* `col_inputs` gives the total bits in a column.
* `count_width` gives the width of a column's count.
* `has_carry` and `carry_slot` say which carries exist and where each one
  enters its column.

`vedic_mul` then generates one `column_adder` per column.

For N = 16 the schedule is:

| column | partial products | carries in | bits | counter |
|---|---|---|---|---|
| 0 | 1 | 0 | 1 | wire |
| 1 | 2 | 0 | 2 | half adder |
| 2 | 3 | 1 | 4 | 5-3 |
| 3 | 4 | 1 | 5 | 5-3 |
| 4–6 | 5–7 | 2 | 7–9 | 10-4 |
| 7–11 | 8–12 | 3 | 11–15 | 15-4 |
| 12–15 | 13–16 | 3 | 16–19 | 20-5 |
| 16–19 | 15–12 | 4 | 19–16 | 20-5 |
| 20–23 | 11–8 | 4 | 15–12 | 15-4 |
| 24–28 | 7–3 | 3 | 10–6 | 10-4 |
| 29, 30 | 2, 1 | 3 | 5, 4 | 5-3 |
| 31 | 0 | 3 | 3 | full adder |

The tallest columns (15 and 16) hold 19 bits, which is why a 20-input
compressor is needed. Inside a column, the partial products fill the first
input slots, `a[lo]&b[k-lo]` upward, and the carries follow in order of
increasing distance. Any carry that would go above column 31 is provably
zero, because the product fits in 32 bits. Such carries are left
unconnected. This includes the carry of the full adder in column 31.

`N` is a parameter (default 16). Values from 2 to 16 elaborate. N = 17
would need a 21-bit column, and elaboration stops with an error.

## The compressors

**5-3 (`comp5_3`)** counts 5 bits into 3. First, `x0..x2` are reduced to
four terms:

* their parity `p`
* their majority `maj` (count ≥ 2)
* `all` (all three are 1)
* `neq` (not all three equal, so the count is 1 or 2)

Inputs `x3` and `x4` then drive the selects of three 4:1 multiplexers, one
per output bit. Adding 0, 1 or 2 to a count between 0 and 3 only changes
which of these terms each output bit equals:

| x3 + x4 | s[2] | s[1]  | s[0] |
|---------|------|-------|------|
| 0       | 0    | maj   | p    |
| 1       | all  | neq   | ¬p   |
| 2       | maj  | ¬maj  | p    |

**10-4 (`comp10_4`)**: two 5-3 compressors count `x[4:0]` and `x[9:5]`.
A half adder and two full adders then add the two 3-bit counts as a ripple.

**15-4 (`comp15_4`)** works in three steps:

* Five full adders each take three inputs; full adder `i` takes
  `x[3i+2:3i]`.
* One 5-3 compressor counts the five sums. A second 5-3 compressor counts
  the five carries, which have weight 2.
* A 4-bit ripple adder (`parallel_adder4`) forms
  `{carry_count, 0} + {0, sum_count}`.

**20-5 (`comp20_5`)**: a 15-4 compressor counts `x[19:5]` and a 5-3
compressor counts `x[4:0]`. A ripple of half adder, full adder, full adder,
half adder adds the two counts.

**4-2 (`comp4_2`)** obeys `x1+x2+x3+x4+cin = sum + 2·(carry+cout)`. It uses
two multiplexers:

* `cout = (x1^x2) ? x3 : x1`
* `carry = (x1^x2^x3^x4) ? cin : x4`

The critical path is three XORs. `cout` does not depend on `cin`, so a row of
these compressors has no ripple.

**7-2 (`comp7_2`)** adds ten bits: `x[7:0]`, `cin1` and `cin2`. It uses two
4-2 compressors, one half adder and two full adders:

* The first 4-2 compressor takes `x[3:0]` and `cin1`. The second takes
  `x[7:4]` and `cin2`.
* The half adder adds the two 4-2 sums and gives `s`.
* The first full adder adds the first compressor's two weight-2 outputs and
  the half-adder carry.
* The second full adder adds the second compressor's two weight-2 outputs and
  the first full adder's sum.

So `inputs = s + 2·c1 + 4·(c0 + c2)`. `c0` is the first full adder's carry.
`c1` and `c2` are the second full adder's sum and carry.

## Interfaces and timing

| module | ports | function |
|---|---|---|
| `vedic_top #(N=16)` | `a[N-1:0]`, `b[N-1:0]` → `p[2N-1:0]`; `c72_x[7:0]`, `c72_cin1`, `c72_cin2` → `c72_s`, `c72_c0`, `c72_c1`, `c72_c2` | multiplier and 7-2 compressor side by side |
| `vedic_mul #(N=16)` | `a`, `b` → `p` | `p = a * b`, unsigned |
| `column_adder #(NIN=20)` | `x[NIN-1:0]` → `s[W-1:0]` | `s = popcount(x)` |
| `comp20_5`, `comp15_4`, `comp10_4`, `comp5_3` | `x` → `s` | `s = popcount(x)` |
| `comp4_2`, `comp7_2`, `half_adder`, `full_adder`, `parallel_adder4` | see file headers | see above |

Nothing here has a clock, reset or handshake: every output is a combinational
function of the inputs. To pipeline the multiplier, register `a`/`b` and `p`
outside it.

## What follows the reference design and what does not

Taken from the reference design:

* the 16-bit operand size and the 32-bit product
* one compressor-based counter per product bit, with carries passed to the
  higher product bits
* the internal structure of the 4-2, 5-3, 10-4, 15-4, 20-5 and 7-2
  compressors
* the 19-bit tallest column

Choices made here:

* **Column grouping.** The exact assignment of partial products and carries
  to compressors was not available. The "smallest counter that holds the
  column" schedule above is this design's own. It gives the 19-bit maximum
  column that the reference design states.
* **5-3 variant.** The multiplexer-based 5-3 compressor is built. A 5-3
  compressor made of half and full adders also exists and gives the same
  counts; it is not built.
* **7-2 wiring.** The 7-2 compressor's block diagram shows which kinds of
  adders are chained, but not every connection or output weight. The wiring
  chosen makes it an exact ten-input counter with outputs of weights
  1, 4, 2 and 4 (`s`, `c0`, `c1`, `c2`). The prose description calls it a
  7-input compressor with two carries in; the ten-input form with eight data
  bits matches the block diagram instead.
* **Internal structure of the small parts.** The half adder, full adder and
  4-bit parallel adder use textbook gate equations, and the parallel adder
  is a ripple.
* **Unsigned operands.** Signed operation is not supported.
* **No speed or area claims.** The reference implementation reports
  FPGA-specific results: a 32 ns combinational delay and about 400 LUTs on
  a Spartan-3E. These are not reproduced or checked here.

## Verification

Each module has a self-checking testbench in `tb/` that compares its outputs
with values computed independently by arithmetic. Each testbench ends with a
line `TB_RESULT checks=<n> failures=<n>`.

* Half adder, full adder, 4-bit adder, 4-2, 5-3, 7-2, 10-4, 15-4 and 20-5
  are tested exhaustively. The 20-5 test covers all 2²⁰ patterns.
* The 4-2 test also checks that `cout` does not depend on `cin`.
* `tb_column_adder` runs every column height that selects a different
  counter.
* `tb_vedic_mul` tests N = 4 and N = 8 exhaustively, and N = 16 with corner
  operands and 200 000 random pairs.
* `tb_vedic_top` runs the top at its default size, with no parameter
  overrides. It covers corner operands, 4096 values of `a` against
  `b = 0xFFFF`, 300 000 random pairs and all 1024 inputs of the 7-2
  compressor. It also checks that each kind of column counter produced its
  most significant count bit at least once. For the top full-adder column,
  whose carry is always 0, it counts the sum bit instead. It checks that
  each 7-2 carry output was raised at least once.

Every testbench has a time-based watchdog. The slowest one takes about 10
seconds.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/vedic_pkg.sv tb/tb_vedic_top.sv \
          --top-module tb_vedic_top -o sim
./obj_dir/sim
```

Any other testbench works the same way: substitute its name. `vedic_pkg.sv`
must come first on the command line; Verilator finds the other modules
through `-Irtl`. To lint a module, run
`verilator --lint-only -Wall -Irtl rtl/vedic_pkg.sv rtl/<module>.sv`.
