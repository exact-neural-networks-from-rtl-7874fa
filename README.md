# Carryless partial-sum multiplier with Fibonacci-coded weights

An unsigned N x N array multiplier spends most of its full adders summing
partial products. This design drops the carries from the first level of that
sum: every two neighbouring partial products are merged with OR gates instead
of full adders, and only the merged rows go through an exact adder array. For
the 8 x 8 default, 28 of the 48 full adders of a carry-save array multiplier
become 2-input OR gates.

On its own this is an approximate multiplier. Its property is that the error
can be switched off: if **either operand has no two adjacent ones** in its
binary form, the product is exact. Such values are the Fibonacci code words.
There are 55 of them among the 256 8-bit values, and the largest is
`1010_1010` (170). A neural network whose weights have been quantized to
Fibonacci code words can run on this multiplier with exact results, while its
activations stay arbitrary 8-bit values. Because the products are exact,
retraining after quantization can use an ordinary exact multiply on a
CPU or GPU; there is no need to model the multiplier's errors.

## Why the OR is exact for Fibonacci operands

Write the partial products as `pp[i] = (a AND b[i]) << i`. The multiplier
forms, for k = 0 .. N/2-1,

    row[k] = pp[2k] | pp[2k+1]

and returns `row[0] + row[1] + ... + row[N/2-1]`, summed exactly. `x | y`
equals `x + y` exactly when x and y share no set bit. Two cases guarantee that
for every pair:

* `a` is a Fibonacci code word. `pp[2k+1]` is `a` shifted one place further
  than `pp[2k]`. `a & (a << 1) == 0` means no one in `a` has a one next to it,
  so the two copies never overlap.
* `b` is a Fibonacci code word. Then `b[2k]` and `b[2k+1]` are never both
  one, so one member of every pair is zero.

Otherwise a column with two ones yields 1 where the sum is 10. The carry is
lost, so the result is never above the true product. Example (4 x 4):
`11 x 11` gives 119 where the exact product is 121. `10 x 11` uses the code
word 1010 and gives the exact 110. Over all 8-bit operand pairs with a
nonzero product, the mean relative error distance |exact - approx| / exact is
0.0546.

OR was chosen over XOR for the merge. Both are exact where only one input is
set. Where both are set, OR returns 1 where the true sum is 2, while XOR
returns 0. OR is also the smaller gate.

## Datapath

```
 a_i[N-1:0] --+-----------------------+
 b_i[N-1:0] --+                       |
              v                       |
   pp_or_reduce: N partial products,  |
   pair k merged by N-1 OR gates      |
              | rows[N/2][2N]         |
              v                       |
   csa_accumulate: exact sum of rows  |
   (carry-save ranks + ripple row)    |
              v
           p_o[2N-1:0]
```

* **`pp_or_reduce`** ANDs `a_i` with each bit of `b_i` and merges pairs
  (0,1), (2,3), ... Pair k overlaps in N-1 columns. Those are the OR gates,
  (N^2-N)/2 in total (28 for N = 8). The lowest column of a pair comes only
  from the even partial product and the highest only from the odd one. Each
  row leaves the block already shifted to its weight and 2N bits wide.
* **`csa_accumulate`** adds the N/2 rows exactly. Row 0 seeds a carry-save
  pair (sum = row 0, carry = 0). Each further row is folded in by one rank of
  full adders. A final ripple-carry row (a half adder in column 0, then full
  adders) resolves sum and carry into the product. The result is modulo 2^W.
  In the multiplier nothing is lost: each OR row is at most the sum of its two
  partial products, so the total is at most `a*b < 2^(2N)`.
* **`carryless_am`** (top) joins the two. `full_adder` and `half_adder` are
  the one-bit cells. `fcq_am_pkg` holds the default width and functions for
  Fibonacci code words: test, largest word and nearest word. The testbenches
  use the functions; the RTL uses only the width.

Interface of the top:

| port  | dir | width | meaning |
|-------|-----|-------|---------|
| `a_i` | in  | N     | multiplicand, copied into every partial product |
| `b_i` | in  | N     | multiplier, its bits select the partial products |
| `p_o` | out | 2N    | product; exact if `a_i` or `b_i` is a Fibonacci code word |

The whole multiplier is combinational, with no clock and no reset, so the
product is valid one propagation delay after the operands. `N` (default 8)
must be even. Both operands are unsigned. The quantization scheme the
multiplier serves maps weights to 0 .. 2^N-1, because small negative
two's-complement values are full of adjacent ones.

## Preparing weights

Weight encoding is done offline, in software, not in this RTL. Each
weight is first quantized to an unsigned 8-bit value in the usual
scale/zero-point way. It is then replaced by the nearest Fibonacci code
word. Values above 170 clamp to 170. The float range is mapped so that
the 8-bit maximum is 212, halfway between 255 and 170. That keeps the
weights spread out without clamping too many of them. Quantization is
applied incrementally: a growing fraction of weights is encoded and frozen,
and the rest are retrained between steps. Biases are not encoded, since they
are not multiplied. Either operand port may carry the weight.
`fcq_am_pkg::fib_quantize` gives the nearest-word mapping the testbenches
use. When two code words are equally near, it picks the smaller; that tie
rule is this design's own.

## How far it follows the original design, and where it departs

Follows the original:

* the OR merge of neighbouring partial products
* the pairing 0-1, 2-3, ...
* the OR gate count (N^2-N)/2
* the exactness rule
* the unsigned operands
* the 8-bit main width
* the worked examples above
* the 0.054 error figure, which the testbench reproduces

This design's own choices:

* **Exact adder array.** The original describes a carry-save array
  multiplier. It keeps the adders that do not sum partial products, in an
  interleaved layout of full and half adders, and gives no netlist for it.
  Here the exact part is row-by-row carry-save ranks plus a ripple-carry
  row, written for every column. Synthesis removes cells whose inputs are
  constant. The function is identical, but cell counts, critical path and
  therefore area and delay will differ from the original's layout.
* **Timing.** No pipelining or registering is described. The block is
  combinational; register the operands and the product outside it as the
  surrounding datapath needs.
* **Row interface.** `pp_or_reduce` hands rows over pre-shifted and 2N bits
  wide. Many of those bits are constant zero (28 of 64 at N = 8), and
  synthesis trims them.

Not in this RTL:

* the software weight quantization and retraining flow
* the standard-cell implementation behind the original's area and
  power-delay figures (73 % / 43 % below an exact multiplier)
* any accelerator around the multiplier: no memory, dataflow or control for
  running a whole network is described

## Verification

All testbenches are self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_carryless_am` | Top at its defaults (8 x 8). Sweeps all 65,536 operand pairs against an integer model of the carryless product. Checks exactness whenever either operand is a code word, and that the result is never above the exact product. Checks one product per cycle, MRED in [0.050, 0.060] (measured 0.0546), and 55 code words with a maximum of 170. Then runs 200 dot products of 64 taps: random weights are quantized to code words, multiplied through the design with random activations, and must sum to the exact dot product. Counts exact-via-`a`, exact-via-`b`, lost-carry errors and clamped weights, and fails if any never occurs. |
| `tb_carryless_am_widths` | N = 4: all pairs, plus the worked examples `1010 x 1101 = 130`, `11 x 11 = 119` and `10 x 11 = 110`. N = 16: 20,000 random pairs against the model, plus as many pairs with one operand forced to a code word, which must be exact. |
| `tb_pp_or_reduce` | All 8-bit pairs, row by row, against integer arithmetic. With a code-word operand each row must equal the true sum of its two partial products. Lost carries must occur otherwise. |
| `tb_csa_accumulate` | 4 x 16-bit rows: corner values (all ones, carries rippling across the full width) and 20,000 random sets. A 2 x 8-bit instance is checked exhaustively. |

Each block's testbench has also been run against a copy of the block with a
deliberate bug:

| block | bug | failing checks |
|-------|-----|----------------|
| `pp_or_reduce` | XOR in place of OR | 51,456 |
| `csa_accumulate` | one ripple carry dropped | 23,004 |
| `carryless_am` | last merged row not passed on | 66,363 |

Each testbench caught its bug.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/fcq_am_pkg.sv rtl/full_adder.sv rtl/half_adder.sv \
  rtl/pp_or_reduce.sv rtl/csa_accumulate.sv rtl/carryless_am.sv \
  tb/tb_carryless_am.sv --top-module tb_carryless_am
./obj_dir/Vtb_carryless_am
```

Use another file from `tb/` and its module name as the top to run the other
testbenches. Each one finishes in well under a second.

To change the width, override `N` on `carryless_am` with any even value. The
testbench models use 64-bit integers, so they cover N up to 16 as written.
Lint leaves two `UNUSEDSIGNAL` warnings in `csa_accumulate`. They are the
carries out of the top column, which fall outside the W-bit result by design.
