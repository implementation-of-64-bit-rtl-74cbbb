# 64-bit multiply-accumulate unit with a reduced-complexity Wallace multiplier

A multiply-accumulate (MAC) unit computes a running sum of products,
F = Σ Pᵢ·Qᵢ: the inner loop of FIR filters, convolutions and dot products.
This unit takes one pair of 64-bit unsigned operands per clock, multiplies
them in a single-cycle Wallace-tree multiplier, and adds the 128-bit product
to a 129-bit accumulator. Most of the hardware, and most of this document,
is the multiplier: a Wallace tree whose reduction is arranged to need almost
no half adders.

```
 a[63:0]  b[63:0]
    |        |
 +--v--------v--+
 | modified     |   combinational, 10 reduction stages
 | Wallace mult |   + final two-row adder
 +------+-------+
        | product[127:0]
 +------v-------+
 | csa_adder    |<---------------+   128-bit adder, carry-out = bit 128
 +------+-------+                |
        | sum[128:0]             |
 +------v-------+                |
 | accumulator  |  129-bit PIPO  |
 +------+-------+  register      |
        +------------------------+
        |
     p[128:0]
```

## Files

| File | Contents |
|------|----------|
| `rtl/mac_pkg.sv` | widths (64 / 128 / 129) and the row-count recurrence of the reduction |
| `rtl/mac_unit.sv` | top level: multiplier, adder, accumulator and the feedback path |
| `rtl/modified_wallace_mult.sv` | N x N reduced-complexity Wallace multiplier (N = 64) |
| `rtl/csa_adder.sv` | W-bit adder with carry-out (W = 128), used twice |
| `rtl/mac_accumulator.sv` | W-bit parallel-in parallel-out register (W = 129) |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | the 3:2 and 2:2 counters of the tree |
| `tb/tb_*.sv` | one self-checking testbench per module above, plus the end-to-end `tb_mac_unit` |

## Timing and interface of the MAC

`mac_unit` has ports `clk`, `rst`, `a[63:0]`, `b[63:0]` and `p[128:0]`.

* Multiplier and adder are combinational; the accumulator is the only
  state. Operands present before a rising edge are multiplied and added to
  the sum at that edge. `p` shows the new sum right after it.
* Latency is one clock and throughput is one operand pair per clock. There
  is no valid or enable input: every clock accumulates whatever is on `a`
  and `b`. Hold an operand at zero to pause the sum.
* `rst` is synchronous and active high. It clears the sum. The operands
  present during the reset cycle are discarded.
* Operands are unsigned. The sum is 129 bits and wraps modulo 2¹²⁹. One
  maximal product, (2⁶⁴−1)², is just under 2¹²⁸, so the sum holds two of
  them and wraps on the third. Dot products of random full-width operands
  overflow after about eight terms. Longer sums need operands that
  leave headroom.

A clock of 217 MHz has been reported for this architecture on a Xilinx
Spartan-3-class FPGA. A 64-bit combinational multiplier followed by a
128-bit adder in one cycle is a long path. Treat that figure as a property
of that implementation, not of this RTL. A pipeline register between the
multiplier and the adder would be the first change for a faster clock. It
is not part of this design.

## The reduced-complexity Wallace multiplier

### Phase 1: partial products as an inverted pyramid

The 64 × 64 = 4096 partial-product bits `a[i] & b[k]` are gathered by
weight. Column `c` (weight 2ᶜ, `c` = 0 … 127) holds every bit with
`i + k = c`. That is `c + 1` bits for `c < 64` and `127 − c` bits above, so
column 63 is the tallest at 64 bits. Laid out with every column's bits
pushed to the top, the matrix forms an inverted pyramid of 64 rows.

### Phase 2: reduction stages

Each stage turns the rows it receives into fewer rows:

* In every column, the bits are taken in groups of three. Each full group
  goes to a full adder. Its sum stays in the column and its carry moves to
  the column above.
* A left-over group of one or two bits passes to the next stage unchanged.
* A classic Wallace tree also feeds every left-over pair to a half adder.
  A half adder does not reduce the bit count of the matrix, so here it is
  used only where it is needed. Each stage has a row target, set by

  ```
  r(0) = N,   r(j+1) = 2*floor(r(j)/3) + (r(j) mod 3)
  ```

  If a column would leave the stage with more bits than `r(j+1)`, its
  passing pair goes through a half adder instead. Columns are visited
  from the least significant up, because a column's output height depends
  on the carries it receives from the one below.

For N = 64 the targets run 64 → 43 → 29 → 20 → 14 → 10 → 7 → 5 → 4 → 3 → 2.
That is ten stages, the same depth as a conventional Wallace tree. The
groups-of-three rule meets every target on its own until the last stage
(3 → 2 rows). Only there do half adders appear: 53 of them, against 3853
full adders in the whole tree. Published descriptions of this 64-bit
multiplier quote only 8 half adders. This implementation keeps to the
stated rule, which gives 53. The count is exposed as the localparam
`TOTAL_HA`.

### Phase 3: final addition

The two remaining rows go to `csa_adder`, the same 128-bit adder that does
the accumulation. Its carry-out is always zero here, since a 64 × 64
product fits in 128 bits.

### How the tree is generated

`modified_wallace_mult` contains no hand-placed adders. At elaboration, the
constant function `build_table()` runs the reduction once, column by
column and stage by stage. It records three packed tables: each column's
height, its number of full adders, and its number of half adders. The
generate loops then read these tables and instantiate the tree. Inside a
column, the bits entering stage `j+1` are ordered as follows:

1. the bits that passed unchanged,
2. the sum outputs of this column's full and half adders,
3. the carries from the column below.

Bits above a column's height are tied to zero. Changing `N` regenerates
the whole tree. The testbench checks N = 10 as well, which needs five
stages (10 → 7 → 5 → 4 → 3 → 2).

Three localparams are there for inspection: `STAGES`, `TOTAL_FA` and
`TOTAL_HA`. A fourth, `HA_BEFORE_LAST`, counts the half adders outside the
final stage and should be 0.

## The adder and the accumulator

`csa_adder` carries the conventional name "carry save adder", but it is a
two-operand adder with a binary result. It adds two 128-bit words and a
carry-in, and returns 128 sum bits plus the carry-out: the 129-bit result
the MAC needs. Its internal carry structure is not specified, so it is a
single `+`, and synthesis picks the carry chain. Replace its body to
experiment with prefix or carry-select structures. Both instances use it
with `cin = 0`.

The accumulator is a plain 129-bit parallel-in parallel-out register with
a synchronous clear. In `mac_unit`, the adder adds the product to the low
128 bits of the stored sum. The adder's carry-out is XORed into stored
bit 128, which gives the modulo-2¹²⁹ behaviour described above.

## Where this RTL departs from, or fills in, the reference description

* **One 64-row tree instead of four 32 × 32 blocks.** One published
  schematic of this MAC builds the 64 × 64 multiplier from four 32 × 32
  modified Wallace multipliers. The four partial results are combined by
  three adders, with the accumulator in the same block. The description
  of the multiplier, however, gives ten reduction stages for 64 bits, and
  only a single 64-row tree has ten (a 32-row tree needs eight). This RTL
  builds the single tree.
* **Half-adder count.** The rule above gives 53 half adders, not the 8
  quoted.
* **Output width.** One schematic shows a 128-bit output `p`. The
  architecture specifies a 129-bit accumulator. `p` carries all 129 bits.
* **This design's own choices:** unsigned operands, synchronous active-high
  reset, no load enable, wrap-around at 2¹²⁹, the bit order within columns,
  and lowest-column-first placement of half adders. The source is silent on
  all of them.
* **Outside the design:** the operand memory that feeds `a` and `b` is
  not included. Connect it to the operand ports.

## Verification

Each testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb_csa_adder` | full-width carry ripple, all-ones, carry-in, and 2000 random 128-bit sums against a 129-bit reference |
| `tb_mac_accumulator` | parallel load of all 129 bits, hold between edges, synchronous clear |
| `tb_modified_wallace_mult` | 64-bit: corner cases, one-hot × all-ones, 3000 random products. 10-bit: a sweep plus 2000 random products. Structure: 10 stages at N = 64, 5 at N = 10, no half adders before the last stage |
| `tb_mac_unit` | default-size end-to-end run: a known dot product (3·4 + 5·6 + 7·8 = 98), six maximal products in a row, 20 random dot products of 8 to 84 terms, and a reset in mid-series |

`tb_mac_unit` also confirms four behaviours. Each must occur at least once,
or the test fails:

* accumulation onto a non-zero sum,
* reset of a non-zero sum,
* a carry into bit 128,
* wrap-around past 2¹²⁹ − 1.

It also checks that `p` does not change before the clock edge.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mac_pkg.sv \
          tb/tb_mac_unit.sv --top-module tb_mac_unit -Mdir obj_mac
./obj_mac/Vtb_mac_unit
```

Building the 64-bit tree takes about a minute and a half with Verilator.
The tree has about 4000 generated adder instances. The simulation itself
takes well under a second.
