# 32-bit Vedic / reversible-logic multiply-accumulate unit

A multiply-accumulate (MAC) unit computes `c <= c + a*b` once per clock. It is
the inner loop of FIR filters, transforms (DCT, FFT) and dot products. This
design is a 32-bit MAC that puts two ideas side by side:

* **Multiplier.** It uses the *Urdhva Tiryakbhyam* ("vertically and
  crosswise") method from Vedic arithmetic. All cross products of a column
  are formed at once and summed with the carry of the column before. The
  32x32 multiplier is built recursively from 4x4 Urdhva blocks. The partial
  products of each level are combined by Kogge-Stone parallel-prefix adders.
* **Accumulate adder.** It is a ripple-carry chain of reversible **DKG
  gates**. A DKG gate is a 4-input, 4-output one-to-one gate that acts as a
  full adder when its control input is 0.

```
 a[31:0] ─┐
          ├─► vedic_32x32 ──product[63:0]──► accumulator_64bit ──► c[63:0]
 b[31:0] ─┘   (q1)                           (q2)    ▲        │
                                          dkg_adder ─┘◄───────┘ (feedback)
 clk, clr, en ───────────────────────────────────────►
```

## Interface and timing of the top, `vedic_mac_32_rev`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all state changes on the rising edge |
| `clr` | in | 1 | synchronous clear, active high; wins over `en` |
| `en`  | in | 1 | when 1 (and `clr` = 0), add `a*b` to the accumulator |
| `a`, `b` | in | 32 | unsigned multiplicand and multiplier |
| `c`   | out | 64 | accumulator register (unsigned, modulo 2^64) |

The multiplier and the adder form a single combinational path from `a`/`b`
to the accumulator register. There is no pipeline. A product presented
before a rising edge with `en = 1` shows in `c` right after that edge. One
product is taken per clock. Example: hold `clr` high, then release it with
`a = 4`, `b = 5`, `en = 1`. On successive edges `c` reads 20, 40, 60, ...
This is the reference run that the end-to-end testbench replays.

The widths are in `rtl/mac_pkg.sv` (`OPERAND_W = 32`, `PRODUCT_W = 64`).
The top has no parameters.

## The Urdhva multiplier, level by level

### 4x4 leaf: `vedic_4x4`

Take `a = a3..a0` and `b = b3..b0`. The product is produced in seven steps,
one per output column `k`. Step `k` adds the carry `c(k-1)` to every cross
product `ai & bj` with `i + j = k`:

```
r0       = a0b0
c1 r1    = a1b0 + a0b1
c2 r2    = c1 + a2b0 + a1b1 + a0b2
c3 r3    = c2 + a3b0 + a2b1 + a1b2 + a0b3
c4 r4    = c3 + a3b1 + a2b2 + a1b3
c5 r5    = c4 + a3b2 + a2b3
c6 r6    = c5 + a3b3
product  = c6 r6 r5 r4 r3 r2 r1 r0
```

The low bit of each step's sum is the product bit. The rest is the carry,
and a carry can be more than one bit wide (at most 2 bits here). In the RTL
each column is a small adder of 1-bit terms, written as a loop over `k`.

### Halving: `vedic_8x8`, `vedic_16x16`, `vedic_32x32` and `vedic_combine`

An NxN multiplication is split into halves, `a = {AH, AL}` and
`b = {BH, BL}`. It is then the same vertical-and-crosswise pattern on the
halves:

```
a*b = (AH*BH) << N  +  (AH*BL + AL*BH) << N/2  +  AL*BL
```

The four half-size products are computed in parallel. `vedic_32x32` uses
four `vedic_16x16`, which uses four `vedic_8x8`, which uses four
`vedic_4x4`. At every level, `vedic_combine` joins the four products
(`hh = AH*BH`, `hl = AH*BL`, `lh = AL*BH`, `ll = AL*BL`). Shown for 32x32
(H = 16):

1. The **middle Kogge-Stone stage** adds `AH*BL + AL*BH + ll[31:16]`, where
   `ll = AL*BL`. This is a three-input sum, built as two 32-bit Kogge-Stone
   adders in a row. The total is below 2^33, so at most one of the two carry
   outputs is set. Their OR is bit 32 of the middle sum `mid`.
2. `q[15:0] = ll[15:0]`, and `q[31:16] = mid[15:0]`.
3. The **final Kogge-Stone adder** computes
   `q[63:32] = AH*BH + mid[32:16]`. Its carry out is always 0, because the
   product fits in 64 bits.

The 8x8 and 16x16 levels use the same combiner with N = 8 and N = 16.

### Kogge-Stone adder: `kogge_stone_adder`

Each bit forms a generate `g = x & y` and a propagate `p = x ^ y`. The carry
in is folded into bit 0's generate. Then come `ceil(log2 W)` prefix stages.
In stage `k`, bit `i >= 2^k` merges with bit `i - 2^k`:
`G = G_i | P_i & G_j` and `P = P_i & P_j`. After the last stage, `G_i` is
the carry out of bit `i`. For W a power of two the network has
`W(log2 W - 1) + 1` merge cells and a fan-out of at most 2.

## The reversible adder

### DKG gate: `dkg_gate`

```
P = B
Q = ~A & C | A & ~D
R = (A ^ B) & (C ^ D) ^ (C & D)
S = B ^ C ^ D
```

With `A = 0` the gate is a full adder of B, C and D. `R` is the carry, `S`
is the sum, and `P` and `Q` are garbage outputs (copies of B and C). With
`A = 1` it is a full subtractor: `S` and `R` are the difference and the
borrow of `B - C - D`. The mapping is one-to-one, and the testbench checks
that all 16 output patterns are distinct.

### Parallel adder: `dkg_adder`

This is a ripple-carry adder with one DKG gate per bit. Each gate has
`A = 0`, `B = x[i]` and `C = y[i]`. Its `D` input is the carry from the bit
below (`cin` for bit 0). `R` gives the carry to the next bit and `S` gives
`sum[i]`. The delay grows linearly with W. At the default W = 64 it is the
accumulate adder.

### Accumulator: `accumulator_64bit`

A 64-bit register `c`. Its next value is `dkg_adder(c, product, cin = 0)`.
The register is loaded when `en` is 1, and `clr` zeroes it. The adder's
carry out is dropped, so the sum wraps modulo 2^64.

## Where this RTL makes its own choices

The architecture fixes the structure, the widths, the DKG equations, the 4x4
column equations, the 32x32 split into four 16x16 products joined by
Kogge-Stone adders, and the port names of the top and its two sub-blocks.
The following choices were made here:

* **Roles of the two adder types.** The adders that join partial products
  inside the multiplier are Kogge-Stone. The 64-bit accumulate adder is the
  DKG ripple adder. The architecture names both adder types; this is the
  reading taken.
* **Control.** `clr` is synchronous, active high and wins over `en`. `en = 0`
  holds the value. The sum wraps past 2^64 without any flag.
* **Numbers.** All operands are unsigned.
* **Pipelining.** There is none. The path from the multiplier through the
  64-bit ripple adder is long, and a faster clock would need pipeline
  registers.
* **Middle adder.** The three-input middle addition is two cascaded
  two-input Kogge-Stone adders.
* **Lower levels.** The 8x8 and 16x16 levels reuse the 32x32 adder
  arrangement.
* **Column adders.** The columns of the 4x4 block are plain adders; no
  particular gate-level column circuit is used.
* **Synthesis.** The reversible gates are modelled by their Boolean
  function. Synthesis maps them to ordinary logic, so the power property of
  reversible logic does not carry over to a standard-cell implementation.

## Files

| file | content |
|---|---|
| `rtl/mac_pkg.sv` | operand and product widths |
| `rtl/vedic_mac_32_rev.sv` | top: multiplier + accumulator |
| `rtl/accumulator_64bit.sv` | 64-bit register with DKG adder feedback |
| `rtl/dkg_adder.sv` | W-bit ripple adder of DKG gates (default 64) |
| `rtl/dkg_gate.sv` | reversible DKG gate |
| `rtl/vedic_32x32.sv` | 32x32 multiplier from four 16x16 |
| `rtl/vedic_16x16.sv` | 16x16 multiplier from four 8x8 |
| `rtl/vedic_8x8.sv` | 8x8 multiplier from four 4x4 |
| `rtl/vedic_combine.sv` | Kogge-Stone combiner of four half products (default N = 32) |
| `rtl/vedic_4x4.sv` | 4x4 Urdhva multiplier |
| `rtl/kogge_stone_adder.sv` | W-bit Kogge-Stone adder (default 32) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each testbench compares its block with results computed by the simulator's
own `*` and `+` operators. Each one prints
`TB_RESULT checks=N failures=M`.

* `dkg_gate`: exhaustive, including the reversibility check.
* `vedic_4x4`: exhaustive.
* `vedic_8x8`: exhaustive.
* `vedic_16x16`: 50,000 random and corner products.
* `vedic_combine`: exhaustive at N = 8, plus 20,000 random products at
  N = 32, fed with half products computed in the testbench.
* `kogge_stone_adder`: exhaustive at 5 bits, plus carry-chain corners and
  random operands at 32 and 64 bits.
* `dkg_adder`: exhaustive at 4 bits, plus corners and random operands at
  64 bits.
* `vedic_32x32`: 50,000 random and corner products.
* `accumulator_64bit`: 5,000 clocked steps against a reference model.
* `tb_vedic_mac_32_rev`: end to end at full size. It first replays the
  a = 4, b = 5 reference run and checks the value after every edge. It then
  runs 20,000 random cycles. It counts each mechanism: clear, accumulate,
  hold, clear over enable, and 64-bit wrap. A mechanism that never occurs
  counts as a failure.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/mac_pkg.sv \
    tb/tb_vedic_mac_32_rev.sv --top-module tb_vedic_mac_32_rev -o sim
./obj_dir/sim
```

Any other testbench runs the same way with its own file and top module.
Every testbench runs in a second or less.
