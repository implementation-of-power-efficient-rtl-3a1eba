# 12 × 12 Vedic multiplier with algorithmic noise tolerance

One way to save power in a multiplier is to run it from a supply below the
voltage its critical path needs. The savings are large, but now and then the
slowest carry chains miss the sampling edge and the product is wrong,
usually in its most significant bits. *Algorithmic noise tolerance* (ANT) puts
up with those errors. A small, fast replica of the multiplier computes a coarse
estimate of the product, and the estimate is short enough to stay correct.
When the full product and the estimate disagree by more than any error-free
product could, the full product is taken to be corrupted, and the estimate is
output in its place. A large error becomes a small one.

This RTL implements that scheme for unsigned 12-bit operands:

* **Main block**: an exact 12 × 12 multiplier built the Vedic way. Four 6 × 6
  *Urdhva Tiryagbhyam* (vertical-crosswise) multipliers feed carry-lookahead
  adders.
* **Replica (RPR, reduced-precision replica)**: a 6-bit *fixed-width*
  multiplier. It sees only the top 6 bits of each operand and produces only
  the top 6 bits of the product. A cheap compensation circuit makes up for the
  partial products it throws away.
* **Error correction**: registers for both results, then a subtractor, a
  threshold comparator and a 2:1 multiplexer.

```
            +------------------+  ya_exact        ya    +----+
 x[11:0] -->|  vedic_mul12     |----------(XOR)-------->|reg |--ya_q--+-----------+
 y[11:0] -->|  (main block)    |            ^ vos_err   +----+        |           |
   |        +------------------+                                      v           v
   |  x[11:6],y[11:6]  +-------------------+  yr[5:0]   +----+  |ya_q - yr_q<<18| > TH ? 
   +------------------>|  rpr_fixed_width  |----------->|reg |--yr_q--> ...  --> MUX --> y_hat
                       +-------------------+            +----+            err_sel
```

## Files and hierarchy

| file | contents |
|---|---|
| `rtl/ant_pkg.sv` | default sizes (N = 12, M = 6) and the default threshold |
| `rtl/ant_vedic_top.sv` | top level: main block, replica, error correction |
| `rtl/vedic_mul12.sv` | N × N main multiplier from four N/2 × N/2 Vedic multipliers |
| `rtl/vedic_ut_mul.sv` | W × W Urdhva Tiryagbhyam multiplier |
| `rtl/cla_adder.sv` | W-bit two-level carry-lookahead adder |
| `rtl/rpr_fixed_width.sv` | M-bit fixed-width replica with ICV/MICV compensation |
| `rtl/full_adder.sv` | one-bit full adder, the cell of the replica array |
| `rtl/ant_error_correction.sv` | sampling registers, difference, threshold test, output MUX |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Top-level interface and timing

`ant_vedic_top #(N = 12, M = 6, TH = 455553)`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sampling clock |
| `rst_n` | in | 1 | asynchronous active-low reset of the two result registers |
| `x`, `y` | in | N | unsigned operands |
| `vos_err` | in | 2N | XOR mask applied to the main product before it is sampled (see below); tie to 0 |
| `y_hat` | out | 2N | corrected product |
| `ya_q` | out | 2N | sampled main product |
| `yr_q` | out | M | sampled replica output, an estimate of product bits [2N-1:2N-M] |
| `err_sel` | out | 1 | 1 when the estimate was output instead of the main product |

Both multipliers are combinational. Their results are captured on the rising
edge of `clk`. The subtract, compare and select after the registers are
combinational, so `y_hat`, `ya_q`, `yr_q` and `err_sel` show the result for the
operands that were present at the last rising edge. The latency is one clock
and a new operand pair can be applied every clock. There is no input register
and no valid/ready handshake. The reset only clears the registers.

`vos_err` exists because zero-delay RTL cannot reproduce the timing errors of an
undervolted main block. Any bit set in it flips that bit of the main product,
which lets a simulation exercise the correction path. It is not part of the
circuit that would be built; drive it with zero in real use.

## The main block: Vedic multiplication

`vedic_ut_mul` multiplies two W-bit numbers column by column. Column k
collects every bit product `a[i] & b[j]` with `i + j = k`. These are the
"vertical" product for k = 0 and the "crosswise" products for the columns
after it. The column also adds the carry that column k-1 left behind. The lowest
bit of that sum is product bit k, and the rest is carried on. The first column
starts with zero carry, and the carry out of the last column gives the top
product bit. A column can hold up to W products, so the carry is several bits
wide.

`vedic_mul12` splits each operand into halves of H = N/2 = 6 bits and forms four
12-bit partial products with `vedic_ut_mul`:

```
q0 = aL*bL    q1 = aH*bL    q2 = aL*bH    q3 = aH*bH
p[5:0]   = q0[5:0]
s1, c1   = q1 + q2                        (12-bit CLA)
s2, c2   = s1 + {6'b0, q0[11:6]}          (12-bit CLA)
p[11:6]  = s2[5:0]
p[23:12] = q3 + {4'b0, c1 + c2, s2[11:6]} (12-bit CLA)
```

The last addition cannot overflow. An immediate assertion checks this in
simulation.

`cla_adder` forms a generate and a propagate for every bit. It computes the
carries inside each 4-bit group in flattened lookahead form, without rippling.
Group generate/propagate signals then feed a second lookahead level, which
gives the carry into every group.

## The replica: fixed-width multiplication with ICV/MICV compensation

This is the least obvious part of the design.

The replica multiplies `a = x[11:6]` and `b = y[11:6]`. The exact product of
these two 6-bit values has 12 bits. Multiplied by 2^12, it is the part of
`x*y` that comes from the two high halves. The replica keeps only the top 6
bits, which line up with bits [23:18] of the full product. To build that
cheaply, it sorts the 6 × 6 partial products `a[i] & b[j]` by their column
`i + j`:

| subset | columns | bit products | treatment |
|---|---|---|---|
| MSP (most significant part) | i + j ≥ 6 | 15 | summed exactly |
| ICV, β (input correction vector) | i + j = 5 | 6 | used as compensation |
| MICV, α (minor input correction vector) | i + j = 4 | 5 | used as compensation |
| LSP (least significant part) | i + j ≤ 3 | 10 | discarded |

If the replica dropped everything below column 6, its result would always be
too small. On average, the discarded columns add up to about β units at weight
2^6, because column 5 has weight 2^5 and the columns below it contribute roughly
as much again. So each of the six ICV bit products is injected as a **carry
into column 6**. Five of them (`C_1 … C_5`) go in directly.

That estimate fails when β = 0 but column 4 is not empty. The dropped part is
then clearly non-zero, but no compensation has been added. The MICV term
covers this case:

```
cm1 = (β == 0)          // NOR of the six ICV bit products
cm2 = (α != 0)          // OR of the five MICV bit products
cm  = cm1 & cm2
last carry into column 6 = (a[0] & b[5]) | cm
p   = (MSP + 2^6 * (C_1 + … + C_5 + last carry)) >> 6
```

The sixth ICV product `a[0] & b[5]` is zero whenever `cm` is one, so the OR
simply adds the extra unit.

In hardware this is an array of full adders with one row per bit `b[j]`. A
6-bit accumulator holds columns 6 to 11. Row j adds its kept products
`a[6-j..5] & b[j]` through a ripple chain of six full adders. The carry into
its lowest position is that row's ICV product `a[5-j] & b[j]`. The compensation
therefore costs no adders at all: it uses carry inputs that would otherwise be
zero. The only extra logic is the NOR/OR/AND/OR that forms the last row's carry.

The sum never needs more than 6 output bits. An
assertion checks this, and the testbench checks it for all 4096 operand
pairs.

Worked example: `a = 010010`, `b = 010101`. The ICV column holds `a[1]&b[4] = 1`,
so β ≠ 0, `cm1 = 0`, `cm2 = 1`, `cm = 0`, and `p = 000110`. The exact value of the
top six bits is `(18*21) >> 6 = 5`.

For every input, the replica output is never below the exact top bits
`(a*b) >> 6`, and it is at most 2 above them.

## Error detection and correction

The estimate is placed at product bits [23:18] with zeros below:
`yr_full = yr_q << 18`. Then

```
err_sel = |ya_q - yr_full| > TH
y_hat   = err_sel ? yr_full : ya_q
```

TH must be the largest distance any *error-free* product can have from its
estimate. Then a correct main product is never replaced. Any corruption larger
than 2·TH is always replaced, because it leaves the product more than TH away
from the estimate. For the replica above, TH is

```
TH = max over x,y of |x*y - (replica(x[11:6], y[11:6]) << 18)|
```

For fixed high halves the estimate is constant and `x*y` grows with the low
halves. So only low halves of 0 and 63 need to be tried for each of the 4096
pairs of high halves. The result is **455553** (0x6F381), the default of
`TH`. If you change N or M, recompute TH with this formula: the top-level
testbench contains the procedure.

TH is about 1.74 × 2^18. An error is detected only if it moves the product
more than TH away from the estimate. Errors above 2·TH = 911106 are always
detected; this includes a flip of any of bits 20 to 23. Smaller errors are
detected or not depending on where the error-free product lay. Once the
estimate is substituted, the output is at most TH away from the true product,
because TH bounds the distance between the estimate and every error-free
product. That is inherent in ANT: it bounds the size of the error rather than
removing it.

## Where this design makes its own choices

* **Registers.** Only the two results are registered, as in the usual ANT
  block diagram. There is no input register and no output register.
  The reset is asynchronous and active low.
* **Adders of the main block.** Three 12-bit CLAs and a 2-bit carry merge are
  used. The composition is the usual one for Vedic multipliers built from
  half-width multipliers. The 4-bit lookahead group size is also a choice.
* **Column adders.** Inside `vedic_ut_mul` the column sums are written as
  additions and left to synthesis. The replica, by contrast, is an explicit
  array of `full_adder` cells, one ripple row per multiplier bit. Each row's
  ICV product is its carry into column 6.
  This row-by-row organisation is a choice of this design.
* **Threshold.** The comparison is strict (`>`). TH is computed from the
  maximum-error definition for this exact replica.
* **Unsigned operands only.**
* **Configuration.** The 12-bit main block with a 6-bit replica is the
  configuration built. N and M are parameters. N must be even, and M ≤ N; the
  replica always takes the top M bits.
  Besides the default, N = 16 with M = 8 (TH = 34368257) and N = 12 with M = 8
  (TH = 128177) are verified end to end.
* **Not modelled.** The undervolted supply of the main block, and therefore
  its real timing-error behaviour. Power, area and maximum-frequency figures
  depend on the technology and are outside the RTL.

## Simulating

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>` at the end. Run a testbench from the
project root, for example the top-level one:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/ant_pkg.sv tb/tb_ant_vedic_top.sv --top-module tb_ant_vedic_top -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_cla_adder` | corners and 50,000 random additions, at 12 and 10 bits |
| `tb_vedic_ut_mul` | all 4096 6 × 6 products; 20,000 random 8 × 8 products |
| `tb_vedic_mul12` | corners, all single-bit operand pairs, 200,000 random products |
| `tb_rpr_fixed_width` | all 4096 inputs against a row-wise reference, the flags, the 0 to +2 error bound, the worked example above |
| `tb_ant_error_correction` | reset, one-clock latency, selection exactly at TH and TH+1, 5,000 random pairs |
| `tb_ant_vedic_top` | recomputes TH, 20,000 error-free products (all must pass through unchanged), 4,000 products with one flipped bit (corrected when above TH, passed when not; flips of bits 20 to 23 always corrected; a corrected output never more than TH from the true product), a back-to-back stream; counts each case and fails if any never occurs |
| `tb_ant_vedic_variants` | the top at N = 16, M = 8 and at N = 12, M = 8 (through the helper `tb/ant_variant_check.sv`), each with its recomputed threshold, error-free and one-bit-error products |

`tb_ant_vedic_top` runs the top with all parameters at their defaults and
finishes in well under a second.
