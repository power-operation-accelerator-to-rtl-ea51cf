# Fastpow: a 4-cycle specular power inside a floating-point multiplier

Phong lighting needs the specular term `(R·V)^Srm = (cos a)^Srm` once per
vertex and light source. On a general-purpose FPU this power costs 100–250
cycles (log2, multiply, exp2 in microcode or a software library). Fastpow
gets it in **4 cycles** for very little extra hardware. It approximates the power
closely enough for shading, and adds it to an ordinary single-precision
multiplier:

```
(cos a)^Srm = 2^( Srm * log2(cos a) )
```

* `log2(cos a)` is a three-segment piecewise-linear function of the
  IEEE-754 word. It costs one 32-bit carry-save adder row and one 32-bit
  carry-select adder.
* `Srm * log2(cos a)` is a fixed-point multiply. It runs on the
  multiplier's own 24x24 Booth/Wallace array, which otherwise multiplies
  significands.
* `2^(-z)` is a linear approximation of the fraction. It costs one 8-bit
  adder and an inverter row.

So the same pipeline does either `a*b` (FMUL) or `(cos a)^Srm` (POW). It
accepts one operation per cycle and returns each result 4 cycles later.

## The arithmetic

### Logarithm straight from the FP word

For a positive normal single `w = {0, E[7:0], x[22:0]}`,
`log2(w) = (E - 127) + log2(1 + x)`, with `x` read as a fraction. The
function `log2(1+x)` is replaced by three lines that meet at the segment
edges:

| segment          | selected by `x[22:21]` | approximation of `log2(1+x)` |
|------------------|------------------------|------------------------------|
| 0 ≤ x < 0.25     | `00`                   | `1.25x = x + (x>>2)`         |
| 0.25 ≤ x < 0.75  | `01`, `10`             | `x + 1/16`                   |
| 0.75 ≤ x < 1     | `11`                   | `0.75x + 1/4 = x - (x>>2) + 1/4` |

The segment is decoded with one gate per output: hi = AND, mid = XOR,
lo = NOR of `x[22:21]` (`range_detect`).

The key trick is to treat the whole 32-bit word as an unsigned fixed-point
number with 23 fraction bits. Then `w = E + x`, and the bias becomes
`BIAS_FX = 127 << 23 = 0x3F800000`. Since `cos a ≤ 1`, the log is never
positive, so the unit produces its magnitude `M = -log2(cos a)`. With
`~v = -v - 1`, each segment becomes a sum of exactly three terms:

```
lo : M = (BIAS_FX + 2)          + ~w + ~(x>>2)
mid: M = (BIAS_FX + 1 - 1/16)   + ~w + 0
hi : M = (BIAS_FX + 1 - 1/4)    + ~w +  (x>>2)
```

In the fixed-point scale, 1/16 is `0x00080000` and 1/4 is `0x00200000`.
The three constants are therefore `0x3F800002`, `0x3F780001` and
`0x3F600001` (`fastpow_pkg`). A 3:2 CSA row reduces the three operands to
a sum word and a carry word, and a 32-bit carry-select adder adds them,
modulo 2^32 (`log_approx`). The result is exact to the line equations.
Compared with the true logarithm, the error is at most 0.024, near
x = 0.5.

### Fixed-point product

* `M` has 8 integer bits and 23 fraction bits. Taking `M[30:7]`
  (a shift right by 7) gives a 24-bit number in 8.16 format.
* `Srm` sits in a special register (`srm_reg`), also as unsigned 8.16.
  For example, 10.16 is stored as `0x0A28F6` and 80.01 as `0x50028F`.
* The 24x24 multiplier forms `P = M8.16 * Srm`, a 16.32 number.
* `pow_scale_sat` drops the low 9 bits and splits `P` into:
  * the integer `n = P[39:32]`
  * the fraction `y = P[31:9]`, 23 bits
* If the integer part does not fit in 8 bits (`P[47:40] != 0`), the value
  saturates to `n = 255`, `y = all ones`, and `out_pow_sat` flags it.

### Exponential

`2^-(n+y) = 2^-(n+1) * 2^(1-y) ≈ 2^-(n+1) * (1 + (1-y))` (`exp_approx`):

* The exponent field is `127 + ~n`, the output of one 8-bit adder, which
  equals `126 - n`. The adder's carry-out doubles as the underflow
  detector: there is no carry exactly when `n ≥ 127`.
* The mantissa field is `~y`. That is `1 - y` minus one unit in the last
  place, so no incrementer is needed.
* A result whose exponent field would be ≤ 0 (`n ≥ 126`) is flushed
  to +0. Its true value is below 2^-126 in any case.

The relative error of `2^f ≈ 1 + f` is at most +6.1%. The whole chain
(log2, multiply, exp2) is monotonic in `cos a`: a brighter point can never
come out darker than a neighbour that is less bright. The testbenches check
this on full sweeps.

### Accuracy

These figures compare the result against the true power (`$pow` in double
precision). Each sweep takes 4096 uniform steps of `cos a` in (0, 1]:

| Srm   | mean abs. error | max abs. error |
|-------|-----------------|----------------|
| 10.16 | 0.0039          | 0.038          |
| 80.01 | 0.00029         | 0.035          |

Over all Srm values, the largest absolute error is about 0.05. It occurs
at small exponents, for example cos a = 0.875 with Srm = 2.75.

The original description of the unit quotes a mean absolute error of
0.000018 against a library `pow()`. It does not say how the points were
sampled, and the equations above do not reach that figure with uniform
sampling. The error is dominated by the two linear approximations, and the
RTL does not try to reduce it.

What matters for shading is the rendered intensity. In a 64x64 test image
of a lit sphere (Srm = 10.16, 3228 lit pixels), the 8-bit specular level
from the unit matches the exact power's level in 84% of pixels. The mean
difference is 0.50 level and the largest is 10 of 255, found on the steep
flank of the highlight. The brightest pixel stays where it was.

## Pipeline and timing

```
            stage 1                stage 2            stage 3                  stage 4
in_a ──► decode / log_approx ─┐
in_b ──► significands ────────┼► mux ─► Booth/Wallace ─► 48b carry-select ─┬► exp_approx ──────┐
Srm  ─────────────────────────┘        tree (sum,carry)   adder             │  (POW)             ├► out_result
                                                          └ pow_scale_sat ──┘  fp_round_align ──┘
                                                                               (FMUL)
```

* Stage 1 unpacks the operands and runs the POW log approximation. The
  two multiplier inputs are then chosen: either `{1.mant_a, 1.mant_b}`
  (FMUL) or `{M >> 7, Srm}` (POW).
* Stage 2 is the radix-4 Booth recoder: 13 partial products plus one
  correction row. A Wallace tree of 3:2 CSAs reduces them to two 48-bit
  words.
* Stage 3 is a 48-bit carry-select adder. The POW shift and saturation
  happen in the same stage.
* Stage 4 depends on the operation:
  * POW uses the exponential approximation.
  * FMUL uses `fp_round_align`. It builds the two normalisation candidates
    (product < 2 or ≥ 2), chooses one, rounds to nearest-even and packs
    the word.

An operation sampled with `in_valid` at clock edge *t* appears on
`out_result` with `out_valid` after edge *t+4*. The pipeline has no stalls
and no back-pressure, and FMUL and POW may be mixed freely, back to back.
A POW reads `Srm` in the cycle it issues, so a write to the register only
affects operations issued after it.

### Ports of `fastpow_fpmul`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock. Active-low synchronous reset of the valid bits and `Srm` |
| `in_valid` | in | 1 | issue an operation |
| `in_op` | in | `fpu_op_e` | `OP_FMUL` or `OP_POW` |
| `in_a` | in | 32 | FMUL operand A. For POW, `cos a` |
| `in_b` | in | 32 | FMUL operand B. Ignored by POW |
| `srm_we`, `srm_wdata` | in | 1, 24 | write `Srm` (8.16 unsigned) |
| `srm_q` | out | 24 | current `Srm` |
| `out_valid`, `out_op`, `out_result` | out | 1, 1, 32 | result |
| `out_pow_sat` | out | 1 | the POW integer exponent saturated |

### Operand domain and special values

* **POW, cos a > 0:** any positive normal `cos a ≤ 1` is evaluated as
  described above.
* **POW, cos a ≤ 0:** a negative, zero or subnormal `cos a` returns +0,
  like the usual `max(R·V, 0)` clamp.
* **POW, cos a ≥ 1:** `cos a ≥ 1`, infinity and NaN are evaluated as
  `cos a = 1`. The result is `1 - 2^-24`, because of the one's-complement
  mantissa.
* **FMUL:** IEEE single precision with these rules:
  * rounding is to nearest, ties to even
  * subnormal inputs and results are flushed to signed zero
  * overflow gives signed infinity
  * NaN and `0 * inf` give the quiet NaN `0x7FC00000`

## Modules

| file | role |
|------|------|
| `rtl/fastpow_pkg.sv` | operation enum, FP field struct, range enum, bias and segment constants, fixed-point formats |
| `rtl/fastpow_fpmul.sv` | top: 4-stage FMUL/POW pipeline |
| `rtl/range_detect.sv` | segment decode from `x[22:21]` |
| `rtl/log_approx.sv` | `-log2(cos a)`: constant select, `csa`, `carry_select_adder` |
| `rtl/csa.sv` | row of full adders (3:2 carry-save adder) |
| `rtl/carry_select_adder.sv` | blocked carry-select adder. `W`, `BLK` (default 8) |
| `rtl/booth_wallace_tree.sv` | radix-4 Booth partial products and Wallace reduction. `N` (default 24) |
| `rtl/pow_scale_sat.sv` | shift by 9 and 8-bit integer saturation |
| `rtl/exp_approx.sv` | `2^-(n+y)` with an 8-bit exponent adder |
| `rtl/fp_round_align.sv` | FMUL normalise / round / align |
| `rtl/srm_reg.sv` | the `Srm` register |

## Design choices

These parts follow the published Fastpow scheme:

* the three-segment log and the linear exp
* the rewriting of the log as a CSA plus a carry-select adder
* the 8.16 formats, the shifts by 7 and by 9, and saturation to the
  largest value
* the sharing of the multiplier, and the 4-cycle latency

These are choices made for this implementation:

* **Segment constants:** they are derived from the line equations in the
  23-fraction-bit scale of the FP word (see above).
* **Exponential mantissa:** it is `~y` rather than `1 - y`.
* **Multiplier width:** the final multiplier adder covers all 48 product
  bits, because FMUL rounding and the 16.32 POW product both need them.
* **Booth and Wallace structure:** the Booth recoding is radix-4, negative
  rows take a correction row, and the Wallace grouping is level by level.
* **Carry-select blocks:** 8 bits wide.
* **Pipeline cut:** the registers sit at the stage boundaries listed above.
* **Interface:** `cos a` arrives on operand A, with a valid-only handshake
  and synchronous reset.
* **POW edge cases:** the clamping of inputs outside (0, 1] and the flush
  of tiny results to zero.
* **FMUL edge cases:** rounding mode, subnormal flushing and NaN encoding.

The divide and square-root operations of the FPU that hosts Fastpow use
Newton-Raphson iteration. They are not part of this RTL.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/fp_ref_pkg.sv` holds the reference models:

* exact double-precision FMUL with nearest-even rounding
* a plain-integer model of the POW equations

The RTL is written with carry-save tricks; the models are written
independently of that structure.

| testbench | what it does |
|-----------|--------------|
| `tb_fastpow_fpmul` | 20,000 random mixed FMUL/POW operations with bubbles and `Srm` rewrites, at the default configuration. Checks every result bit-exactly, checks the 4-cycle latency and in-order delivery, and bounds the POW error against `$pow`. Counts each mechanism and fails if one never happened: the three segments, saturation, underflow flush, POW clamps, FMUL overflow/underflow/NaN/inf, mode switches, `Srm` writes and back-to-back issue |
| `tb_specular_sweep` | the two specular curves (Srm = 10.16 and 80.01) over 4096 values of `cos a`. Checks bit-exactness, monotonicity, error bounds and one result per cycle |
| `tb_phong_highlight` | shades a 64x64 sphere's specular highlight through the unit. Checks bit-exactness, the 8-bit level difference from the exact power, and that the peak does not move |
| `tb_<block>` | unit tests of each leaf block: exhaustive or random, with corner cases |

With plain Verilator (5.x), for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/fastpow_pkg.sv tb/fp_ref_pkg.sv tb/tb_fastpow_fpmul.sv \
  --top-module tb_fastpow_fpmul -Mdir obj_top
./obj_top/Vtb_fastpow_fpmul
```

(`-y` lets Verilator find each module in the file of the same name.) Swap in another testbench file and top module to run the other tests. Every
test takes a few seconds. The design is small: about 330 flip-flops and a
24x24 multiplier.
