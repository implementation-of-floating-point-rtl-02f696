# 32-bit floating-point and logarithmic arithmetic units

This design holds two 32-bit real-number arithmetic units side by side, so
that the two number systems can be compared:

* an **IEEE-754 single-precision unit** (sign, 8-bit biased exponent,
  23-bit fraction), and
* a **logarithmic number system (LNS) unit**. A number is stored as its sign
  and the base-2 logarithm of its magnitude, as an 8.23-bit two's-complement
  fixed-point value.

Each unit adds, subtracts, multiplies and divides. The point of the
comparison is this trade-off. In the LNS, multiplication and division become
a single fixed-point addition or subtraction of the logs. Addition and
subtraction, on the other hand, need a non-linear function of the log
difference, and that function costs either ROM or a long datapath. The LNS
unit contains both ways of evaluating it described in the paper this design
follows, *Implementation of Floating Point and Logarithmic Number System
Arithmetic Unit and Their Comparison for FPGA*:

1. a ROM of function samples with second-order interpolation, and
2. a bit-by-bit multiplicative normalisation that needs only two 23-word
   constant tables.

Everything is combinational: no clock, no reset and no handshake. A result
is valid one propagation delay after the operands change. The source design
reports each operation by its total combinational delay, and the RTL keeps
that form.

## Number formats

| field | FP (`fp_pkg::fp32_t`) | LNS (`lns_pkg::lns32_t`) |
|---|---|---|
| bit 31 | sign | sign |
| bits 30:23 | exponent, bias 127 | integer part of log2\|x\|, two's complement |
| bits 22:0 | fraction, hidden leading 1 | fraction of log2\|x\| |
| value | (-1)^S · 2^(E-127) · 1.F | (-1)^S · 2^(I.F) |
| range | about 1.2e-38 to 3.4e38 | 2^-128 to 2^128 (about 2.9e-39 to 3.4e38) |

The LNS format has no natural encoding for zero. This design reserves the
most negative log, -128.0 (bits 30:0 = `0x40000000`), as the **zero code**.
Exact cancellation (A - A) produces it, a zero-code operand acts as zero in
every operation, and underflow returns it.

For FP, exponent 0 is read as zero and denormals are flushed to zero.
Exponent 255 follows IEEE-754, without raising a flag. A NaN operand,
inf - inf, 0 * inf, inf / inf and 0 / 0 give the quiet NaN `0x7FC00000`.
Otherwise an infinite operand gives a signed infinity, and a finite number
divided by infinity gives a signed zero. The source reserves exponents 0 and
255 for special cases but does not list them; these rules are the standard
ones.

## Top level: `fp_lns_top`

| port | dir | width | meaning |
|---|---|---|---|
| `fp_a`, `fp_b` | in | 32 | FP operands |
| `fp_op` | in | 2 | 0 add, 1 sub, 2 mul, 3 div (`fp_pkg::arith_op_e`) |
| `fp_z` | out | 32 | FP result |
| `fp_overflow`, `fp_underflow` | out | 1 | exponent above 254 (result ±inf) / below 1 (result ±0) |
| `lns_a`, `lns_b` | in | 32 | LNS operands |
| `lns_op` | in | 2 | same operation codes |
| `lns_alg` | in | 1 | add/sub algorithm: 0 = ROM + interpolation, 1 = multiplicative normalisation |
| `lns_z` | out | 32 | LNS result |
| `lns_overflow`, `lns_underflow` | out | 1 | log above its largest value (result saturated) / at or below -128 (zero code) |

The hierarchy:

```
fp_lns_top
├── fp_alu              op select
│   ├── fp_addsub       add / subtract
│   ├── fp_mul
│   └── fp_div
└── lns_alu             op select, sign routing, algorithm select
    ├── lns_add_alg1 ── lns_interp                 (184-word ROM)
    ├── lns_sub_alg1 ── lns_interp ×2              (184-word coarse + 128-word fine ROM)
    ├── lns_add_alg2 ── lns_pow2_neg, lns_log2_bitwise
    ├── lns_sub_alg2 ── lns_pow2_neg, lns_log2_bitwise
    ├── lns_mul
    └── lns_div
```

## The floating-point unit

`fp_addsub` follows the textbook sequence:

1. Order the operands so that |X| ≥ |Y|. The result takes X's sign and
   exponent.
2. Shift 1.M_Y right by the exponent difference.
3. Add or subtract the significands, depending on the effective signs.
4. Normalise: one place right on a carry-out, or left by the leading-zero
   count after a cancellation.
5. Round, then range-check the exponent.

The aligned significand keeps guard, round and sticky bits, so the result is
correctly rounded to nearest-even. The source algorithm lists no rounding
step for addition. It rounds only in multiplication, and it describes no
left normalisation after subtraction. Both are added here so that the unit
is IEEE-exact.

`fp_mul` forms the 48-bit product of the two 24-bit significands. The
exponent is E_A + E_B - 127, with at most one normalising shift, and the
result is rounded to 24 bits (nearest-even).

`fp_div` computes E_A - E_B + 127. A restoring shift-and-subtract array
produces 26 quotient bits, and the remainder supplies the sticky bit. The
result is normalised by at most one left shift and rounded to nearest-even.
Division by zero sets overflow and returns a signed infinity. The source only
gives the divider's function, so the array structure is this design's
choice.

All three FP units match a double-precision reference bit for bit, flags
included, over tens of thousands of random and corner-case operands.

## The LNS unit

### Multiply and divide

`lns_mul` computes E_Z = E_A + E_B and `lns_div` computes E_Z = E_A - E_B.
The result sign is S_A xor S_B. The sum or difference is formed in 34 bits
and then checked: above the largest log it saturates with `overflow`, and at
or below -128 it becomes the zero code with `underflow`. Division by the zero
code sets overflow. These units are exact.

### Add and subtract: the Gaussian logarithms

With |X| ≥ |Y| and d = E_X - E_Y ≥ 0:

* |X| + |Y| has log E_X + log2(1 + 2^-d)
* |X| - |Y| has log E_X + log2(1 - 2^-d)

The adder units handle operands of equal sign, and the subtractor units
compute A - B for operands of equal sign. `lns_alu` maps signed operands onto
them:

* For subtraction it inverts B's sign.
* Operands whose signs then agree go to the adder.
* Otherwise it sends A and -B to the subtractor.

The subtractor gives the result A's sign when |A| ≥ |B|, and the opposite
sign otherwise. Both algorithms are built and computed in parallel, and
`lns_alg` picks one.

log2(1 + 2^-d) is smooth and falls from 1 at d = 0 to below one LSB
(2^-23) beyond d ≈ 23. log2(1 - 2^-d) is the hard one: it goes to -∞ as
d → 0, and its derivatives grow like 1/d^n. Subtraction of nearly equal
numbers is therefore where the LNS loses accuracy or needs extra ROM.

### Algorithm 1: ROM + second-order interpolation (`lns_interp`)

`lns_interp` holds N samples f(k·h) as Q8.23 words, with h = 2^-STEP_LOG2.
It evaluates the Newton forward quadratic through three neighbouring samples:

```
f(d) ≈ f_i + t·(f_{i+1} - f_i) + t(t-1)/2 · (f_{i+2} - 2f_{i+1} + f_i),   t = d/h - i
```

This takes two wide multiplies and a few adds. In the last interval the
stencil moves back by one sample, which is a short extrapolation. The sample
values are computed at elaboration from the formula, rounded to nearest, so
no table file is involved.

* **Adder** (`lns_add_alg1`): 23·2^STEP_LOG2 samples over 0 ≤ d < 23. The
  default STEP_LOG2 = 3 gives the 184-word ROM; STEP_LOG2 = 2 gives the
  92-word variant. For d ≥ 23 the correction is dropped.
* **Subtractor** (`lns_sub_alg1`) has two tables:
  * A coarse table, the same size as the adder's, samples 0 < d ≤ 23.
  * For d ≤ 0.5, a fine table holds 2^(L+2) samples at spacing 2^-(L+3),
    with L = FINE_LEVELS (default 5, giving 128 samples at 1/256).

  Neither table holds a sample at the pole d = 0.

  The source describes ROM sizes of 184, 192, 208, 240, 304 and 432 words.
  Each step adds values only for 0 < d < 0.5 and leaves the rest unchanged.
  The increments are 8, 16, 32, 64 and 128 words. Here each increment is read
  as one more level that doubles the sample density over the whole of
  (0, 0.5]. That reading reproduces both the sizes and the reported accuracy
  trend. Because the finest level makes the coarser ones redundant, only it
  is stored. The RTL's default subtractor therefore holds 184 + 128 = 312
  words for what the source counts as its 432-word configuration.

Measured log error, in LSBs of the 23-bit fraction:

| d range | adder, 184 words | subtractor, default |
|---|---|---|
| 0.5 ≤ d < 23 | ≤ 50 | ≤ 14 000 |
| 1/4 ≤ d < 1/2 | ≤ 50 | ≤ 7 |
| 1/8 ≤ d < 1/4 | ≤ 50 | ≤ 45 |
| 1/32 ≤ d < 1/8 | ≤ 50 | ≤ 2 300 |
| 1/128 ≤ d < 1/32 | ≤ 50 | ≤ 73 000 |
| 1/256 ≤ d < 1/128 | ≤ 50 | ≤ 300 000 |
| d < 1/256 | ≤ 50 | large: the quadratic cannot follow the pole |

The 92-word adder stays within about 390 LSB. Below the first fine sample
(d < 2^-8) the subtractor only extrapolates. Its result keeps the right sign
and stays below |X|, but its log can be several units off. This limitation
comes with the method; use algorithm 2, or the FP unit, where such
cancellations matter.

Example results for A - B with the subtractor's size swept (`tb_lns_rom_sizes`):

| A − B | exact | 184 | 192 | 208 | 240 | 304 | 432 |
|---|---|---|---|---|---|---|---|
| 57.88618 − 16.92117 | 40.96501 | 40.96383 | same | same | same | same | same |
| 54.24420 − 48.25241 | 5.99179 | 5.84512 | 5.96853 | 5.98789 | 5.99151 | 5.99173 | 5.99178 |
| 57.88618 − 48.25241 | 9.63377 | 9.60524 | 9.62510 | 9.63197 | 9.63365 | 9.63374 | 9.63377 |

In the first row d = 1.77, so only the coarse table is involved and the
result does not depend on the fine levels.

### Algorithm 2: multiplicative normalisation

This algorithm avoids a function table.

**`lns_pow2_neg`** computes m = 2^-d. It writes d = I + F and uses
2^-d = 2^(1-F) / 2^(I+1). The power 2^(1-F) is the product of
rom1[j] = 2^(2^-j) over the set bits j of 1 - F, and the division is a right
shift by I + 1. That makes 23 conditional multiplies.

**`lns_log2_bitwise`** computes log2(y) for y = 1 + m in [1, 2]. First, if
y ≥ 2, the integer bit is set and y is halved. Then for j = 1..23: if
y ≥ 2^(2^-j), result bit 2^-j is set and y is multiplied by rom2[j] = 2^(-2^-j).
That makes 23 compare-and-multiply stages, and the result is truncated.

**For subtraction**, 1 - m lies in (0, 1). It is first shifted left by its
leading-zero count p into [1, 2), and p is then subtracted from the log.
The source simply reuses the addition steps here; this normalisation is
this design's addition.

The two 23-word constant tables are computed at elaboration. Internal values
carry FW = 56 fraction bits, a choice of this design. With them, both units
stay within about 1 LSB of the exact result down to d ≈ 2^-20. The price is a
chain of 46 wide multipliers per unit. The source found this impractical on
an FPGA, at roughly 13 times the delay of algorithm 1.

## Departures and choices

* **FP rounding:** round-to-nearest-even in all FP operations. The source
  rounds only in multiplication and division, without naming a mode.
* **FP specials:** denormals are flushed to zero. Infinities and NaNs follow
  IEEE-754 without flags. Overflow gives ±inf and underflow ±0.
* **Division:** the source's division steps repeat the multiplication
  formulas (E_A + E_B, "multiply the mantissas"). The RTL divides:
  E_A - E_B (+127 for FP) and a true significand division.
* **LNS zero code and saturation:** these conventions are this design's
  own.
* **Result sign of LNS subtraction:** the source gives the result the sign
  of the larger operand even for A - B with |B| > |A|. The RTL returns the
  mathematically correct sign.
* **Algorithm-1 ROM layout:** as described above. The fine subtraction table
  stores only the finest level, 312 words instead of 432.
* **Algorithm-2 word width:** FW = 56 internal fraction bits. The source
  does not state a width.

## Simulation

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M`, and a watchdog ends it if it hangs. The
reference models in `tb/tb_ref_pkg.sv` use double-precision reals, so they
are independent of the RTL arithmetic.

| testbench | covers |
|---|---|
| `tb_fp_addsub`, `tb_fp_mul`, `tb_fp_div`, `tb_fp_alu` | bit-exact FP results and flags |
| `tb_lns_mul`, `tb_lns_div` | exact LNS products and quotients, flags |
| `tb_lns_add_alg1`, `tb_lns_sub_alg1`, `tb_lns_add_alg2`, `tb_lns_sub_alg2` | log error within the bounds above, over many octaves of d |
| `tb_lns_alu` | all operations, both algorithms, sign routing |
| `tb_lns_rom_sizes` | 92/184-word adder and 184…432-word subtractor on the example operands; error never grows with ROM size |
| `tb_fp_lns_top` | the whole design at default sizes: the example operands in both number systems, random traffic, and a count of every mechanism (carry and cancellation normalisation, rounding, FP/LNS overflow and underflow, divide by zero, FP infinity and NaN operands, both algorithms, fine table, zero code) |

To run one with Verilator (packages first):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/fp_pkg.sv rtl/lns_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/tb_ref_pkg.sv tb/tb_fp_lns_top.sv --top-module tb_fp_lns_top
./obj_dir/Vtb_fp_lns_top
```

Every testbench finishes in well under a second.

## Changing the design

* **Adder ROM size:** `lns_alu` parameter `ADD_STEP_LOG2` gives
  23·2^n words.
* **Subtractor:** `SUB_STEP_LOG2` sets the coarse table and `SUB_FINE` the
  number of fine levels (0 = no fine table).
* **Algorithm-2 precision:** `FW` sets the internal width of the algorithm-2
  units.
* **Pipelining:** to pipeline, register the operands and results in
  `fp_alu` / `lns_alu`. The long paths are the FP divider array and, above
  all, the two algorithm-2 multiplier chains, which would be the natural
  places to insert stages.
