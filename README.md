# FPLM: a logarithmic floating-point multiplier

A floating-point multiplier spends most of its area and power on the mantissa
multiplier and the rounding logic that follows it. Neural-network training
tolerates small arithmetic errors, so this design replaces the mantissa
multiplication by an addition in the logarithm domain. What it takes is one
small adder for the mantissas, one adder for the exponents, a few
multiplexers and four gates. It has no multiplier array and no rounding unit.

The key idea is that an IEEE 754 word already holds most of a logarithm. The
exponent is the integer part of log2|N|. The fraction x of the mantissa
`1.M` approximates the fractional part, since `log2(1+x) ~ x` (Mitchell's
approximation). A plain Mitchell multiplier always takes the power of two
*below* the operand, so it always underestimates the product, and those
errors pile up during training. This design takes the *nearest* power of two
instead. In IEEE 754 that choice is free: it is just the first mantissa bit.
An operand with `x >= 0.5` is treated as `2^(E+1) * (1+x)/2`, and its
logarithm fraction becomes negative. Operands below the midpoint are
underestimated and operands above it are overestimated, so the product error
has both signs. When many products are summed, these errors partly cancel.

The RTL is parameterised by exponent width `EXP_W` and mantissa width `MAN_W`.
The defaults (8, 23) give IEEE 754 single precision. Half precision (5, 10),
Bfloat16 (8, 7) and the (1, 5, 2) FP8 format are the other intended settings.

## The arithmetic

For an operand `N = (-1)^S * 2^(E-bias) * (1+x)`, the nearest-power-of-two form
is

```
x <  0.5 :  E' = E,      x' = x                 (x' in [0, 0.5))
x >= 0.5 :  E' = E + 1,  x' = (1+x)/2 - 1       (x' in [-0.25, 0))
```

`x'` is the approximate log2 of the converted mantissa. For `P = A * B`:

```
s   = x'_A + x'_B                                  s in [-0.5, 1)
s >= 0 :  mantissa 1 + s,        E_P = E'_A + E'_B - bias
s <  0 :  mantissa 2 * (1 + s),  E_P = E'_A + E'_B - bias - 1
sign  = S_A xor S_B
```

The step `1 + s` is the antilogarithm approximation `2^s ~ 1 + s`. It errs in
the opposite direction to `log2(1+x) ~ x`, which also offsets part of the
error. When `s` is negative, `1 + s` lies in [0.5, 1) and has to be doubled to
become a normalised mantissa.

Worked examples (single precision):

| A x B | x'_A, x'_B | s | result | exact |
|---|---|---|---|---|
| 1.25 x 1.25 | 0.25, 0.25 | 0.5 | 1.5 | 1.5625 |
| 1.5 x 1.5 | -0.25, -0.25 (both exponents +1) | -0.5 | mantissa 2(1 - 0.5) = 1, exponent 0+1+1-1 = 1: 2.0 | 2.25 |
| -3 x 0.5 | -0.25 (3 = 1.5 x 2), 0 | -0.25 | -1.5 | -1.5 |

## Datapath

```
        a                      b
        |                      |
   fp_unpack              fp_unpack ---> special_cases --+
   |    |   \              /   |    |                    |
   S_A  E_A  M_A         M_B  E_B  S_B                   |
   |    |     |           |    |    |                    |
   |    |   fp_le       fp_le  |    |                    |
   |    |     \  M'_A  M'_B /  |    |                    |
   |    |    mantissa_adder    |    |                    |
   |    |     |         |      |    |                    |
   |    |   M'_P[q]   mantissa |    |                    |
   |    |     |         |      |    |                    |
   |    | carry_in_gen  |      |    |                    |
   |    |     | cin     |      |    |                    |
   |   exponent_adder --+------+    |                    |
   |        |           |           |                    |
   +------ xor ---------+-----------+                    |
                 fplm_pack <-----------------------------+
                     |
                  p, flags
```

Everything is combinational. A product and its flags are valid one
propagation delay after the operands change. There are no registers, no
clock and no handshake.

### Logarithm estimator (`fp_le`)

The estimator turns the q-bit explicit mantissa `M` into `M'`, a (q+1)-bit
two's-complement number with q fraction bits. The top mantissa bit `M[q-1]`
says whether `x >= 0.5`, and it drives a 2-to-1 multiplexer:

```
M[q-1] = 0 :  M' = 0 . M[q-1] M[q-2] ... M[0]          = x
M[q-1] = 1 :  M' = 1 . 1 M[q-1] ... M[1]               = (1+x)/2 - 1
```

In the second case the integer bit of `M'` is the sign bit (-1). The
fraction bits are `(1+x)/2`, which is `1.M` shifted right by one place. This
drops `M[0]`, so the halved mantissa is truncated, not rounded.

### Mantissa sum and normalisation (`mantissa_adder`)

`M'_P = M'_A + M'_B` is a (q+1)-bit two's-complement add. Its range [-0.5, 1)
always fits, so the carry out is discarded. The leading 1 of `1 + s` is never
added, because it does not change the explicit mantissa bits. The sign bit
`M'_P[q]` selects the output:

```
M'_P[q] = 0 :  explicit mantissa = M'_P[q-1:0]
M'_P[q] = 1 :  explicit mantissa = {M'_P[q-2:0], 0}
```

When the sum is negative, `1 + s = 0.M'_P[q-1:0]` with `M'_P[q-1] = 1`.
Doubling it gives `1.M'_P[q-2:0]0`. The bit shifted in is always 0, so a
doubled result has an even mantissa.

### One exponent adder with a computed carry-in (`carry_in_gen`, `exponent_adder`)

This is the least obvious part of the design. The exponent needs three
corrections to `E_A + E_B`:

- +1 if `M_A[q-1] = 1`, because A was moved up to the next power of two;
- +1 if `M_B[q-1] = 1`, for the same reason;
- -1 if `M'_P[q] = 1`, because the mantissa was doubled.

That looks like a net correction of -1 to +2. But the mantissa sum limits the
cases:

- If both top bits are 0, both `x'` are non-negative, so the sum cannot be
  negative.
- If both top bits are 1, both `x'` are negative, so the sum must be negative.

The net correction `M_A[q-1] + M_B[q-1] - M'_P[q]` is therefore always 0 or 1.
It is exactly the carry-in of a single adder:

| M_A[q-1] | M_B[q-1] | M'_P[q] | carry-in |
|---|---|---|---|
| 0 | 0 | 0 | 0 |
| 0 | 1 | 0 | 1 |
| 0 | 1 | 1 | 0 |
| 1 | 0 | 0 | 1 |
| 1 | 0 | 1 | 0 |
| 1 | 1 | 1 | 1 |

`cin = (M_A & M_B) | ((M_A | M_B) & ~M'_P[q])` covers all six rows. It uses
four two-input gates once the inversions are absorbed. The exponent adder
computes `E_A + E_B + cin` one bit wider than the exponents, so the sum never
wraps.

The carry-in depends on the mantissa sum's sign bit. The critical path
therefore runs through the mantissa adder, then this logic, then the exponent
adder.

### Exceptions and packing (`special_cases`, `fplm_pack`)

The multiplier works out exceptions from the operand classes and from the
final exponent:

| condition | result | flag |
|---|---|---|
| NaN operand, or infinity x zero | quiet NaN `0 11..1 10..0` | `invalid` |
| infinity operand (otherwise) | signed infinity | - |
| zero operand | signed zero | - |
| subnormal operand | treated as zero: signed zero | `flushed` |
| `E_A + E_B + cin - bias >= 2^EXP_W - 1` | signed infinity | `overflow` |
| `E_A + E_B + cin - bias <= 0` | signed zero | `underflow` |
| otherwise | `{S_A^S_B, E_A+E_B+cin-bias, mantissa}` | - |

The flags come out as the packed struct `fplm_pkg::fp_flags_t`
`{invalid, overflow, underflow, flushed}`. Subnormals are neither accepted nor
produced. There is no rounding: the result is approximate by design, so the
bits are simply truncated.

## Accuracy

Every product matches, bit for bit, a real-number model of the equations
above. The figures below were measured over 10^6 random operand pairs per
distribution. Each operand is truncated into the format, and the error is
taken relative to the exact product of the unquantised inputs:

| format | MRED, uniform [1,2) | MRED, standard normal |
|---|---|---|
| single (8, 23) | 0.0289 | 0.0288 |
| half (5, 10) | 0.0289 | 0.0292 |
| Bfloat16 (8, 7) | 0.0302 | 0.0300 |
| FP8 (5, 2) | 0.2310 | 0.2147 |

For comparison, a conventional Mitchell-style FP multiplier has an MRED of
about 0.038 to 0.044 in the three wider formats. In FP8 the two-bit mantissa
dominates the error, and the nearest-power-of-two trick no longer helps. The
error of a single product stays within about +/-11.2% of the exact value
(found by exhaustive search at half precision). For example, 1.5 x 1.5 gives
2.0, which is 11% low.

The average error (exact minus approximate) under uniform inputs is 0.0177
in Bfloat16 and 0.562 in FP8. In the two wider formats it is below 0.003,
because over- and underestimates cancel.

The half-precision figure under normal inputs depends on underflow handling.
Products of small operands leave the 5-bit exponent range and are flushed to
zero. Another subnormal policy would give a slightly different number.

## Cost and speed

The design was sized for a 28-nm CMOS standard-cell flow at 500 MHz. There,
a single-precision instance has a delay of about 1.7 ns, an area of about
270 um^2 and a power of about 67 uW. That is roughly a tenth of the area and
a twentieth of the power-delay product of an exact IEEE single-precision
multiplier. These figures come from the original evaluation. They have not
been reproduced with this RTL.

## Files

Modules in `rtl/` (one per file):

| file | role |
|---|---|
| `fplm.sv` | top: the complete multiplier, parameters `EXP_W`, `MAN_W` |
| `fplm_pkg.sv` | types `fp_class_t`, `spc_e`, `fp_flags_t` |
| `fp_unpack.sv` | field split and operand classification |
| `special_cases.sv` | NaN / infinity / zero decision from the two operand classes |
| `fp_le.sv` | logarithm estimator |
| `mantissa_adder.sv` | logarithm sum and normalising multiplexer |
| `carry_in_gen.sv` | exponent carry-in |
| `exponent_adder.sv` | `E_A + E_B + cin` |
| `fplm_pack.sv` | bias removal, overflow/underflow, result packing |

Top-level ports of `fplm`:

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | `1+EXP_W+MAN_W` | operands `{sign, biased exponent, mantissa}` |
| `p` | out | `1+EXP_W+MAN_W` | product |
| `flags` | out | 4 (`fp_flags_t`) | invalid, overflow, underflow, flushed |

`MAN_W` must be at least 2.

Testbenches in `tb/`:

- one per module, named `tb_<module>.sv`;
- `fplm_ref_pkg.sv`, the real-number reference model they share;
- `tb_fplm.sv`, the end-to-end test at single precision. It runs 20 000
  operand pairs mixing normal, near-overflow, near-underflow and special
  operands. It also counts each mechanism (both multiplexer settings, all
  six carry-in rows, each exception, errors of both signs) and fails if one
  never occurs.
- `tb_fplm_accuracy.sv`, which builds the four formats side by side and
  checks the MRED figures above.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Run from
the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fplm_pkg.sv tb/tb_fplm.sv --top-module tb_fplm -o sim
./obj_dir/sim
```

For another testbench, replace `tb_fplm` in both places, for example with
`tb_fplm_accuracy` (about 2 s). To build another format, instantiate
`fplm #(.EXP_W(e), .MAN_W(m))`. The reference model `fplm_ref_pkg::ref_mul`
takes the same two widths as arguments.

## Design choices not fixed by the algorithm

- **Exceptions.** The source only asks that overflow, underflow and NaN be
  reported from the operands and the result. The rules, the NaN encoding,
  flushing subnormals and the flag set are this implementation's choices.
- **Bias.** One bias is removed from `E_A + E_B + cin`, which follows the
  exponent equation (`E'_A + E'_B - bias`). A prose description of the
  original circuit speaks of "adding" the bias after the adder. Read
  literally, that would be wrong for biased inputs, so it is not followed.
- **Carry-in gates.** The carry-in logic is derived from its truth table.
  The exact gate types of the original circuit were not used.
- **No pipelining.** The multiplier is purely combinational, which matches
  its evaluation as a single-cycle unit at 500 MHz. Add registers around
  `fplm` if your clock needs them.
- **Truncation.** Truncation in the estimator (dropping `M[0]`) and in the
  doubling step are part of the algorithm, not simplifications.

## Not included

The design was also evaluated inside a two-input artificial neuron (Bfloat16,
two multipliers feeding a floating-point adder). That neuron is not provided.
Its adder was a third-party IP core, and the neuron's structure beyond
"two inputs" was never specified. The multipliers for such a neuron are
`fplm #(.EXP_W(8), .MAN_W(7))`. Training the networks it was tested on (MLPs
for the fourclass, HARS and MNIST datasets) is a software matter: there the
multiplier is emulated bit-accurately inside a training framework.
