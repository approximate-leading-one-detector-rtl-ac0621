# Approximate Mitchell multiplier with a cheap leading-one detector

This is a 32 x 32-bit unsigned multiplier that has no partial products. It
works in the logarithmic domain: each operand is turned into an approximate
base-2 logarithm, the two logarithms are added, and the sum is turned back
into a number. This is Mitchell's method. It has a mean relative error of
about 3.85 % on uniformly random operands and costs much less than an array
multiplier.

The design saves more hardware in two places, and neither changes the mean
error on full-range operands:

* **The leading-one detector (LOD)** is exact only for the upper 16 bits.
  When the operand is below 2^16, its leading-one position is guessed rather
  than detected. There are two variants of the guess: Design I and Design II.
* **The log adder** does not add its 16 least significant bits. They are set
  to the fixed pattern `1010...10`.

Operands of 2^16 and above get exactly the logarithm that a conventional
Mitchell multiplier would use. Only the 2^16 - 1 smallest non-zero operands
get a coarser one.

## Mitchell's method in this data path

Write an operand as N = 2^k (1 + m), with k the index of its leading one and
0 <= m < 1. Mitchell approximates log2 N by k + m. In hardware, this log is
the concatenation `{k, m}`:

* `k` has 5 bits.
* `m` has 31 bits. These are the operand bits right of the leading one,
  left-aligned as a binary fraction.

Adding two such words adds the characteristics and the mantissas at once.
A carry out of the mantissa field increments k, which is exactly Mitchell's
case split for m1 + m2 >= 1. The antilogarithm of the 37-bit sum `{k, m}`
is built as follows:

* put a 1 at bit k;
* place m directly below it;
* zero-fill the bits below m.

Worked example, with 8-bit numbers for readability:

* 45 = 00101101, so k1 = 5 and m1 = .01101.
* 147 = 10010011, so k2 = 7 and m2 = .0010011.
* The log sum is k = 12, m = .1000111.
* The result is 2^12 + 1000111b * 2^5 = 6368. The exact product is 6615.

## The leading-one detector tree

The exact 32-bit LOD is a tree of 4-bit slices.

* **`lod4`, the 4-bit slice.** It produces a one-hot word that marks the
  highest set bit. A "nothing found yet" signal ripples down from bit 3, and
  each input bit reaches the output only while that signal is still high.
* **Stage 1.** Eight slices, one per 4-bit field. Each field also has an OR
  gate that says whether the field is non-zero.
* **Stage 2.** One slice per 16-bit half, run on that half's four field-OR
  bits. It finds the most significant non-zero field.
* **Stage 3.** A 2-bit LOD (`lod2`) decides which half holds the leading
  one. Its output is `10` for the upper half, `01` for the lower half and
  `00` for zero.
* **Output gating.** The stage-3 result gates the stage-2 words. These in
  turn gate the stage-1 words, so exactly one output bit is set.

`lod16` is one half of this tree: stages 1 and 2 and the gating
multiplexers.

### Design I: a single fixed bias (`alod_d1`)

The four low slices and the stage-2 slice of the lower half are removed.
When the leading one lies in `a[15:0]`, the low half of the LOD output is
the constant `16'h0400`. In other words, the leading one is taken to be at
bit 10, whatever the low bits are. This is the cheapest variant and the
default.

### Design II: four biases, chosen by OR gates (`alod_d2`, `bias_sel16`)

The low slices are again removed, but the four field-OR gates remain. They
drive a priority choice between four one-hot words:

| non-zero field (highest) | assumed leading one | LOD low half |
|---|---|---|
| `a[15:12]` | bit 14 | `16'h4000` |
| `a[11:8]`  | bit 10 | `16'h0400` |
| `a[7:4]`   | bit 6  | `16'h0040` |
| `a[3:0]`   | bit 2  | `16'h0004` |

This keeps the estimate of a small operand within a factor of about 5 of its true value.
Design I can be off by up to about 1000x. Design II costs a little more.

In both designs the low-half OR gates also feed the stage-3 LOD, so a zero
operand is still recognised.

### What the guessed position does to the mantissa

`log_conv` turns the one-hot word into k with an OR-tree encoder. It forms m
by shifting the operand left by 31 - k and keeping 31 bits. Sometimes the
guessed position is below the true leading one: for example, operand
`0x8000` under Design I. The bits at and above the guessed position then
fall off the top of the shifter, and the logarithm underestimates the
operand. If the guess is above the leading one, the logarithm overestimates
it. Small operands therefore err in both directions. The file
`tb/alm_log_error_tb.sv` sweeps N = 1 to 2^20 - 1 and prints the largest
absolute error |N - 2^(k+m)| for N below 2^16:

| | largest error below 2^16 |
|---|---|
| Design I | 63 576 |
| Design II | 34 178 |
| Conventional Mitchell, on [2^16, 2^20) | 45 126 |

## The approximate log adder (`approx_log_add`)

Only bits `[35:ADD_APPROX]` of the two logs go through an adder. The
ADD_APPROX low bits of the sum are the constant `...1010`: bit i is 1 for
odd i, so `16'hAAAA` for 16 bits. No carry comes out of that field. The
pattern sits halfway through the range of the discarded bits. It therefore
pushes some products up and others down, instead of always truncating.

With 16 approximated bits, the field covers the low 16 of the 31 mantissa
bits. On a product of two full-width operands, it affects bits that are
about 2^-15 below the leading one.

## Accuracy measured on this RTL

These were measured on 10^6 uniformly random pairs of positive 32-bit
integers (`tb/alm_mult_mred_tb.sv`, default parameters):

| | mean relative error distance |
|---|---|
| This design | 0.03853 |
| Conventional Mitchell multiplier (exact LOD, exact adder, computed by the testbench model) | 0.03849 |

The expected value for a Mitchell multiplier is 0.0385. Design II gives
essentially the same figure on random operands (`tb/alm_mult_tb.sv`, 10^4
pairs: 0.038739 for both designs). On uniform 32-bit operands, an operand
below 2^16 occurs only once in 65 536 draws. The two designs therefore
differ only when the workload's operands are small. The accuracy target is
that of the conventional multiplier, and the approximation is sized for
full-range 32-bit data.

## Interface and timing

`alm_mult` (top):

| port | dir | width | |
|---|---|---|---|
| `a` | in | 32 | unsigned operand |
| `b` | in | 32 | unsigned operand |
| `p` | out | 64 | approximate product |

| parameter | default | |
|---|---|---|
| `DESIGN` | `LOD_DESIGN_I` | `LOD_DESIGN_I` or `LOD_DESIGN_II` (`alm_pkg::lod_design_e`) |
| `ADD_APPROX` | 16 | number of log-sum LSBs replaced by the alternating pattern, 0 to 35 |

The multiplier is purely combinational: there is no clock, no reset and no
latency. To pipeline it, place registers around it, or between the
detector/log stage and the adder.

## Choices this RTL makes on its own

These points are not fixed by the method described above. They were decided
here:

* **Zero.** A logarithm of 0 does not exist. If either operand is 0
  (stage-3 LOD output `00`), the product is forced to 0. Without this rule,
  a zero operand would produce a non-zero product.
* **Design II, no field set.** The bias table has no row for this case. The
  selector then outputs 0, which the stage-3 gating would force anyway.
* **Which `lod2` bit drives which half.** `sel[1]` enables the upper half
  and `sel[0]` the lower half.
* **Phase of the alternating pattern.** The pattern is `AAAA` rather than
  `5555`. No carry is taken out of the fixed field.
* **Implementation of the encoder, mantissa shifter and antilog shifter.**
  The antilog truncates mantissa bits that would land below bit 0.
* **Default detector.** `DESIGN` defaults to Design I.
* **Word sizes.** The operand is 32 bits, k is 5 bits (6 bits in the sum)
  and m is 31 bits.

Not included:

* The 16-bit variants with a variable number of approximated LOD bits. In
  this RTL, the LOD approximation is tied to the 32-bit tree: the low half
  is always approximated. Only the adder's approximation width is a
  parameter.
* Baseline multipliers: the conventional Mitchell multiplier and the
  set-one-adder variant. The testbenches model the conventional Mitchell
  multiplier only as a reference.

## Files

| file | contents |
|---|---|
| `rtl/alm_pkg.sv` | widths, bias words, `lod_design_e` |
| `rtl/lod4.sv` | 4-bit LOD slice |
| `rtl/lod2.sv` | stage-3 2-bit LOD |
| `rtl/lod16.sv` | exact 16-bit half of the LOD tree |
| `rtl/bias_sel16.sv` | Design II low-half bias selector |
| `rtl/alod_d1.sv`, `rtl/alod_d2.sv` | 32-bit approximate LODs |
| `rtl/log_conv.sv` | one-hot position to `{k, m}` |
| `rtl/approx_log_add.sv` | approximate log adder |
| `rtl/antilog.sv` | `{k, m}` to product |
| `rtl/alm_mult.sv` | top |
| `tb/alm_ref_pkg.sv` | arithmetic reference model used by all testbenches |
| `tb/<module>_tb.sv` | self-checking test of each module |
| `tb/alm_mult_mred_tb.sv` | 10^6-pair accuracy run at default parameters |
| `tb/alm_log_error_tb.sv` | logarithm error sweep over N < 2^20 |

The reference model does not use one-hot words or shifters. It finds k by
scanning and m as (N mod 2^k) * 2^(31-k), adds the shifted-down logs, and
computes the antilog as (2^31 + m) * 2^k / 2^31.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and exits. For
example, to run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/alm_pkg.sv tb/alm_ref_pkg.sv rtl/lod4.sv rtl/lod2.sv rtl/lod16.sv \
  rtl/bias_sel16.sv rtl/alod_d1.sv rtl/alod_d2.sv rtl/log_conv.sv \
  rtl/approx_log_add.sv rtl/antilog.sv rtl/alm_mult.sv tb/alm_mult_tb.sv \
  --top-module alm_mult_tb -o sim && ./obj_dir/sim
```

For another test, replace the last file and the top-module name. All tests
finish in well under a second of simulation time. The exhaustive tests
(`lod16_tb`, `bias_sel16_tb`) cover all 2^16 inputs with the select both on
and off.

`alm_mult_tb` counts these mechanisms and fails if any of them never occurs:

* a zero operand;
* the Design I bias;
* each of the four Design II biases;
* the exact-detection path;
* a mantissa carry into k.
