# Hearing-aid filter bank on truncated-matrix multipliers

A hearing aid splits the microphone signal into frequency bands, gives each band the
gain the wearer's hearing loss calls for, and adds the bands back together. Almost all
of the arithmetic is FIR filtering, so the multipliers dominate power and area. This
design replaces every multiplier with a **truncated-matrix multiplier**: the partial
products of the lowest R columns of the 16x16 multiplication matrix are never built. At
the default R = 15 only 136 of the 256 partial-product bits exist (256 - (1+2+...+15)).
Two measures keep the result usable:

* a **correction constant**, added to the matrix, stands in for the expected value of
  the bits that were left out and rounds the product;
* **coefficient shifting**: every filter coefficient is shifted left at design time
  until its first bit after the sign differs from the sign. The bits that get dropped
  then matter less. After the multiplier, a barrel shifter shifts the product right by
  the same amount, which shrinks the truncation error by 2^S.

Against the same filter bank built with full multipliers, the output differs by about
3.4 LSB² (mean-squared) on full-scale 16-bit noise.

## Signal flow

```
             +--> tmm_fir CH1   0- 250 Hz --> >>6 --+
             +--> tmm_fir CH2 250- 500 Hz --> >>6 --+
in_sample -->+--> tmm_fir CH3 500-1000 Hz --> >>5 --+--> sum --> <<OUT_SHL --> clip to 16 b --> out_sample
 16 b        +--> tmm_fir CH4   1-   2 kHz --> >>4 --+
 16 kHz      +--> tmm_fir CH5   2-   4 kHz --> >>0 --+
                  (ch_y)                   channel_combiner
```

The input is a 16-bit signed sample stream from a 16 kHz A/D converter. The converter
itself is not part of the RTL. The bands are octaves. Above 4 kHz nothing is passed,
because the target user cannot hear there and amplifying it would not help.

`hearing_aid_dsp` is the top. It holds five `tmm_fir` instances and one
`channel_combiner`. Each `tmm_fir` holds 63 tap units, and each tap unit is one
`tmm_mult` followed by one `barrel_shifter`.

## The truncated-matrix multiplier (`tmm_mult`)

### The matrix

The operands are two's-complement numbers. The matrix uses the modified Baugh-Wooley
form:

* row j holds the bits a_i·b_j at column i+j;
* a bit that involves exactly one sign bit (a_15·b_j or a_i·b_15) is inverted;
* a one is added in column 16 and another in column 31.

Added up, this gives a·b modulo 2^32.

With R unformed columns, bit (i, j) exists only if i + j >= R. For R <= 15, the
left-out columns never contain an inverted bit. So if the operand bits are random, each
missing bit is 1 with probability 1/4.

### The correction constant

The missing bits have this expected value:

    E_R = sum over columns q < R of (q+1) · 2^q / 4 = ((R-1)·2^R + 1) / 4

The output is cut at column N = 16, which throws away K = N - R more columns. The
correction constant is:

    C = round( (2^(R+K-1) - 2^(R-1) + E_R) / 2^R ) · 2^R

In this formula:

* 2^(R+K-1) = 2^15 rounds the product at column 16;
* -2^(R-1) removes the mean of the K columns that are truncated;
* the result is rounded to the lowest column that is still formed, so C costs only a
  few constant bits in the matrix.

Some values:

* R = 15, K = 1: C = 2^17.
* The 8x8, r = 6, k = 2 example (`tmm_mult #(.N(8), .R(6), .SW(2))`): C = 192.
* R = 0: C reduces to 2^15, which is plain rounding. An R = 0 instance is therefore an
  exactly rounded full multiplier.

`ha_pkg::corr_const` computes C at elaboration time, in integers.

### Coefficient shifting and where the rounding one goes

The filter coefficients are fixed, so the shift is done offline:

* S is the number of bits right of the sign bit that repeat the sign;
* the stored coefficient is h' = h·2^S;
* a zero coefficient gets S = 15.

The multiplier computes a·h'. The barrel shifter then takes columns 16 and up of the
product and shifts them right by S.

The result is cut at column 16 + S, so it has to be rounded at column 15 + S, not at
column 15. The rounding one that C holds is therefore moved:

* the matrix receives the constant C − 2^15;
* it also receives one rounding bit in column 15 + S, decoded from S.

For S = 0 this is exactly C. Rounding twice, once inside C and once for the shift, was
tried and made each 63-tap filter read about +1.6 LSB high. Truncating at column 16
and then shifting by S is the same as truncating once at column 16 + S. So no error is
added between the multiplier and the shifter.

### What the constant cannot fix

C assumes random operand bits. A shifted coefficient has S zero bits at the bottom, so
fewer of its missing bits are ones, and C over-corrects a little. This costs a small
positive bias. With a 1/2^S weight, it adds up to roughly +1 LSB per filter on noise.
This is inherent to constant correction and is left as is.

## Filters (`tmm_fir`, `ha_pkg`)

Each filter is a 63-tap direct-form FIR: y[i] = Σ h[k]·x[i−k] / 2^16.

The coefficients in `ha_pkg::COEF` come from Hamming-windowed window-method designs,
normalised to unit gain at the band centre, then multiplied by 2^16 and rounded to 16
bits. All five prototypes lie in [−0.5, 0.5), so scaling by 2^16 uses the full 16-bit
range without overflow. It also leaves the bands' relative gains untouched, which
normalising each filter would not.

The 500–1000 Hz set is the published reference filter, whose taps and shift amounts the
testbench checks one by one. The other four bands were designed by this implementation
with the same method, length and window.

S and h' for every tap are localparams of the tap's generate block, computed by
`ha_pkg::coef_shift` and `ha_pkg::shifted_coef`. To use other filters, change
`COEF`; the shifts follow automatically.

The 63 tap results are added into a 22-bit accumulator, which cannot overflow for any
input.

## Gain stage (`channel_combiner`)

The channel gains come from the half-gain rule (amplify by half the hearing loss in
dB), rounded to powers of two: 1, 1, 2, 4 and 64.

Multiplying by them would overflow. Instead, channel 5 is kept as the reference and the
other channels are divided:

* channels 1 and 2 by 64;
* channel 3 by 32;
* channel 4 by 16.

All divisions are arithmetic right shifts, which round toward −∞.

The five results are added into a 25-bit `sum`. The sum is then shifted left by
`OUT_SHL` (the overall gain, default 0) and clipped to a 16-bit `out_sample`. `sat`
flags a clipped sample.

## Interface and timing of the top

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of all state |
| `in_valid`, `in_sample` | in | 1, 16 | one sample, accepted on a rising edge with `in_valid` high |
| `ch_valid`, `ch_y[5]` | out | 1, 5×22 | channel filter outputs, one cycle after `in_valid` |
| `out_valid`, `out_sum` | out | 1, 25 | recombined signal, two cycles after `in_valid` |
| `out_sample`, `out_sat` | out | 16, 1 | gained, clipped output and its clip flag |

The valid outputs are one-cycle pulses. The data outputs hold their value until the
next sample.

The design accepts up to one sample per clock. In a hearing aid, `in_valid` comes once
every 62.5 µs.

Parameters of the top:

* `R` (default 15), the number of unformed columns in every multiplier;
* `OUT_SHL` (default 0).

## Accuracy

`tb/ha_workload_tb.sv` runs the two evaluation signals on four copies of the bank,
with R = 0, 5, 10 and 15. It reports the mean-squared difference of the outputs of each
copy against the R = 0 copy, which is the full-width reference.

| R | 5 sinusoids, channels | noise, channels | noise, recombined |
|---|---|---|---|
| 5 | 0.000 | 0.001 | 0.002 |
| 10 | 0.046 | 0.065 | 0.095 |
| 15 | 3.14 | 3.43 | 3.45 |

Units are LSB² of a 16-bit sample. The published evaluation reports an error of a
little over 5 at R = 15. It also finds sinusoids and noise nearly equal, and that is
reproduced.

With the sinusoids, the 3 kHz channel reaches the output 68 times stronger than the
125 Hz channel. Its nominal gain is 64.

Against the exact convolution sum (real arithmetic), a single R = 15 filter shows
these deviations:

* 7.4 LSB² mean-squared on noise; most of this is the rounding of 63 separate tap
  results, about 63/12;
* at most 11.5 LSB on full-scale steps.

## Departures and choices of this implementation

* **Rounding column.** The rounding one for a shifted coefficient sits in column
  N−1+S. The multiplier's constant drops its own rounding term when S > 0. The source
  scheme places one rounding bit in "the appropriate column" but gives no rule for
  which column. Its 8x8 example names a column that does not fit an output at column
  8, and is not followed.
* **Structure.** The filters are fully parallel: one multiplier and one shifter per
  tap, with the whole output in one clock. A time-multiplexed MAC at 16 kHz would use
  fewer multipliers; any architecture fits the tap arithmetic here. Symmetric-tap
  pre-addition is not used.
* **Reduction tree.** Partial-product rows are added with word-level `+`. Synthesis
  picks the adder tree; no Wallace or Dadda tree is hand-built.
* **Coefficients of bands 1, 2, 4 and 5** are designed here, as described above.
* **Output stage.** The handshake, the latencies, the reset, the accumulator widths,
  `OUT_SHL` and the 16-bit saturation are this implementation's own.
* **Not built.** The A/D converter (analog) is not built. Neither is a dynamic-range
  compressor, which hearing aids often have but this system does not use.

## Files

* `rtl/ha_pkg.sv`: sizes, coefficient tables, channel gain shifts, and the elaboration
  functions `coef_shift`, `shifted_coef` and `corr_const`.
* `rtl/tmm_mult.sv`, `rtl/barrel_shifter.sv`, `rtl/tmm_fir.sv`,
  `rtl/channel_combiner.sv`, `rtl/hearing_aid_dsp.sv`: the design, one module per file.
* `tb/tmm_ref_pkg.sv`: integer reference models. Each truncated product is computed as
  the exact product, minus the missing bits, plus the constant and the rounding one.
  The constant is computed in real arithmetic.
* `tb/<module>_tb.sv`: a self-checking testbench per module. Each one checks bit for
  bit, including the exhaustive 8x8 case of `tmm_mult`. `hearing_aid_dsp_tb` runs the
  full-size top end to end and counts each mechanism: formed-away ones, shifted
  coefficients, zero taps, gain-shift truncation, idle cycles and saturation at both
  ends.
* `tb/ha_workload_tb.sv`: the accuracy runs above.

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with `$finish`. A
watchdog stops it if it hangs.

## Simulating

Each testbench needs the packages first, then the RTL. For example, the top:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ha_pkg.sv tb/tmm_ref_pkg.sv rtl/tmm_mult.sv rtl/barrel_shifter.sv \
  rtl/tmm_fir.sv rtl/channel_combiner.sv rtl/hearing_aid_dsp.sv \
  tb/hearing_aid_dsp_tb.sv --top-module hearing_aid_dsp_tb -Mdir obj_top
obj_top/Vhearing_aid_dsp_tb
```

For the other testbenches, swap the last file and `--top-module`.
`ha_workload_tb` does not use `tb/tmm_ref_pkg.sv`. All runs finish in a few seconds.
