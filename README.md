# Multiplierless FIR channel filter with partitioned binary subexpressions

A channel filter in a radio receiver picks one narrow channel out of a
wideband signal. Meeting adjacent-channel attenuation limits such as those of
D-AMPS or PDC takes a very sharp transition band, and therefore a long FIR
filter: hundreds to over a thousand taps. With coefficients that are fixed at
design time, each tap's multiplier can be replaced by shifts and adds, and the
cost of the filter is then the number and the width of those adders.

This design builds such a filter with two ideas applied together:

* **Binary subexpression elimination.** Coefficients are kept in plain
  binary magnitude with a separate sign, not in canonic signed digit form. Short bit patterns — `[11]`, `[101]`, `[111]`, `[1001]` — are
  odd multiples of the input (3x, 5x, 7x, 9x). They are computed once for the
  whole filter and shared by every tap, so a coefficient with many set bits
  needs only a few adders.
* **Coefficient partitioning.** The terms of one coefficient are split into
  an upper and a lower sub-coefficient. Each is summed relative to its own
  lowest bit, so its adders are only as wide as the part of the coefficient
  they cover. One joining adder then combines the two parts.

The default configuration is a 1180-tap low-pass filter with 16-bit
coefficients and 8-bit samples: the longest D-AMPS channel filter (pass band
to 30 kHz, stop band from 30.5 kHz, 96 dB attenuation, at 97.2 kHz, which is
34.02 MHz decimated by 350).

## Files

| File | What it is |
| --- | --- |
| `rtl/fir_pkg.sv` | Shared types; the elaboration-time functions that split a coefficient into terms and partition them (`bse_plan`) and that design the coefficients (`lowpass_coef`) |
| `rtl/bcs_gen.sv` | Shared subexpression generator: 1x, 3x, 5x, 7x, 9x of the current sample (4 adders) |
| `rtl/bse_cpm_mult.sv` | One constant multiplier, built from the plan of its coefficient |
| `rtl/channel_filter.sv` | Top: generator, one multiplier per distinct coefficient, transposed delay line |
| `tb/tb_bcs_gen.sv`, `tb/tb_bse_cpm_mult.sv` | Unit testbenches |
| `tb/tb_channel_filter.sv` | End-to-end test at the default (full) size |
| `tb/tb_workloads.sv`, `tb/wl_runner.sv` | The other evaluated filter sizes and word lengths, run side by side |

## How a coefficient becomes adders

This is the heart of the design and all of it happens at elaboration, in
`fir_pkg::bse_plan`. A coefficient is an integer `C` with `COEF_W` magnitude
bits that stands for `C / 2^COEF_W`; the hardware computes the exact integer
product `C * x`, using left shifts only, so nothing is rounded.

**1. Cover the set bits with patterns.** The magnitude is scanned from its most
significant set bit down. At each set bit the window starting there is
matched, in this order:

| Window | Term | Bits consumed |
| --- | --- | --- |
| `111` | 7x | 3 |
| `101` | 5x | 3 |
| `11`  (`110`) | 3x | 3 (2 if at the bottom) |
| `1001` | 9x | 4 |
| `1` | 1x | 1 |

Each term is an entry of the shared generator shifted left by the position of
its lowest bit. Zero bits between patterns are skipped. A `[011]` pattern
appears as `[11]` one position lower, so it needs no entry of its own.

**2. Measure the span.** Let the leading (highest) bit of the first term be at
position `p0` and that of the last term at `pL`. The span is
`M = p0 - pL + 1`.

**3. Partition.** Terms whose leading bit lies within the top `ceil(M/2)`
positions form the upper sub-coefficient; the rest form the lower one.

**4. Build.** Each sub-coefficient is a chain of adders whose operands are
shifted relative to that part's own lowest shift. The width of every adder in
the upper chain is `DATA_W + (its top bit - its bottom bit) + 1`, and the same
for the lower chain. A final adder shifts the upper sum into place over the
lower sum, and the result is shifted to the lowest bit used. A negative
coefficient negates the product.

**Example** (the default `COEF` of `bse_cpm_mult`): `C = 0x0A55`,
binary `0000 1010 0101 0101`, i.e. 0.0000101001010101.

* Patterns: `[101]` at bits 11–9, `[101]` at bits 6–4, `[101]` at bits 2–0:
  three 5x terms, shifted by 9, 4 and 0.
* Leading bits 11, 6, 2: `M = 10`, upper part takes the 5 positions 11..7.
* Upper part: `5x` alone (no adder). Lower part: `(5x << 4) + 5x`, one adder
  of `8 + 6 + 1 = 15` bits. Join: `(upper << 9) + lower`, one adder of
  `8 + 11 + 1 = 20` bits. Result shifted by 0.
* Without the split, the two adders would both span the full 12 bits of the
  coefficient.

The shared generator builds `3x = x + 2x`, `5x = x + 4x`, `7x = 3x + 4x` and
`9x = x + 8x`: four adders for the whole filter.

## Filter structure

`channel_filter` is in transposed direct form. Every tap multiplies the
current sample, which is what makes one shared generator possible. The
impulse response is symmetric, `h[k] = h[N-1-k]`, so only `ceil(N/2)`
multipliers are built; the product of multiplier `k` feeds both the structural
adder of tap `k` and that of tap `N-1-k`. For odd `N` the centre coefficient
feeds one adder.

The delay line holds `N-1` partial sums `s[1..N-1]`, each `ACC_W` bits wide.
On every accepted sample:

    y      <= p[0] + s[1]
    s[k]   <= p[k] + s[k+1]      for k = 1 .. N-2
    s[N-1] <= p[N-1]

so `y[n] = sum_k h[k] * x[n-k]`, exactly.

For the default 1180-tap filter, the testbench reports: 590 distinct
coefficients, 111 of them quantised to zero (the far ends of the response),
238 negative, 244 split into two parts and 235 small enough to stay in one.
The whole multiplier network uses 296 adders totalling 4211 adder bits, plus
the 4 shared adders and 238 negations, for 1348 set coefficient bits. The
delay line adds 1179 structural adders of 36 bits.

## Interface and timing

| Port | Dir | Width | Meaning |
| --- | --- | --- | --- |
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active low; clears the delay line and output |
| `in_valid` | in | 1 | accept `x_in` this cycle; the filter holds its state otherwise |
| `x_in` | in | `DATA_W` | signed sample |
| `out_valid` | out | 1 | `y_out` is new this cycle |
| `y_out` | out | `ACC_W` | signed exact output, i.e. the filter output times `2^COEF_W` |

`ACC_W = DATA_W + COEF_W + clog2(N_TAPS) + 1` (36 bits by default). The output
for a sample accepted in cycle `t` appears in cycle `t+1` with `out_valid`
high. `in_valid` is meant to be the sample strobe of the decimated channel
rate, so `in_valid` may be low for any number of cycles between samples.

The multipliers are combinational: the critical path runs from `x_in` through
the shared generator, the longest multiplier chain and one structural adder.
There is no pipelining inside the multipliers.

## Parameters

| Parameter | Default | Meaning |
| --- | --- | --- |
| `N_TAPS` | 1180 | filter length |
| `COEF_W` | 16 | coefficient magnitude bits, all fractional (up to 32) |
| `DATA_W` | 8 | sample width |
| `FS_HZ` | 97200.0 | sample rate of the filter |
| `FPASS_HZ`, `FSTOP_HZ` | 30000.0, 30500.0 | band edges |
| `ATTEN_DB` | 96.0 | stopband attenuation, sets the Kaiser window |

The coefficients are computed at elaboration by `fir_pkg::lowpass_coef`: the
ideal low-pass response with its cutoff midway between the band edges,
multiplied by a Kaiser window whose beta comes from `ATTEN_DB`
(`beta = 0.1102 (A - 8.7)` above 50 dB), and rounded to `COEF_W` fractional
bits. Kaiser's length estimate for the default edges and attenuation is about
1190 taps, in line with the 1180 used. To filter with a different response,
change the parameters or replace `lowpass_coef`; everything downstream
follows from the coefficient values.

## What is this design's own choice

The partitioning method, the pattern set, reusing 3x for 7x, exploiting
symmetry and the default sizes come from the method this design implements.
These are choices made here:

* The window design method of the coefficients. It is a reasonable low-pass
  design for the given edges; it is not claimed to meet the 0.1 dB ripple
  and 96 dB stopband exactly after 16-bit quantisation.
* The matching order of patterns, and which half receives the extra position
  when the span is odd. The choice reproduces the split of the worked example
  above.
* Exact integer arithmetic with left shifts, in place of fractional right
  shifts that would drop bits.
* Sign handling by negating the product inside each multiplier.
* Chains (not trees) of adders inside each sub-coefficient.
* The transposed form, the valid strobe, the one-cycle latency, the reset and
  the full-precision output.
* The front end that down-converts and decimates the wideband signal is not
  part of this RTL; its sample and strobe arrive on `x_in` and `in_valid`.

## Verification

All testbenches are self-checking and print
`TB_RESULT checks=N failures=M`.

* `tb_bcs_gen`: every 8-bit sample and random 12-bit samples against
  `k * x`.
* `tb_bse_cpm_mult`: 18 multipliers (the worked example, all-ones, each
  pattern kind, negative, zero, single-bit, and four 24-bit coefficients)
  against `C * x` for every 8-bit sample and random 10-bit samples; also checks
  that the worked example splits into one upper and two lower `[101]` terms.
* `tb_channel_filter`: the default 1180-tap filter against a plain
  convolution. A full-scale impulse reads the whole response back, then 1500
  random samples (extremes included) arrive with random idle cycles. Every
  output and the one-cycle latency are checked. It fails if the coefficient
  set never used one of the five subexpressions, never produced a split or an
  unsplit coefficient, a negative or a zero one, or if the input never
  stalled.
* `tb_workloads`: the other filter sizes in one run: D-AMPS 260/610/940 taps
  (16-bit) and 1180 taps (24-bit); PDC 240/590/880/1000 taps (16-bit) and
  1000 taps (24-bit); 60-, 90- and 120-tap low-pass filters with 14-bit
  coefficients; and a 61-tap filter for the odd-length case. For PDC the band
  edges are taken as 25 / 25.5 kHz at 80 kHz, and the 60–120-tap filters use
  60 dB; these are assumptions.

Running with plain Verilator (5.x), from the directory holding `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/fir_pkg.sv rtl/bcs_gen.sv rtl/bse_cpm_mult.sv rtl/channel_filter.sv \
      tb/tb_channel_filter.sv --top tb_channel_filter
    ./obj_dir/Vtb_channel_filter

For `tb_workloads` add `tb/wl_runner.sv`. All of these build in well under a
minute and run in under a second.

## Limits

* The coefficients are constants of the hardware: one build is one filter.
  A different length, word length or response means a new elaboration.
* The adder widths are exact for the worst-case operand; no further bit-level
  trimming (such as dropping carry-free low bits) is attempted beyond what
  synthesis does by itself.
* Nothing is pipelined. At the low channel sample rates the filter is meant
  for this is not a concern, but a high-rate use would need registers in the
  multiplier chains.
