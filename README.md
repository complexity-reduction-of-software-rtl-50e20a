# Coefficient-partitioned channel filter for an SDR channelizer

A software-defined-radio receiver separates narrow channels out of a wideband
signal with long FIR channel filters that run at the full wideband sample rate
(34.02 MHz for D-AMPS). Their cost is dominated by the coefficient
multipliers. This RTL builds every multiplier from shifts and adds only, and
arranges the additions so that each adder is as narrow as possible:

* the coefficient is written in canonic signed digit (CSD) form;
* digit pairs `[1 0 1]` and `[1 0 -1]` are replaced by two subexpressions of
  the input, `x2 = x1 + x1>>2` and `x3 = x1 - x1>>2`, formed once for the whole
  filter;
* the result is put in *pseudo floating point* (PFP) form: one common shift in
  front of a short *span*, so the adders only see the span, not the full
  coefficient word;
* the span is cut in two halves and the lower half is summed at its own
  scale, so only the very last adder has to be wide (coefficient
  partitioning, CP).

The design here is one channel path: shared subexpressions, a 1180-tap
D-AMPS channel filter with 16-bit coefficients whose taps are CP
multipliers, and a decimator by 350.

## How a coefficient becomes adders

All of this happens at elaboration, in constant functions of `cp_pkg`; the
coefficient is a parameter, and what is left in the netlist is a handful of
adders and wires per tap.

A coefficient `h` with `B` fractional bits is held as the integer
`C = h * 2^B`. For the running example `h = 0.0000101001010101` (`C = 'h0A55`,
`B = 16`):

1. **CSD.** `C` is recoded into digits in {-1, 0, +1} with no two adjacent
   nonzero digits (`csd_digit`, and the same recurrence in `scan_terms`).
   The example already is CSD: digits at 2^-5, 2^-7, 2^-10, 2^-12, 2^-14,
   2^-16.
2. **Common subexpressions.** Scanning from the MSB, a nonzero digit that has
   another nonzero digit two places below it becomes one term in `x2` (same
   signs) or `x3` (opposite signs), negated if the upper digit is -1.
   Anything left over is a plain `x1` term. Pairing is greedy, MSB first.
   Example: `x2>>5 + x2>>10 + x2>>14`, three terms.
3. **PFP.** The position of the first term's leading digit is the *shift*
   (5 in the example); the distance from it to the leading digit of the last
   term is the *span* `M` (9).
4. **Partition.** Terms whose leading digit is at most `floor(M/2)` below the
   first one form the MSB part `h1`; the rest form the LSB part `h2`, which
   is re-scaled by its own first term. Example: `h1 = x2`,
   `h2 = 2^-5 (x2 + 2^-4 x2)`.

The hardware of `cp_tap_mult` is then

```
h2  = sum of the h2 terms, each shifted only relative to the lowest h2 term
h1  = sum of the h1 terms, likewise within h1
sum = (h1 << (e1 - e2)) + h2        -- the one wide adder
y   = sum << e2                     -- PFP shift: wiring, no logic
```

For the example that is one adder for `x2` (shared by the whole filter),
one for `x2 + x2>>4`, and one final adder: three adder steps, the same depth
as the unpartitioned version but with two of the three adders narrower.

**Exactness.** The hardware never drops a bit. Instead of right shifts it
left-shifts towards the lowest digit of each part, and `x2`, `x3` are carried
as the integers `5*x1` and `3*x1` (that is, scaled by 4). The tap output is
exactly `x1 * C`, in units of 2^-B; the testbenches compare it with plain
multiplication. Each partial sum is sized by `cp_pkg::part_width` to the
smallest width that holds its worst case for an `IN_W`-bit input, so the
widths still follow the partition: short inside `h1` and `h2`, full only at
the final adder.

Some cases have no partition: a zero coefficient produces no hardware, and a
coefficient with a single term is just a wired shift of `x1`, `x2` or `x3`.

## Filter structure

`cp_fir_filter` is a transposed direct-form FIR. In that form every tap
multiplies the *current* input, so all N multipliers share `x1`, `x2` and
`x3` (a multiple-constant multiplication). The products go into a chain of
partial-sum registers:

```
z[N-1] <= p[N-1]
z[k]   <= p[k] + z[k+1]        k = 1 .. N-2
y      <= p[0] + z[1]
```

The accumulation is full precision, `ACC_W = IN_W + COEF_W + clog2(N)` bits
(39 at the defaults), so no input can overflow it and nothing is rounded.

**Coefficients.** Tap `k` uses `cp_pkg::lowpass_coef(k, N, COEF_W, FC_NORM)`:
a Blackman-windowed sinc with cutoff `FC_NORM` cycles per sample, quantised to
`COEF_W` fractional bits and scaled so that the largest tap is 0.75. The
default cutoff is 30.25 kHz at 34.02 MHz, between the D-AMPS 30 kHz pass-band
and 30.5 kHz stop-band edges. This is only a stand-in for a real filter
design. It is a valid lowpass filter, but it does **not** meet the D-AMPS
ripple and transition specifications. To use a designed filter, replace
`lowpass_coef` with a function that returns your coefficients, or with a
table lookup; the CP machinery works on any integer coefficient.

## Channel path and timing

`cp_channel_filter_top` chains `cse_precompute`, `cp_fir_filter` and
`decimator`:

| signal | meaning |
|---|---|
| `clk`, `rst_n` | wideband sample clock; asynchronous active-low reset |
| `in_valid`, `x_in[IN_W-1:0]` | one signed wideband sample per cycle with `in_valid` high |
| `out_valid`, `y_out[ACC_W-1:0]` | one-cycle strobe and the decimated channel sample |

* A cycle with `in_valid` low is a stall: the filter's delay line holds its
  state and the decimator's phase does not move.
* The filter output is registered (1 clock) and the decimator registers it
  again (1 clock). The output for input index `n = m*DECIM` appears two
  clocks after sample `n` was taken.
* The decimator keeps the first valid filter output after reset and then
  every `DECIM`-th one. The filter still computes every output at the full
  rate; no polyphase decomposition is used.
* Reset clears the delay line, so the filter starts from zero history.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| top, filter | `N` | 1180 | taps (D-AMPS filter for -96 dB stop-band) |
| all | `IN_W` | 12 | input sample width (design choice) |
| top, filter, tap | `COEF_W` | 16 | coefficient fractional bits (24 for PDC) |
| top, filter | `FC_NORM` | 30250/34.02e6 | prototype cutoff, cycles per sample |
| top | `DECIM` | 350 | decimation factor |
| top, filter | `ACC_W` | `IN_W+COEF_W+clog2(N)` | output width |
| `cp_tap_mult` | `COEF` | `'h0A55` | the constant, as an integer times 2^-COEF_W |

`cp_tap_mult` also exposes, as local parameters, what it built: `NT` (terms
after subexpression elimination), `N1`/`N2` (terms in the MSB/LSB part),
`SPAN` and `SHIFT`.

## Where this departs from the method or goes beyond it

* **Span.** The span is measured between the leading digits of the first and
  last terms after subexpression elimination. That gives the span of 9 used
  for the example's partition. Counting raw CSD digits would give 11.
* **Partition boundary.** The MSB part takes the terms at relative positions
  `0 .. floor(M/2)`, for odd and even spans alike. That reproduces the
  example (M = 9). Another reading of "two halves" would move a term that
  sits exactly at `M/2` for an even `M` into the LSB part.
* **Adder widths.** Widths are sized for the worst case of each partial sum,
  so no adder overflows. A full-adder count that ignores carry-out will come
  out a few bits lower than this netlist.
* **Order of additions.** Terms inside a part are added as a chain, MSB
  first. With many terms in one part a tree would be shallower. The method
  does not fix this order.
* **Only two parts.** A coefficient is split into two parts only. Splitting
  into more parts forces inner shifts before intermediate adders and makes
  them wider.
* **No symmetry folding.** The linear-phase symmetry of the filter is not
  exploited. Pipelining inside the multipliers, input width, output word
  length, handshake and reset are this design's own choices.
* **One channel only.** A filter-bank channelizer (up to 1134 D-AMPS channels
  or 1024 PDC channels) would be one such path per channel, each with its own
  narrowband coefficient set. Those sets, and how each channel is moved to
  baseband, are not defined here, so the bank is not provided.
* **The PDC filter** (1000 taps, 24-bit coefficients, 25.6 MHz) is the same RTL
  with `N = 1000, COEF_W = 24` and a suitable `FC_NORM`. It is simulated at
  that size by `tb_pdc_channel_filter`.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=.. failures=..`.

| testbench | what it checks |
|---|---|
| `tb_cse_precompute` | `x2 = 5*x1`, `x3 = 3*x1` for every 12-bit input, extremes at 16 bits |
| `tb_cp_tap_mult` | 13 coefficients (worked example and its negation, `[1 0 -1]`, single digit, zero, extremes, a 24-bit one) against `x1*C` on 3000+ inputs; the example's structure (3 terms, 1 in the MSB part, span 9, shift 5) |
| `tb_cp_fir_filter` | 31-tap/16-bit and 20-tap/24-bit filters against direct convolution, with random stalls, full-scale inputs, a reset mid-stream and the one-clock latency |
| `tb_decimator` | keeps exactly every 5th valid sample under random stalls |
| `tb_cp_channel_filter_top` | 64 taps, decimation by 7: every decimated output against convolution, its cycle, and that each mechanism occurs (taps with `[1 0 1]`, `[1 0 -1]`, negated subexpressions, plain terms, partitioned taps, odd spans, zero taps, stalls, decimated outputs) |
| `tb_damps_filter_lengths` | the D-AMPS paths with 260, 610 and 940 taps (the shorter stop-band classes), end to end, decimation by 350 |
| `tb_pdc_channel_filter` | a PDC path: 1000 taps, 24-bit coefficients, cutoff 12.5 kHz at 25.6 MHz, decimation by 256 (cutoff and factor chosen for the test) |
| `tb_cp_channel_filter_top_full` | the same at the defaults: 1180 taps, 16-bit, decimation by 350, 2451 samples, 8 decimated outputs |

In the full-size filter, 1074 of the 1180 taps are partitioned, 588 use
`[1 0 1]`, 702 use `[1 0 -1]`, 488 use a negated subexpression and 40 are
zero.

To run one with Verilator:

```
verilator --binary --timing --assert --top-module tb_cp_channel_filter_top_full \
    -y rtl -y tb +libext+.sv -Irtl rtl/cp_pkg.sv tb/tb_cp_channel_filter_top_full.sv
./obj_dir/Vtb_cp_channel_filter_top_full
```

The full-size build elaborates 1180 multiplier instances. Verilator needs
about half a minute to lint it. Elaboration in other front ends that evaluate
the constant functions more slowly can take a few minutes.

## Files

* `rtl/cp_pkg.sv`: types, D-AMPS constants, the CSD, subexpression, PFP and
  partition functions, the prototype lowpass.
* `rtl/cse_precompute.sv`: shared `x2`, `x3`.
* `rtl/cp_tap_mult.sv`: one CP constant multiplier.
* `rtl/cp_fir_filter.sv`: transposed-form channel filter.
* `rtl/decimator.sv`: keep one in `FACTOR`.
* `rtl/cp_channel_filter_top.sv`: the channel path.
* `tb/`: the testbenches above; `tb/channel_path_bench.sv` is the shared
  end-to-end bench used by the two workload testbenches.
