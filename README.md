# Two-stage low-pass channel filter for 802.11p / ITS-G5 receivers

Vehicular radios (IEEE 802.11p / WAVE in the US, ETSI ITS-G5 in Europe)
use 10 MHz channels that sit side by side in the 5.9 GHz band. When a
neighbouring channel is busy, its energy leaks into the wanted channel and
the receiver sees packet errors or a falsely busy medium. This design is a
digital channel filter placed at the start of the baseband receive chain.
It takes raw I/Q samples at 40 Msps, keeps the wanted channel (±4.14 MHz),
attenuates everything outside it, and hands 10 Msps I/Q samples to the
demodulator.

Two cheap filters do the job of one long, steep filter:

```
 in_i/in_q  40 Msps   +-----------------+   +---------------------------+  10 Msps
 ------------------->| I(z) = G(z^3)   |-->| H(z), polyphase, ↓4       |----------> out_i/out_q
                      | ifir_stage      |   | dfir_polyphase            |
                      +-----------------+   +---------------------------+
```

The same chain is built twice, once for I and once for Q. Both chains
share one valid strobe, so their outputs are always aligned.

## Stage 1: the interpolated FIR (`ifir_stage`)

An FIR filter with a 0.74 MHz transition band (4.14 → 4.88 MHz) at
40 Msps would need about 90 taps. The interpolated FIR (IFIR) gets the
same steepness from a 30-tap prototype G(z):

* G is designed with every band edge three times wider: pass band to
  12.42 MHz, stop band from 14.64 MHz, 0.5 dB ripple and 40 dB target
  attenuation, order 29.
* Each unit delay of G is replaced by three delays, giving I(z) = G(z³).
  This squeezes the frequency axis by 3. The pass band now ends at
  4.14 MHz and the stop band starts at 4.88 MHz.
* The price is a set of images of the pass band, centred on multiples of
  40/3 MHz. The first one covers about 9.2 to 17.5 MHz. The stage passes it
  almost unattenuated, and the second stage must remove it.

In hardware this means an 88-sample delay line (29·3+1) in which only every
third position has a coefficient. Only 30 multiplications are needed per
output. The filter still runs at the full 40 Msps: one output per input.

## Stage 2: the polyphase decimator (`dfir_polyphase`)

H(z) is a short order-7 (8-tap) equiripple low-pass filter. Its pass band
ends at 4.14 MHz and its stop band starts at 8.42 MHz, with pass/stop
weights 10:1. It is weak: about 13 dB of stop-band attenuation. That is
enough because it only has to suppress the IFIR images. The IFIR itself
has already removed everything between 4.88 MHz and the first image.

Only every fourth output of H is kept, so H is split into four polyphase
branches. Branch p holds coefficients h[p] and h[p+4]. A commutator (a 2-bit
phase counter) fills a 4-sample block buffer. When a block is complete,
it moves into history registers `hist[k] = x[n-k]`. On the next clock
each branch computes `h[p]·x[n-p] + h[p+4]·x[n-p-4]`, and the four branch
results are added. The arithmetic runs once per output, at 10 Msps.
The kept outputs are

```
y[m] = Σ_k h[k] · x[4m + 3 − k]      (input index counted from reset)
```

## Distributed arithmetic (`da_fir_core`)

Both stages compute their sums of products without multipliers, using
distributed arithmetic (DA). The taps are split into groups of four. Each
group has a 16-entry constant table. Entry *a* is the sum of the group's
coefficients whose bit is set in *a*. For each bit position *b* of the
two's-complement samples:

* bit *b* of the four taps forms the table address;
* the table output is shifted left by *b*;
* it is added, or subtracted for the sign bit.

The sum over all groups and all bit positions is the exact product sum.
The tables are computed at elaboration from the coefficient parameter, so
changing the coefficients needs no other edit. All 16 bit positions are
evaluated in parallel, giving one full result per clock. In the IFIR this
is 8 groups × 16 bits = 128 small table look-ups. In the polyphase stage
each branch is one DA core with a 2-tap (4-entry) table.

## Coefficients and number formats

Samples are 16-bit signed Q1.15, and so are coefficients. Each stage
rounds its exact Q2.30 sum half-up to Q1.15 and clamps to the 16-bit range
(`round_sat`). The coefficients in `fir_pkg.sv` are Parks-McClellan
equiripple designs from the specifications above, rounded to Q1.15
(`c = round(h·2¹⁵)`):

* G: 30 taps, fs = 40 MHz, bands 0–12.42 / 14.64–20 MHz, weights 1 : 2.877
  (the ratio of the 0.5 dB and 40 dB ripple targets);
* H: 8 taps, fs = 40 MHz, bands 0–4.14 / 8.42–20 MHz, weights 10 : 1.

Both sets are symmetric (linear phase). Measured on the quantized
coefficients:

| response                        | value                         |
|---------------------------------|-------------------------------|
| IFIR pass-band ripple (0–4.14)  | 0.51 dB                       |
| IFIR stop band (4.88–8.45 MHz)  | ≥ 39.7 dB                     |
| DFIR stop band (≥ 8.42 MHz)     | ≥ 13.1 dB                     |
| chain at 1 MHz / 6 MHz          | −0.17 dB / −49.1 dB           |
| chain at 10 MHz (adjacent channel centre) | −21.0 dB            |
| chain at 13.33 MHz (first IFIR image)      | −18.0 dB            |

Order 29 falls 0.3 dB short of the 40 dB target at these band edges. That
is a property of the filter order, not of the quantization. The adjacent
channel is rejected by 40–50 dB near the channel edge. Near its centre,
where it overlaps the IFIR image, it is rejected by only about 20 dB,
because that part relies on the short second stage.

## Interface and timing (`two_stage_fir`)

| port              | dir | width | meaning |
|-------------------|-----|-------|---------|
| `clk`             | in  | 1     | sample clock; 40 MHz with `in_valid` held high gives 40 Msps |
| `reset`           | in  | 1     | asynchronous, active high; clears all sample registers |
| `in_valid`        | in  | 1     | an I/Q pair is present on this clock |
| `in_i`, `in_q`    | in  | 16    | raw samples, Q1.15 |
| `out_valid`       | out | 1     | one-clock pulse per 4 accepted pairs |
| `out_i`, `out_q`  | out | 16    | filtered, decimated samples, Q1.15 |
| `sat_i`, `sat_q`  | out | 1     | sticky: a sample of that component was clamped in either stage |

Latency:

* `ifir_stage`: the output appears one clock after the edge that accepts
  the input.
* `dfir_polyphase`: the output appears one clock after the edge that
  accepts the last sample of a block.
* Whole chain: `out_valid` rises 3 clocks after the edge that accepts the
  4th pair of a block.

Gaps in `in_valid` simply pause the chain. There is no backpressure. An
assertion checks that the I and Q chains stay in step.

## What is specified and what was chosen here

The following come from the filter specification:

* the two-stage structure and its order (IFIR, then polyphase decimator);
* the rates: 40 Msps in, decimation by 4, 10 Msps out;
* the filter orders (29 and 7) and the interpolation factor 3;
* all band edges and weights, and the 0.5 dB / 40 dB targets;
* the use of distributed arithmetic.

The following are this design's own choices:

* the coefficient values, designed from that specification;
* 16-bit Q1.15 samples and coefficients;
* rounding and saturation after each stage, and the sticky clamp flags;
* the valid strobe handshake and the asynchronous active-high reset;
* the output phase of the decimator;
* two parallel chains for I and Q;
* DA with 4-tap groups and all bits processed in parallel;
* no folding of the symmetric taps.

The downstream receiver chain is outside this design. It connects to
`out_valid`, `out_i` and `out_q`.

Reference figures from a Xilinx implementation of a comparable design
(one real channel per stage) are an upper bound on what to expect. The
IFIR runs at about 88 MHz on Spartan-3E and 109 MHz on Virtex-II Pro. The
polyphase stage runs at 148 MHz and 165 MHz respectively. Both exceed the
40 MHz needed. This RTL has no pipeline register inside the DA adder
trees. If a faster clock is needed, one can be added after the per-group
sums in `da_fir_core`.

## Files

| file | contents |
|------|----------|
| `rtl/fir_pkg.sv` | widths, rates, coefficient sets |
| `rtl/da_fir_core.sv` | distributed-arithmetic sum of products (combinational) |
| `rtl/round_sat.sv` | round-half-up and clamp to the output width |
| `rtl/ifir_stage.sv` | stage 1, I(z) = G(z³) |
| `rtl/dfir_polyphase.sv` | stage 2, polyphase H(z) with decimation by 4 |
| `rtl/two_stage_fir.sv` | top: I and Q chains |
| `tb/tb_*.sv` | self-checking testbenches, one per module above, plus `tb_filter_specs` (frequency-response sweep) |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. Each compares
the design with an independent direct-form model, bit for bit and clock
for clock.

```
verilator --binary --timing -Wno-fatal -y rtl rtl/fir_pkg.sv \
          tb/tb_two_stage_fir.sv --top-module tb_two_stage_fir
./obj_dir/Vtb_two_stage_fir
```

Replace the testbench name to run the others: `tb_ifir_stage`,
`tb_dfir_polyphase`, `tb_da_fir_core`, `tb_filter_specs`.

`tb_filter_specs` sweeps complex tones through each stage on its own. It
checks the IFIR against its targets, using the limits the order-29 design
can reach:

* pass-band ripple of at most 0.6 dB;
* at least 39.5 dB of attenuation from 4.88 MHz up to the first image;
* the image at 13.33 MHz passed.

It checks the polyphase stage for pass-band ripple of at most 0.5 dB and
at least 12.5 dB of attenuation from 8.42 MHz. It also checks that the
polyphase stage produces one output per four inputs.

The end-to-end test runs the full-size design. It checks:

* complex tones at 1, 6, 10 and 13.33 MHz against the levels in the table
  above (it also checks that stage 1 alone passes the 10 and 13.33 MHz
  tones);
* random data with gaps in `in_valid`;
* a worst-case pattern that must raise `sat_i` and only `sat_i`;
* that each mechanism occurred at least once: decimation, valid gaps,
  image removal, adjacent-channel rejection and clamping.

It runs in well under a second.

## Changing the design

* Other coefficients: replace `G_COEF` / `H_COEF` in `fir_pkg.sv` (or pass
  `COEF` to a stage). The DA tables follow automatically.
* `TAPS`, `L` and `M` are parameters. The polyphase stage pads the
  branches with zeros when `TAPS` is not a multiple of `M`.
* `DATA_W`, `COEF_W`, `OUT_W` and `SHIFT` set the number formats. The
  internal sums are sized from them, so they never overflow.
