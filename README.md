# Digital base-band converter (DBBC), down-converter configuration

A VLBI data-acquisition rack needs base-band converters (BBCs). A BBC picks a
narrow band out of a wide IF signal, shifts it to base band and keeps only one
sideband, either the part just below its local oscillator (LSB) or the part just
above it (USB). Analog BBCs do this with mixers, filters and analog 90-degree
networks. This RTL does the same job in an FPGA, right after an A/D sampler:

```
                                        per branch: "multi-rate filters"
              M=4 samples/clk    +-------------------------------------------+
 A,P buses -> ddr_input_deser -> | x*sin -> polyphase_decimator (/M) -> decimation_cascade (/2^dec_sel) -> delay_line -----\
                                 | x*cos -> polyphase_decimator (/M) -> decimation_cascade (/2^dec_sel) -> hilbert_filter -(+/-)-> shape_filter -> bb_o[c]
                                 |   ^ sin/cos for M branches from parallel_dds(ftw[c])                                 LSB/USB
                                 +---------------------------------------------------------- ddc_channel, x NCH ---------
```

Each channel is tuned separately (`ftw[c]`), selects its own sideband
(`sideband_i[c]`) and its own bandwidth (`dec_sel[c]`), so the channels work
independently on the same input.
`dbbc_top` has `NCH = 4` channels by default.

## Why there are four samples per clock

The sampler is faster than the FPGA logic can run, so the samples arrive on two
buses, A and P, and each bus carries a new sample on both edges of the sampler
clock `clk_ddr`. `ddr_input_deser` captures:

| edge of `clk_ddr` | A bus       | P bus       |
|-------------------|-------------|-------------|
| rising            | sample 4n   | sample 4n+1 |
| falling           | sample 4n+2 | sample 4n+3 |

A second clock, `clk_proc`, has the same frequency but is shifted by 90 degrees
and inverted. Its rising edge comes 3/4 of a period after the rising edge of
`clk_ddr`, so both captures of a period are stable by then. On that edge all
four samples are re-registered as `samples_o[0..3]`, oldest first. Everything
after this runs on `clk_proc` at f_clk = f_s / M with M = 4. The 90-degree clock
must come from the FPGA's clock manager. It is an input here, not generated in
the RTL.

Because of this, every block up to the decimators is M-way parallel: M mixers,
M local-oscillator branches, and filters that take M samples per clock.

## Parallel local oscillator (`parallel_dds`)

With one sample per clock, a DDS adds a phase step to a phase accumulator on
every clock. With M samples per clock, each of the M branches needs the phase
of its own sample. Let `ftw` be the phase step of one *sample*:

    ftw   = f_lo * 2^32 / f_s
    F_cir = M * ftw  (mod 2^32) = f_lo * 2^32 / f_clk   -- accumulator step per clock
    phase of branch k = acc + k * ftw                   -- branches differ by 2*pi*f_lo/f_s

The top 10 bits of each branch phase address a quarter-wave table
`rtl/dds_sine_quarter.hex`, which holds 256 entries:
`entry[i] = round(127 * sin(2*pi*(i + 0.5) / 1024))`. The half-step offset
makes the four mirrored quadrants exact. The cosine is the sine read a quarter
turn later. The table is read with `$readmemh` using the path
`rtl/dds_sine_quarter.hex`, so run simulations from the repository root.

The tuning word is given per sample rather than as F_cir. This keeps the
branch offsets exact. F_cir is always a multiple of M, which costs 2 bits of
frequency resolution at M = 4 (resolution f_s / 2^32).

## Sideband separation: which sign keeps which side

The mixers produce two branches from each real sample x:

* upper = x * sin(LO). It is low-pass filtered, then only delayed.
* lower = x * cos(LO). It is low-pass filtered, then shifted by 90 degrees in
  a Hilbert filter.

Take a tone at LO − Δ (below the LO). After low-pass filtering, upper ∝ sin(Δt)
and lower ∝ cos(Δt). The Hilbert filter turns cos(Δt) into sin(Δt), so the two
branches add and cancel in the difference. For a tone at LO + Δ, upper ∝ −sin(Δt)
while the Hilbert branch is still +sin(Δt). Hence:

* `SB_LSB`: output = upper + Hilbert(lower). This keeps the band below the LO.
* `SB_USB`: output = upper − Hilbert(lower). This keeps the band above the LO.

How well the unwanted side cancels depends on two things: the gain and phase
accuracy of the Hilbert filter, and the two branches being aligned to the same
clock. `delay_line` has `DEPTH = (HIL_TAPS-1)/2 + 1 = 16`. This equals the
Hilbert filter's group delay (15) plus its output register. If the delay is one
clock short, the suppression is lost (the channel testbench checks this).
Measured in simulation with a tone 1/4 of the output rate away from the LO, the
wanted side comes out at rms ≈ 8530 for an input amplitude of 100 and the
unwanted side at rms ≈ 25. That is about 50 dB of suppression.

## Filters

All coefficients are signed Q1.15 (16 bits, 15 fraction bits). Every filter
rounds its sum, shifts it back by 15 bits, saturates to the 16-bit data path and
registers the result. Coefficients are module parameters, so a different
response only needs a new list.

* **`polyphase_decimator`** (one per branch) is a 32-tap low-pass filter
  (Hamming-windowed sinc, cut-off 0.1 f_s, DC gain 1) with decimation by M. It
  is built as M poly-phase sub-filters: sub-filter p holds taps
  h[p], h[p+M], … and runs on lane M−1−p. Their sum is
  `y[n] = Σ_j h[j]·s[Mn + M−1 − j]`, one output per clock, from the M newest
  samples and a history of TAPS−M older ones.
* **`hilbert_filter`** is a 31-tap antisymmetric FIR:
  `h[15±k] = ±2/(πk)·w` for odd k, 0 for even k, with w a Hamming window.
  Its gain is 0.997 at a quarter of the clock rate. The antisymmetry is used:
  one subtraction and one multiplication per non-zero tap pair.
* **`shape_filter`** is a 31-tap symmetric band-pass, 0.05 to 0.45 of the clock
  rate, with pre-adders. It sets the final band shape and also removes the band
  edges near 0 Hz and near Nyquist, where the Hilbert filter is least accurate.
* **`decimation_cascade`** (one per branch) chains three
  **`halfband_decimator`** stages. Each stage is a 19-tap half-band FIR
  (cut-off at a quarter of its input rate, unity DC gain) that keeps every
  second output. `dec_sel` = 0..3 picks the tap point, so the channel's output
  rate is f_clk/2^dec_sel and its bandwidth about 0.4 of that. The two
  branches use identical cascades with the same setting, so their sample
  strobes coincide. An assertion in `ddc_channel` checks this.
* **`delay_line`** is a plain register chain, cleared by reset.

Everything after the cascade (the delay, the Hilbert filter, the combiner and
the shape filter) moves only on the cascade's sample strobe (`en_i`). Their
delays are therefore counted in output samples: the Hilbert/delay matching
holds at every decimation setting, and the shape filter's band edges scale
with the output rate.

Coefficient formulas (window w(n) = 0.54 − 0.46·cos(2πn/(N−1))):

* decimator: h[n] = 2f_c·sinc(2f_c(n − 15.5))·w(n), with f_c = 0.1, scaled so
  that Σh = 1.
* shape filter: h[n] = (sin(2πf_2 t) − sin(2πf_1 t))/(πt)·w(n), with t = n − 15,
  f_1 = 0.05 and f_2 = 0.45.
* half-band: h[n] = sin(πt/2)/(πt)·w(n) with t = n − 9, h[9] = 0.5, scaled so
  that Σh = 1.

## Choosing rates

Every rate is tied to the sampler rate f_s: f_clk = f_s/4, and a channel's
output rate is f_s/(4·2^dec_sel) real samples per second, covering a band of
about 0.4 of that rate above or below its LO. Take, for example, a VLBI
channel recorded at 16 Msample/s, which is nominally 8 MHz wide. It comes
from f_s = 512 Msample/s (f_clk = 128 MHz) with dec_sel = 3, or from
f_s = 64 Msample/s with dec_sel = 0. About 6.4 MHz of that band lies inside the shape filter's pass
band; for a wider flat band, use a shape filter with more taps. The outputs
are 16-bit. Requantization to 1 or 2 bits for recording is left to the
formatter downstream.

## Interface and timing of `dbbc_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_ddr` | in | 1 | sampler clock, f_s/4, data on both edges |
| `clk_proc` | in | 1 | same frequency, rising 3/4 period after `clk_ddr` rises |
| `rst_n` | in | 1 | active-low reset, synchronous to `clk_proc` |
| `a_bus`, `p_bus` | in | 8 | sampler buses, signed |
| `ftw[NCH]` | in | 32 | per channel: LO phase step per sample, f_lo·2^32/f_s |
| `sideband_i[NCH]` | in | `dbbc_pkg::sideband_e` | per channel: `SB_LSB` or `SB_USB` |
| `dec_sel[NCH]` | in | 2 | per channel: extra decimation 2^dec_sel (0..3) |
| `bb_valid_o[NCH]` | out | 1 | per channel: high on clocks where `bb_o` holds a new sample |
| `bb_o[NCH]` | out | 16 | per channel: signed base-band sample, held between strobes |

The input has no handshake: four samples are taken on every clock. A channel
delivers a sample every 2^dec_sel clocks, marked by `bb_valid_o`. There are 2
registers in the capture. At dec_sel = 0, each channel then has 22 pipeline
registers, and a tone's envelope appears at `bb_o` about 41 clocks after it
enters the channel, counting the filters' group delays. At higher settings,
the part after the cascade counts in output samples. `ftw`, `sideband_i` and
`dec_sel` may change at any time. The output then needs about 70 output
samples to settle, because the filters must flush.

Shared widths and the sideband enum are in `rtl/dbbc_pkg.sv`: M = 4,
8-bit samples, 32-bit phase, 10-bit table phase, 8-bit LO, 16-bit data.

## What follows the original design and what is this implementation's choice

The original design fixes these points:

* the block chain: mixer with DDS sine and cosine, multi-rate filter per branch,
  delay against 90-degree shift, sum for LSB and difference for USB, shape filter;
* independent channels in one device;
* the two-bus DDR capture into 4 parallel samples with a 90-degree clock;
* poly-phase filtering;
* the parallel DDS law (accumulator step f_out·2^B/f_clk, branch phase
  difference 2πf_out/f_s).

This implementation chose the following:

* all widths (8-bit samples, 32-bit accumulator, 8-bit LO, 16-bit data, Q1.15
  coefficients);
* every filter's length, window and band edges;
* decimation by exactly M in the poly-phase filter, to one sample per clock;
* reading "multi-rate filters" as that poly-phase stage followed by a
  selectable cascade of three half-band stages;
* how the sine table is organised;
* saturating arithmetic;
* synchronous reset;
* the number of channels (4);
* reading the 90-degree clock as inverted, so that it samples after the
  falling-edge capture.

The original design leaves all of these open. Its sample rate and channel
bandwidths are not known either, so frequencies here are given relative to
f_s and f_clk.

Two things are not included:

* The A/D sampler and the clock manager are outside the FPGA logic.
* The alternative "poly-phase filter bank + FFT" configuration is not
  implemented. It gives many equally spaced channels that cannot be tuned
  separately. This RTL implements the down-converter configuration only.

Resource note: each channel makes 8 variable 8×8 products per clock (the
mixers) and 116 non-zero constant-coefficient products. Of those, 80 are in
the parts that work on every clock at dec_sel = 0: 64 in the two 32-tap
poly-phase decimators, 8 in the Hilbert filter and 8 in the shape filter. The
other 36 are in the half-band stages, at 6 per stage for 3 stages and 2
branches; these work at half the clock rate or less. At the default of 4
channels that is 496 products, far more than the 96 dedicated multipliers of a
mid-size Virtex-II. On such a part most constant products must go into logic
(they are fixed, so shift-and-add works), or the channel count must be
reduced.
