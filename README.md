# Multiplier-light first-stage decimator for a radio-telescope filter bank

A radio-astronomy correlator digitises a 2 GHz wide band with a 3-bit
converter at 4 GS/s. No FPGA fabric runs at 4 GHz, so the samples reach the
logic as **32 parallel lanes at 125 MHz**: every clock carries 32
consecutive samples of the same stream. A tunable filter bank then cuts
sub-bands out of this stream. Its first filter stage low-pass filters one
stream and **decimates it by 32**, so the 32 lanes become one 8-bit sample
per clock. A second stage (a half-band filter with a further decimation by
2, not part of this RTL) sets the final band edge.

A direct FIR for this first stage needs a long window (128 taps) and is
costly in power. This RTL uses a cheaper two-part filter:

1. a **non-recursive CIC filter** with decimation D = 8 and order N = 2,
   built only from adders, which turns 32 lanes into 4, and
2. a **17-tap symmetric quarter-band FIR**, which turns those 4 lanes into
   one output sample per clock.

The only place the stage changes sample rate is inside a clock. Every
register still runs at the 125 MHz clock, and the stage never stalls.

```
 in_data 32 x 3 bit  ──► cic_nr_stage ──► cic_nr_stage ──► cic_nr_stage ──► qb_fir ──► out_data 8 bit
 (4 GS/s)               32→16 lanes       16→8 lanes       8→4 lanes        4→1 lane    (125 MS/s)
                        3→5 bit           5→7 bit          7→9 bit          9→8 bit
                        └──────────────── cic_nonrec ────────────────┘
                        └──────────────────────── cic_qb_decimator ────────────────────────┘
```

## Files

| file | content |
|---|---|
| `rtl/cic_qb_pkg.sv` | default sizes, the quarter-band taps, and a binomial-coefficient function |
| `rtl/cic_nr_stage.sv` | one CIC block: (1 + z⁻¹)^N, then decimation by 2, over any even number of lanes |
| `rtl/cic_nonrec.sv` | M cascaded blocks, forming a CIC filter with D = 2^M |
| `rtl/qb_fir.sv` | the symmetric FIR with built-in decimation by its lane count, truncation and clipping |
| `rtl/cic_qb_decimator.sv` | top: `cic_nonrec` followed by `qb_fir` |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus a frequency-selectivity test |

## Data format and interface

All modules use the same conventions:

- `in_data` is a packed array of lanes. **Lane 0 holds the oldest sample**
  of the clock and the highest lane the newest. Samples are two's
  complement. At the top they are 3 bits wide, with codes -4 … 3.
- `in_valid` marks a clock that carries new samples. Every register,
  including the history registers, moves only when its valid is high. Gaps
  in the input therefore pause the filter and do not corrupt it. In the
  intended system `in_valid` is always 1.
- `out_valid` is `in_valid` delayed by the module's latency. For the top
  this is **4 clocks**: one register per CIC block and one in the FIR.
- `rst_n` is an asynchronous, active-low reset. It clears every data and
  history register. Samples "before reset" therefore count as zeros.

Top-level ports of `cic_qb_decimator`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock, 125 MHz in the target system |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `in_valid` | in | 1 | `in_data` is valid |
| `in_data` | in | 32 × 3 | 32 consecutive samples, lane 0 the oldest |
| `out_valid` | out | 1 | `out_data` is valid |
| `out_data` | out | 8, signed | one filtered sample, decimated by 32 |

One instance handles one real stream. A complex sub-band, with real and
imaginary parts, uses two instances.

## How the non-recursive CIC works

A CIC decimator by D of order N has the transfer function
(1 + z⁻¹ + … + z⁻⁽ᴰ⁻¹⁾)^N: N box filters of length D in series. The
classic recursive form (integrators at the input rate, combs at the output
rate) fits a lane-parallel stream badly. Its integrators need a chain of 32
adders in a single clock, with feedback around the chain.

For D = 2^M the box filter factorises:

    (sum_{k<D} z^-k)^N  =  prod_{i=0}^{M-1} (1 + z^-(2^i))^N

The factor (1 + z⁻²)^N, evaluated at the full rate and followed by
decimation by 2, is the same as decimating by 2 first and then applying
(1 + z⁻¹)^N at the half rate. The same holds for each later factor. The
filter is therefore **M identical blocks**. Each block applies
(1 + z⁻¹)^N (for N = 2, the taps 1, 2, 1) and then drops every second
result.

Because half the results are dropped, `cic_nr_stage` never computes them.
For output lane j of a block with `LANES_IN` input lanes, the block computes

    y[m] = sum_{k=0..N} C(N,k) * x[2m + 1 - k],     m = (LANES_IN/2)*t + j

from input lanes 2j+1, 2j, … . Output lane 0 also needs the last N-1
samples of the previous clock; a small history register holds them. For
N = 2 that is a single sample, the newest lane of the previous clock.
Multiplying by the binomial coefficients costs no multipliers: the
weights are constants (1, 2, 1) and reduce to wiring and adders.

Nothing is truncated inside the CIC. Each block adds N bits, so the word
grows from 3 to 9 bits. This covers the full gain D^N = 64 exactly
(−4·64 = −256 and 3·64 = 192), and the CIC never wraps.

Reading the CIC output as a single stream, sample p of the CIC output is

    c[p] = sum_{n=0}^{14} g[n] * x[8p + 7 - n],   g = 1,2,…,7,8,7,…,2,1

This is the response of two length-8 box filters. At the band edges that
fold onto the wanted band under the CIC's own decimation by 8 (multiples
of 1/8 of the input rate, ± 1/128), it rejects at least 46.8 dB; the worst
case is 1/8 − 1/128. The bands that fold only under the later decimation
by 4 (odd multiples of 1/32, and 1/16, ± 1/128) are left to the
quarter-band filter.

## How the quarter-band FIR works

`qb_fir` receives 4 lanes per clock and produces one output per clock.
Its convolution window therefore moves 4 samples per clock, so
decimation by 4 costs nothing: the outputs that would be dropped are
never formed. The 17-sample window consists of the 4 current lanes and
the 13 samples before them. The module keeps a 16-sample history
(`TAPS − 1`) for generality. With lane 0 the oldest, output t is

    acc[t] = sum_{i=0}^{16} h[i] * c[4t + 3 - i]
    y[t]   = clip_to_8_bit( floor(acc[t] / 2^11) )

The taps are symmetric, so the pairs of samples that share a tap are
added first. This forms 9 products, each by a constant.

### Taps

    h = -5 -12 -15 -6 26 79 143 195 214 195 143 79 26 -6 -15 -12 -5     (sum = 1024)

These values are this design's own. They come from an equiripple (Remez)
low-pass design with these settings:

- order 16;
- passband edge 1/16 of the 500 MS/s input rate (31.25 MHz);
- stopband edge 3/16 (93.75 MHz), the lowest frequency that folds onto
  0 … 31.25 MHz after the decimation by 4;
- stopband weight 30.

The result was scaled so the taps sum to 2^10 (DC gain 1) and rounded to
integers. Together with the CIC, the stage rejects every band that folds
onto the output band by at least **47.9 dB**, which meets the 47 dB target.

The taps make no attempt to flatten the CIC's passband droop. The
complete stage is down about 1.3 dB at 31.25 MHz. The droop is left for
the second filter stage of the bank to correct. To use other taps, pass
`COEF` (any symmetric set), `CW` (coefficient width) and `SHIFT` to
`qb_fir`.

### Output truncation and clipping

The 9-bit input has a DC gain of 1, so dividing by 2^10 returns to 9 bits,
and one more bit is discarded to reach the 8-bit output format of the next
stage. Discarded bits are simply dropped, which rounds towards minus
infinity.

The FIR's gain for a worst-case input is the sum of |h|, 1176/1024. That
is more than 1, so the result is clipped to −128 … 127 rather than left to
wrap. With a 3-bit input only the low limit can be reached. The most
negative case (all samples −4 where the overall taps are positive, +3 where
they are negative) gives about −144 before clipping. The most positive case
gives at most about +112, so the high limit is never reached.

## End-to-end behaviour

The whole stage is one linear filter followed by truncation. Let the 143
overall taps G be the CIC taps convolved with the quarter-band taps spread
8 samples apart (G[8i + n] += h[i]·g[n]). Then

    y[t] = clip8( floor( sum_{n=0}^{142} G[n] * x[32t + 31 - n] / 2048 ) )

A passband input at the full 3-bit scale comes out at about 32 output
codes per input code.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
Each has a watchdog, uses only `$urandom` for stimulus, and computes its
expected values from the filter definitions rather than from the RTL
structure.

| testbench | what it does |
|---|---|
| `tb_cic_nr_stage` | Tests the default block and an 8-lane, 4-bit, third-order block against y[m] = Σ C(N,k)·x[2m+1−k]. Uses random data, extreme codes, random valid gaps and a 1-clock latency. |
| `tb_cic_nonrec` | Tests 32 lanes against the 15-tap box² response. Checks the 3-clock latency, then uses constant full-scale runs to check the gain of 64 at both ends. |
| `tb_qb_fir` | Tests 4 lanes of 9 bits against the 17-tap convolution with floor and clip. Uses random, constant and tap-sign-matched full-scale windows, so both clip limits are hit. |
| `tb_cic_qb_decimator` | Runs the top at its default size for 3000 clocks against the 143-tap formula above. Checks every output and the 4-clock latency. Counts outputs, input gaps and clipped outputs, and fails if any count is zero. |
| `tb_cic_qb_tones` | Feeds dithered, 3-bit-quantised tones to the default top: one passband tone (15.625 MHz) and the edges of the first four folding bands (k·125 ± 31.25 MHz). Measures the output at the folded frequency with a 1024-point single-bin DFT. Every folding tone must come out ≥ 40 dB below the passband tone. Measured: 46–64 dB, limited by dither and truncation noise. Without dither, the quantiser's harmonics fold onto exactly the measured frequency, which is why dither is added. |

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cic_qb_pkg.sv tb/tb_cic_qb_decimator.sv --top-module tb_cic_qb_decimator
./obj_dir/Vtb_cic_qb_decimator
```

Replace the testbench name to run another test. Every test finishes in
well under a second.

## Departures and open points

- **Quarter-band taps.** These are a reconstruction designed to the stated
  band edges and the 47 dB target. They are not a published coefficient
  set.
- **Input coding.** The coding of the 3-bit converter is taken as two's
  complement. An offset-binary or odd-level (±1, ±3, ±5, ±7) converter
  needs a small mapping in front of `in_data`.
- **Decimation phase.** The phase kept by each decimation is chosen so
  that the newest lane of a clock is always used in that clock. Any other
  phase gives the same response with a different sub-sample delay.
- **Valid, reset and latency.** The `in_valid` qualifier, the reset
  behaviour and the 4-clock latency are this design's choices.
- **Timing closure.** The FIR's sum of nine constant products and its clip
  logic sit in one clock. At 125 MHz this is modest. For higher clock rates
  an extra register after the products is the natural first change, and
  it would make the latency 5.
- **Not included.** The 3-bit 4 GS/s converter and its demultiplexer, the
  frequency-conversion oscillator (DDS) of the tunable bank, and the
  second (half-band) filter stage are outside this RTL. The top brings out
  the 32-lane input and the 8-bit output where they connect.
