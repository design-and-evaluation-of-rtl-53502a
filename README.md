# 2-bit-input autocorrelator for a radio spectrometer

A radio spectrometer can get the power spectrum of a signal without an FFT.
It measures the signal's autocorrelation C(τ) at a set of time lags, and the
spectrum is the Fourier transform of C(τ) (Wiener–Khinchin). In digital form
this is

    C(τ) = 1/(N+1) · Σ_t V(t) · V(t+τ)

For 1-bit samples the product is an XNOR, and every lag needs only a gate and
a counter. This design keeps that low cost for **2-bit samples**, which give
more accurate spectra. Each product is replaced by a 2-bit *similarity* that
XOR gates can compute. This RTL describes, at the logic level, a 4-channel
autocorrelator that was built as a single-flux-quantum (SFQ) superconducting
circuit. It also has the on-chip test circuits used to run it at high speed:
a burst clock generator, an input test register and an output monitoring
register.

The logic is written as ordinary synchronous SystemVerilog. The SFQ circuit
works with clock pulses. Here a single clock stands in for them: a clock edge
with the relevant enable high is one SFQ clock pulse.

## Data path

```
             +------------------- delay line (8 x 2-bit, zero skew) -----------------+
 sample ---->| s0 | s1 | s2 | s3 | s4 | s5 | s6 | s7 |----> monitor register (10 x 2b)
             +------------------------------------------------------------------------+
                x=s0   y=s1      y=s3      y=s5      y=s7
                 |      |         |         |         |
                 +-- correlator, lag 1      ...       correlator, lag 7   (c = 3-|x-y|)
                          |                              |
                     5-bit counter                  5-bit counter        (adds c each clock)
                          |                              |
                     readout register ---- trg_t1 ---- readout register
                          |  clk_dff, MSB first          |
                        sum_o[0]                       sum_o[3]
```

### Delay line (`acorr_shift_register`)
The delay line has eight stages of 2-bit samples, which is 16 flip-flops.
All stages are clocked at the same moment (zero skew). The reference sample
x is the output of stage 0, one clock old. Channel k's delayed sample y is
the output of stage 2k+1. The lags are therefore 1, 3, 5 and 7 clocks. The
lag count, the odd lags and the 16 flip-flops come from the original
circuit. Which stages are tapped is this design's choice: it is the one
arrangement that gives these lags and uses all 16 flip-flops.

### 2-bit correlator (`acorr_correlator`)
A sample is a quantisation level from 0 to 3. The correlator outputs

| \|x − y\| | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| c | 11 | 10 | 01 | 00 |

so c = 3 − |x − y|. Equal samples give the highest similarity and the two
extremes give the lowest. The output is the bitwise complement of |x − y|,
which can be built from XOR gates:

- `c0 = NOT(x0 XOR y0)`. The distance is odd exactly when the LSBs differ.
- `c1 = NOT((x1 XOR y1) AND NOT((x0 XOR y0) AND (x1 XOR x0)))`. The distance
  is 2 or more when the MSBs differ, except for the pair 01/10.

The truth table is that of the original circuit. The gate decomposition is
this design's own. The original pipelines this logic with concurrent-flow
clocking. Here the result is registered once, so c appears one enabled clock
after x and y.

### Integrating counter and readout (`acorr_integrator`)
Each channel sums its correlations in a 5-bit binary counter.

- c0 has weight 1 and goes into the first counter stage.
- c1 has weight 2 and joins the carry out of the first stage into the second
  stage.

In RTL this is the addition `count += c` on every enabled clock, modulo 32.
A `trg_t1` pulse copies all counts into 5-bit readout registers at the same
time and clears the counters. Each `clk_dff` pulse then shifts one bit out
of every channel, MSB first, on `sum_o[k]`. The bit appears on the clock
after the pulse, and `sum_valid_o` is high with it. The counter is meant to
decimate the result: the long-running sum is read out far more slowly than
samples arrive.

**Timing rule (all channels).** Number the enabled clocks g = 0, 1, … from
reset, and let s[g] be the sample that enters the delay line on clock g
(level 0 before the first one). On clock g ≥ 1, channel k adds

    3 − | s[g−2] − s[g−2−lag_k] |

On clock 0 it adds nothing, because the correlator still holds its reset
value 00. The delay line starts out full of level 0. Like the physical
circuit, the first clocks after reset therefore compare real samples with
level-0 history, and each such pair counts. 00 against 00 counts as the
highest similarity.

## High-speed test mode

`acorr_system` takes its samples from one of two sources, selected by
`use_adc`.

- **`use_adc = 1`:** the A/D converter drives `adc_data`, and `adc_valid` is
  the clock enable of the whole core.
- **`use_adc = 0` (on-chip test):**
  1. Load 10 samples at low speed into the input test register
     (`acorr_in_sr`), one per `insr_load` pulse. The first sample loaded
     leaves the register first.
  2. Pulse `cg_start`. The clock generator (`acorr_clock_gen`) raises the
     core enable for exactly 12 clocks, starting on the next clock. A
     second `cg_start` during a burst is ignored.
  3. The 12 clocks move the 10 samples, then two level-0 fill samples, into
     the delay line. During the burst the output monitoring register
     (`acorr_out_sr`) records the sample that leaves the end of the delay
     line.
  4. Pulse `trg_t1` and give five `clk_dff` pulses to read the four integrals.
     Give `outsr_read` pulses to read the monitor register, oldest sample
     first.

The register depth of 10 and the burst of 12 come from the original test
chip. Reading "12-bit clock generator" as "12 clock pulses per trigger" is
this design's interpretation. It fits: 10 samples plus the two clocks of
pipeline delay. What the monitor register watches is also this design's
choice.

## Files

| file | contents |
|---|---|
| `rtl/acorr_pkg.sv` | sample type and default sizes |
| `rtl/acorr_shift_register.sv` | zero-skew delay line with lag taps |
| `rtl/acorr_correlator.sv` | 2-bit XOR correlator |
| `rtl/acorr_integrator.sv` | 5-bit integrating counter with serial readout |
| `rtl/acorr_clock_gen.sv` | 12-pulse burst clock enable |
| `rtl/acorr_in_sr.sv`, `rtl/acorr_out_sr.sv` | input test and output monitoring registers |
| `rtl/acorr_system.sv` | top: the 4-channel system |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_corr_counter_sequence.sv` | the correlator and counter test sequence |

Parameters of `acorr_system` are `NCH` (lag channels, default 4, lags
1, 3, …, 2·NCH−1), `W` (counter width, 5), `DEPTH` (test register depth, 10)
and `BURST` (pulses per burst, 12).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Irtl rtl/acorr_pkg.sv tb/tb_acorr_system.sv --top-module tb_acorr_system
./obj_dir/Vtb_acorr_system
```

- `tb_acorr_system` runs the whole system at its default sizes. It runs 10
  bursts and 20 A/D streams with random data. It checks every channel's
  serial result and the monitor register against a reference model inside
  the testbench. It also checks that each mechanism happened at least once:
  burst, A/D streaming, source switch, counter wrap, ignored restart and
  monitor readout.
- `tb_corr_counter_sequence` drives the correlator and one counter with ten
  input pairs. The pairs give correlations 11, 10, 01, 00, 11, 10, 01, 11,
  10, 11, which sum to 20. The test reads back 1, 0, 1, 0, 0. Ten pairs take
  11 enabled clocks because of the correlator register.
- The module testbenches check the correlator against all 16 input pairs,
  the lag taps against a sample history, and the counter's sums, wrap-around
  and MSB-first readout. They also check the burst length and the order in
  which the test registers shift.

## Limits and departures from the original circuit

- **Counter range.** The counters are 5 bits wide and wrap silently modulo
  32. About 11 clocks of full correlation fill one. This matches the test
  chip. A real spectrometer integrates over millions of samples and needs
  `W` of about 20 or more. `W` is a parameter.
- **Number of lags.** The spectrometer this circuit was designed for uses
  about 1000 lags. The default here is the 4-lag test system. Set `NCH` to
  scale it. The lag step stays 2 unless `LAG_STEP` in the package is
  changed.
- **Pulse logic.** SFQ-specific effects are not modelled. These are pulse
  timing, the merging of simultaneous pulses in a confluence buffer, bias
  margins and the 50 GHz design clock. The RTL gives exact sums wherever the
  physical circuit works correctly.
- **Counter clear.** `trg_t1` clears the counters. In the original, reading
  the toggle-flip-flop counter resets it, but this is not spelled out.
- **Shared readout strobes.** All channels share one `trg_t1` and one
  `clk_dff`.
- **Reset.** An asynchronous active-low reset `rst_n` is added. It clears
  everything to level 0.
- **Not included.** The A/D converter, the SIS mixer and the room-temperature
  equipment are outside this RTL. The converter connects to
  `adc_data`/`adc_valid`, and the equipment reads `sum_o` using `clk_dff`.
