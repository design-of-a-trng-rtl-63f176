# Ring-oscillator TRNG for IGZO thin-film flexible circuits

This is a true random number generator (TRNG) built for 600 nm IGZO thin-film transistor (TFT)
technology. That process has only n-type devices and is noisy. The design uses the noise as its
entropy instead of fighting it:

* Ten deliberately noisy ring oscillators run at the same nominal frequency (about 1.48 MHz).
  Each has a period jitter of about 381 ps (one standard deviation).
* They are started one after another, so that they run out of phase.
* Their outputs go into one 10-input XOR. The XOR output changes level whenever any oscillator
  has an edge, so it toggles roughly twenty times per oscillator period. Each of those edges is
  shifted by jitter.
* A slower, clean internal clock (1.33 MHz) samples the XOR output in a D flip-flop. Each rising
  edge of that clock gives one bit, for 1.33 Mbit/s.

The repository holds SystemVerilog for the whole signal chain. The gate-level parts are
synthesizable RTL. The two analog oscillators are behavioural models with timing.

## Signal chain

```
 enable ──┬──────────────► osc 0 ──dly──► FF 1 ──► osc 1 ──dly──► FF 2 ──► ... ──► osc 9
          └── D input and clear of every FF                                          │
                 osc_out[0..9] ──► 10-input XOR (9 cascaded 2-input gates) ──► xor_out
                                                                                     │
 internal clock (1.33 MHz) ─────────────────────────────────────► sampling DFF ──► bitstream
```

| Module | Kind | Role |
|---|---|---|
| `trng_top` | structural | whole TRNG |
| `trng_entropy_source` | structural | ten oscillators plus the start-up chain |
| `trng_ring_osc` | behavioural model | one jittery NAND + 10-inverter ring |
| `trng_act_chain` | RTL | start-up flip-flops |
| `trng_xor_tree` | RTL | 10-input XOR |
| `trng_internal_clock` | behavioural model | sampling clock |
| `trng_sampler` | RTL | sampling flip-flop |
| `trng_pkg` | package | nominal numbers shared by all modules |

## Staggered start-up

The rings have the same nominal frequency. If they all started on the same edge, their outputs
would line up, and the XOR would show long regions whose level can be predicted. To avoid this,
each ring is started at a different phase:

* Ring 0 is enabled directly by `enable`.
* Ring k (k = 1 to 9) is enabled by flip-flop k. Its D input is `enable`, and its clock is the
  delay tap `dly` of ring k-1. That tap is the output of the third inverting stage.
* When ring k-1 starts, its tap falls after 3 stage delays and rises 11 stage delays later. So
  ring k starts 14 stage delays (about 430 ns) after ring k-1. The whole chain is running about
  3.9 µs after `enable` rises.
* With 22 stage delays per period, the ten rings start at phase offsets of 0, 14, 6, 20, 12, 4,
  18, 10, 2 and 16 stage delays. These are ten different phases spread over the period.

This design adds an asynchronous clear of the flip-flops on a low `enable`. Without it,
stopping ring 0 would freeze the clock of flip-flop 1, and rings 1 to 9 would keep running.
With the clear, a falling `enable` stops every ring and leaves the flip-flops in a known state.

**Power-up:** the flip-flops are cleared by a falling edge of `enable`. Drive `enable` high and
then low once after power-up (the testbenches use a 1 ns pulse) before relying on the rings being
stopped.

## Oscillator model and where the randomness comes from

`trng_ring_osc` simulates a single edge running around an 11-stage ring: the NAND, then ten
inverters. The edge moves forward one stage per stage delay. While `en` is low, every stage sits
at its resting level: the NAND output is high, the stages alternate, and the buffered output
rests high.

Each stage delay has three parts:

* **Fixed part:** period / 22, which is 30.71 ns at the default period.
* **Jitter:** noise drawn fresh for every stage, from the sum of 16 fair coin flips (a binomial
  that is close to Gaussian). It is scaled so that the period jitter is `JITTER_PS`, 381 ps by
  default. The measured value is 375 to 385 ps.
* **Instance mismatch:** an offset drawn once per ring at time zero, with a sigma of
  `MISMATCH_PS` = 92 ps per stage. That is a frequency spread of about 0.3 % between rings.

Simulators reject delays that are computed at run time. So the model builds each random delay
from a repeat count of a constant step, for example `repeat (n) #(Q_PS * 1ps)`.

**Why the mismatch is there.** With jitter alone, 381 ps per period adds up to only about 18 ns
of phase drift over the 2,000-bit run. That is less than one stage delay. The ten phases then stay
almost fixed, the XOR waveform repeats, and the sampled bits are strongly biased: 877 ones in
2,000 bits in one run. A frequency spread of a few tenths of a percent makes the relative phases
rotate, which moves the bias close to 50 %. The spread is this design's own choice. The source
gives only "approximately 1.48 MHz" for all rings.

**What the model does and does not tell you.** The model reproduces the timing of the circuit:
frequency, jitter, tap delay, start-up order and sampling rate. It does not reproduce the
statistical quality of real silicon noise. The sequence is built from a pseudo-random generator
shaped by the assumptions above. `tb_trng_nist_2k` runs eight SP 800-22 tests on 2,000 bits:
monobit, block frequency, runs, longest run, non-overlapping templates, serial, approximate
entropy and cumulative sums. Results across 12 random seeds:

* The number of tests passed ranged from 0 to 7 of 8. The typical result was 5.
* Longest run and runs passed most often, in 10 and 9 of the 12 runs.
* Block frequency, serial and template matching failed most often.

The failures come from structure the model leaves in the bits. The ten phases rotate only
slowly, so the XOR duty cycle wanders over hundreds of bits. The 381 ps of jitter per period is
also small against the roughly 34 ns between XOR edges, so neighbouring samples are correlated.
The original circuit is reported to pass all 8 tests on a 2,000-bit sequence. This model does not
reproduce that result, and it should not be used to judge the circuit's entropy.

## Interface and timing of `trng_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `enable` | in | 1 | high: run the rings; falling edge: stop and clear them |
| `bitstream` | out | 1 | random bit; changes just after each rising edge of `sample_clk` |
| `sample_clk` | out | 1 | free-running internal clock, one bit per period |
| `xor_out` | out | 1 | XOR of the ring outputs (observation) |
| `osc_out` | out | 10 | ring outputs (observation) |
| `osc_en` | out | 10 | ring enables (observation) |

There is no valid/ready handshake, because the source describes none. The consumer takes
`bitstream` on the falling edge of `sample_clk` or later. Bits sampled before all ten rings are
running have less entropy: discard about the first 6 bits after `enable` rises. With `enable` low,
all rings rest high, and the sampler delivers the XOR of ten ones, which is 0.

Parameters of `trng_top` (defaults from `trng_pkg`):

| Parameter | Default | Origin |
|---|---|---|
| `N_OSC_P` | 10 | design |
| `N_STAGES` | 11 (NAND + 10 inverters) | design |
| `TAP` | 3 (tap after third inverting stage) | design |
| `OSC_PERIOD` | 675676 ps (1.48 MHz) | design |
| `OSC_JITTER` | 381 ps | design |
| `OSC_MISMATCH` | 92 ps per stage | own choice |
| `CLK_PERIOD` | 751880 ps (1.33 Mbit/s) | derived from the design's throughput |
| `CLK_JITTER` | 20 ps | own choice (the design says only "low jitter") |

The slowest process corner was reported at 0.74 Mbit/s. That corresponds to a `CLK_PERIOD` of
about 1351351 ps. The defaults are the nominal 3 V, 25 °C values.

## Departures from the original circuit

* The transistor-level gate styles are not represented: resistive load for the noisy rings and
  flip-flops, pseudo-CMOS bootstrap for the XOR, the sampler and the clock ring. The same goes for
  the stage capacitors and the output buffer. Their effect appears only through the delay and
  jitter numbers. The XOR and the flip-flops are ideal.
* The original drawing does not make clear which start-up flip-flop pin takes `enable` and which
  takes the tap. This design clocks the flip-flop from the tap.
* Added here: the asynchronous clear of the start-up flip-flops, the per-ring frequency mismatch,
  and the 20 ps clock jitter. The sampling clock has no enable, because none is drawn.
* The 10-input XOR is a linear cascade of nine 2-input gates. A different arrangement of the same
  gates would give the same function.
* Metastability of the sampling flip-flop is not modelled.

## Simulation

All modules use `timeunit 1ns; timeprecision 1ps`. The models need `--timing`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/trng_pkg.sv tb/tb_trng_top.sv --top-module tb_trng_top -o sim
obj_dir/sim +verilator+seed+3
```

Change the seed to get a different noise realisation. Every testbench checks its results itself
and ends by printing `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_trng_xor_tree` | all 1024 inputs against a bit-by-bit parity |
| `tb_trng_sampler` | rising-edge-only capture; data changes while the clock is high or on the falling edge are ignored |
| `tb_trng_act_chain` | start-up order, no start while disabled, clear on low enable |
| `tb_trng_ring_osc` | resting levels; tap after 3 and output after 11 stage delays; mean period within 0.1 %; jitter 381 ps ± 25 %; stop on disable |
| `tb_trng_internal_clock` | 1.33 Mbit/s ± 0.5 %, jitter, duty cycle |
| `tb_trng_entropy_source` | ten starts, each 14 stage delays after the previous; every ring at 1.46 to 1.50 MHz; all stop on disable |
| `tb_trng_top` | full design at default parameters. It checks 2,000 bits against the testbench's own XOR of the rings at each sampling edge, the 1.33 Mbit/s rate, about 22 XOR edges per bit, zeros while disabled, and that each mechanism occurred: nine staggered starts, both bit values, disable. |
| `tb_trng_nist_2k` | 2,000 bits bit-exact against the rings, plus eight SP 800-22 tests. The tests' arithmetic is checked against the standard's worked examples; their verdicts on the generated bits are reported but not asserted. |

A full-size run of `tb_trng_top` simulates about 1.6 ms and takes about 2 seconds.
