// trng_pkg: shared sizes and timing constants of the ring-oscillator TRNG.
//
// The TRNG combines ten jittery ring oscillators through an XOR and samples
// the result with a slower internal clock. The constants below are the
// nominal numbers of that design: ten oscillators of eleven inverting stages
// each (one NAND and ten inverters), the start-up delay tap after the third
// inverting stage, an oscillator frequency of about 1.48 MHz with a period
// jitter of about 381 ps (one standard deviation), and a sampling rate of
// 1.33 Mbit/s. Times are integer picoseconds; the periods are the reciprocals
// of the stated frequencies, rounded. The sampling clock's jitter is not
// given by the design ("low jitter"); 20 ps is this model's own choice.
package trng_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N_OSC         = 10;      // ring oscillators
  localparam int unsigned OSC_STAGES    = 11;      // NAND + 10 inverters
  localparam int unsigned DLY_TAP       = 3;       // delay tap after 3rd inverting stage
  localparam int unsigned OSC_PERIOD_PS = 675676;  // 1 / 1.48 MHz
  localparam int unsigned OSC_JITTER_PS = 381;     // period jitter, 1 sigma
  localparam int unsigned OSC_MISMATCH_PS = 92;    // assumed: 0.3 % per-ring frequency spread
  localparam int unsigned CLK_PERIOD_PS = 751880;  // 1 / 1.33 MHz (one bit per period)
  localparam int unsigned CLK_JITTER_PS = 20;      // assumed: "low jitter"

  // Number of independent fair coin flips summed to make one jitter sample.
  // Their sum is binomial with mean JIT_FLIPS/2 and sigma sqrt(JIT_FLIPS)/2,
  // a close approximation of Gaussian noise.
  localparam int unsigned JIT_FLIPS     = 16;
endpackage
