// trng_internal_clock: behavioural model of the TRNG's sampling clock.
//
// This is a behavioural model, not synthesizable logic: the real part is a
// free-running ring oscillator of pseudo-CMOS bootstrap gates, chosen for
// rail-to-rail swing, fast edges and low jitter. Only its function and rate
// are modelled: out is a square wave of mean period PERIOD_PS whose half
// periods each carry a small random jitter, scaled so that the period jitter
// is JITTER_PS (one sigma). The default period is the reciprocal of the
// design's 1.33 Mbit/s throughput, since every rising edge yields one bit.
// The ring's stage count is not given by the design and is not modelled; the
// jitter value and the absence of an enable input (none is drawn for this
// block) are this model's choices. out starts low at time zero.
module trng_internal_clock
  import trng_pkg::*;
#(
  parameter int unsigned PERIOD_PS = CLK_PERIOD_PS,
  parameter int unsigned JITTER_PS = CLK_JITTER_PS
) (
  output logic out
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned HALF_PS = PERIOD_PS / 2;
  // Half-period sigma = JITTER_PS / sqrt(2); binomial sigma = sqrt(JIT_FLIPS)/2 steps.
  localparam int unsigned Q_RAW   = int'(real'(JITTER_PS) / $sqrt(2.0) * 2.0 / $sqrt(real'(JIT_FLIPS)) + 0.5);
  localparam int unsigned Q_PS    = (Q_RAW == 0) ? 1 : Q_RAW;
  localparam int unsigned JIT_ON  = (JITTER_PS != 0) ? 1 : 0;
  localparam int unsigned BASE_PS = HALF_PS - JIT_ON * Q_PS * (JIT_FLIPS / 2);
  localparam logic [31:0] FLIP_MASK = 32'((64'd1 << JIT_FLIPS) - 1);

  logic clk_q;

  initial clk_q = 1'b0;

  always begin : osc
    int unsigned steps;
    steps = JIT_ON * $countones($urandom() & FLIP_MASK);
    #(BASE_PS * 1ps);
    repeat (steps) #(Q_PS * 1ps);
    clk_q = ~clk_q;
  end

  assign out = clk_q;

  initial assert (HALF_PS > Q_PS * (JIT_FLIPS / 2)) else $error("jitter too large for the period");
endmodule
