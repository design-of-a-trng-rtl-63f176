// trng_entropy_source: the ten jittery ring oscillators and their start-up chain.
//
// Oscillator 0 starts when enable rises. The activation chain then starts
// each following oscillator on a rising edge of the previous oscillator's
// delay tap, so the oscillators run out of phase with one another. All
// oscillators have the same nominal frequency; their phases drift apart
// through the random jitter of each ring. The structure (ten rings, start-up
// flip-flops fed from the third inverting stage) follows the design; the
// oscillators are behavioural models (see trng_ring_osc), so this module is
// structural logic around analog parts and simulates only with timing.
//
// Ports: enable (TRNG enable), osc_out[k] (buffered output of oscillator k),
// osc_en[k] (enable of oscillator k, for observation).
module trng_entropy_source
  import trng_pkg::*;
#(
  parameter int unsigned N_OSC_P   = N_OSC,
  parameter int unsigned N_STAGES  = OSC_STAGES,
  parameter int unsigned TAP       = DLY_TAP,
  parameter int unsigned PERIOD_PS = OSC_PERIOD_PS,
  parameter int unsigned JITTER_PS = OSC_JITTER_PS,
  parameter int unsigned MISMATCH_PS = OSC_MISMATCH_PS
) (
  input  logic               enable,
  output logic [N_OSC_P-1:0] osc_out,
  output logic [N_OSC_P-1:0] osc_en
);
  timeunit 1ns;
  timeprecision 1ps;

  // Delay taps; the last oscillator's tap has no successor to start and is
  // left unused, as in the design.
  logic [N_OSC_P-1:0] dly;

  trng_act_chain #(.N_OSC_P(N_OSC_P)) u_chain (
    .enable (enable),
    .dly    (dly[N_OSC_P-2:0]),
    .osc_en (osc_en)
  );

  for (genvar k = 0; k < int'(N_OSC_P); k++) begin : g_osc
    trng_ring_osc #(
      .N_STAGES  (N_STAGES),
      .TAP       (TAP),
      .PERIOD_PS (PERIOD_PS),
      .JITTER_PS (JITTER_PS),
      .MISMATCH_PS (MISMATCH_PS)
    ) u_osc (
      .en  (osc_en[k]),
      .dly (dly[k]),
      .out (osc_out[k])
    );
  end
endmodule
