// trng_act_chain: staggered start-up of the entropy-source oscillators.
//
// Oscillator 0 is enabled directly by the TRNG enable. Every further
// oscillator k is enabled by a D flip-flop whose D input is the TRNG enable
// and whose clock is the delay tap (output of the third inverting stage) of
// oscillator k-1. Oscillator k therefore starts on the first rising edge of
// that tap after oscillator k-1 has started, so the ten oscillators run with
// different phases, and the start-up ripples down the chain.
//
// In the design these are resistive-load flip-flops. The chain of flip-flops,
// their placement between neighbouring oscillators and the tap position
// follow the design. Which flip-flop pin takes the enable and which the tap
// is this design's reading of the drawing. The asynchronous clear on a low
// enable is this design's own addition: it gives the flip-flops a defined
// state and lets a low enable stop all oscillators, which the chain alone
// would not do once oscillator 0 has stopped clocking it.
//
// Ports: enable (TRNG enable), dly[k] (delay tap of oscillator k, k = 0 to
// N_OSC-2), osc_en[k] (enable of oscillator k). Timing: osc_en[k] rises on
// the first rising edge of dly[k-1] with enable high; all fall with enable.
module trng_act_chain
  import trng_pkg::*;
#(
  parameter int unsigned N_OSC_P = N_OSC
) (
  input  logic               enable,
  input  logic [N_OSC_P-2:0] dly,
  output logic [N_OSC_P-1:0] osc_en
);
  timeunit 1ns;
  timeprecision 1ps;

  assign osc_en[0] = enable;

  for (genvar k = 1; k < int'(N_OSC_P); k++) begin : g_stage
    logic q;   // flip-flop k, clocked by oscillator k-1's delay tap
    always_ff @(posedge dly[k-1] or negedge enable) begin
      if (!enable) q <= 1'b0;
      else         q <= enable;
    end
    assign osc_en[k] = q;
  end
endmodule
