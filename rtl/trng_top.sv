// trng_top: true random number generator based on jittered oscillator sampling.
//
// Ten ring oscillators with large random period jitter are started one after
// another when enable rises (trng_entropy_source). Their outputs are merged by
// a 10-input XOR (trng_xor_tree), which toggles many times per sampling
// period and so turns small timing jitter into an unpredictable level. A
// slower, low-jitter internal clock (trng_internal_clock) triggers a D
// flip-flop (trng_sampler) that samples the XOR output; each rising edge of
// the internal clock yields one bit of the bitstream. At the default
// parameters the oscillators run at about 1.48 MHz and the clock at
// 1.33 MHz, so the TRNG delivers 1.33 Mbit/s.
//
// The block structure and the numbers follow the design. The oscillators and
// the internal clock are behavioural models of analog parts; simulate with
// timing enabled. There is no handshake: bitstream changes shortly after each
// rising edge of sample_clk and is stable until the next one, so a consumer
// takes it on the falling edge of sample_clk or one clock later. xor_out and
// osc_en are brought out for observation only.
module trng_top
  import trng_pkg::*;
#(
  parameter int unsigned N_OSC_P       = N_OSC,
  parameter int unsigned N_STAGES      = OSC_STAGES,
  parameter int unsigned TAP           = DLY_TAP,
  parameter int unsigned OSC_PERIOD    = OSC_PERIOD_PS,
  parameter int unsigned OSC_JITTER    = OSC_JITTER_PS,
  parameter int unsigned OSC_MISMATCH  = OSC_MISMATCH_PS,
  parameter int unsigned CLK_PERIOD    = CLK_PERIOD_PS,
  parameter int unsigned CLK_JITTER    = CLK_JITTER_PS
) (
  input  logic               enable,
  output logic               bitstream,
  output logic               sample_clk,
  output logic               xor_out,
  output logic [N_OSC_P-1:0] osc_out,
  output logic [N_OSC_P-1:0] osc_en
);
  timeunit 1ns;
  timeprecision 1ps;

  trng_entropy_source #(
    .N_OSC_P   (N_OSC_P),
    .N_STAGES  (N_STAGES),
    .TAP       (TAP),
    .PERIOD_PS (OSC_PERIOD),
    .JITTER_PS (OSC_JITTER),
    .MISMATCH_PS (OSC_MISMATCH)
  ) u_source (
    .enable  (enable),
    .osc_out (osc_out),
    .osc_en  (osc_en)
  );

  trng_xor_tree #(.N_IN(N_OSC_P)) u_xor (
    .in  (osc_out),
    .out (xor_out)
  );

  trng_internal_clock #(
    .PERIOD_PS (CLK_PERIOD),
    .JITTER_PS (CLK_JITTER)
  ) u_clock (
    .out (sample_clk)
  );

  trng_sampler u_sample (
    .clk (sample_clk),
    .d   (xor_out),
    .q   (bitstream)
  );
endmodule
