// trng_sampler: entropy extraction flip-flop.
//
// A D flip-flop samples the combined oscillator signal d on every rising edge
// of the internal clock clk; q is the TRNG bitstream, one new bit per clock
// period, held until the next rising edge. The design uses a pseudo-CMOS
// bootstrap flip-flop for its fast response; the design gives it no reset and
// none is added here (q is undefined until the first clock edge).
//
// Ports: clk (internal sampling clock), d (XOR output), q (random bit).
module trng_sampler (
  input  logic clk,
  input  logic d,
  output logic q
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk) q <= d;
endmodule
