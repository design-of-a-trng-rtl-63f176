// trng_xor_tree: N-input XOR that merges the oscillator outputs.
//
// The design builds its 10-input XOR by cascading nine two-input XOR gates:
// stage k XORs input k into the result of stage k-1. The output toggles on
// every edge of every input, so it carries the jittered transitions of all
// oscillators at once, many times per sampling period. Purely combinational.
// In silicon the gates are pseudo-CMOS bootstrap gates, chosen so that their
// delay does not skew the XOR result; here they are ideal.
//
// Ports: in[N_IN-1:0] (oscillator outputs), out (their XOR).
module trng_xor_tree
  import trng_pkg::*;
#(
  parameter int unsigned N_IN = N_OSC
) (
  input  logic [N_IN-1:0] in,
  output logic            out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N_IN-1:0] chain;   // chain[k]: XOR of in[0..k]

  assign chain[0] = in[0];
  for (genvar k = 1; k < int'(N_IN); k++) begin : g_xor2
    assign chain[k] = chain[k-1] ^ in[k];
  end

  assign out = chain[N_IN-1];

  initial assert (N_IN >= 2) else $error("XOR tree needs at least two inputs");
endmodule
