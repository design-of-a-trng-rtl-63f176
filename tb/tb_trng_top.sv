// tb_trng_top: end-to-end run of the complete TRNG at its default parameters.
//
// Phase 0: a short enable pulse clears the start-up flip-flops after power-up.
// Phase 1, disabled: every ring rests with its output high, the XOR of ten
// ones is 0, and the free-running sampler must deliver 0s.
// Phase 2, start-up: enable rises and the ten oscillators must start one
// after another (nine staggered activations by the flip-flop chain).
// Phase 3, generation: N_BITS bits are taken. At every rising edge of the
// sampling clock the testbench computes its own XOR of the ten oscillator
// outputs and requires the bitstream to equal it just after the edge. It
// also counts XOR transitions between samples (the XOR must toggle many
// times per sample), ones and zeros, and the bit rate (1.33 Mbit/s).
// Phase 4, disable: the oscillators stop and the output returns to 0s.
// The mechanisms counted (staggered starts, both bit values, fast XOR
// activity, disable) must each have happened at least once.
module tb_trng_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N      = 10;
  localparam int N_BITS = 2000;

  logic         enable = 1'b0;
  logic         bitstream, sample_clk, xor_out;
  logic [N-1:0] osc_out, osc_en;
  int checks = 0, failures = 0;
  int staggered_starts = 0, ones = 0, zeros = 0, xor_edges = 0, disables = 0;

  trng_top dut (
    .enable, .bitstream, .sample_clk, .xor_out, .osc_out, .osc_en
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%t: %s", $realtime, what);
    end
  endtask

  function automatic logic parity(logic [N-1:0] v);
    logic p = 1'b0;
    for (int b = 0; b < N; b++) p ^= v[b];
    return p;
  endfunction

  initial begin : watchdog
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 1; k < N; k++) begin : g_mon
    always @(posedge osc_en[k]) if (osc_en[k-1]) staggered_starts++;
  end
  always @(xor_out) xor_edges++;

  // Sample one bit: reference taken at the clock edge, output checked 1 ns later.
  task automatic take_bit(output logic b, input logic ref_expected_valid, input logic ref_value);
    logic expected;
    @(posedge sample_clk);
    expected = parity(osc_out);
    #1ns;
    check(bitstream == expected, "bitstream equals sampled XOR of the oscillators");
    check(xor_out == parity(osc_out), "xor_out equals XOR of the oscillators");
    if (ref_expected_valid) check(bitstream == ref_value, "bit value while disabled");
    b = bitstream;
  endtask

  real t0, t1, rate;
  logic b;
  int edges_before;

  initial begin
    // Power-on clear of the start-up flip-flops: a falling edge of enable.
    enable = 1'b1;
    #1ns enable = 1'b0;
    // Phase 1.
    repeat (20) take_bit(b, 1'b1, 1'b0);
    check(osc_out == '1 && osc_en == '0, "rings at rest while disabled");

    // Phase 2.
    @(negedge sample_clk);
    staggered_starts = 0;
    enable = 1'b1;
    wait (osc_en == '1);
    #1ns;
    check(staggered_starts == N - 1, $sformatf("staggered starts %0d", staggered_starts));

    // Phase 3.
    @(posedge sample_clk);
    t0 = $realtime;
    edges_before = xor_edges;
    for (int i = 0; i < N_BITS; i++) begin
      take_bit(b, 1'b0, 1'b0);
      if (b) ones++; else zeros++;
    end
    t1 = $realtime - 1.0;
    rate = N_BITS / (t1 - t0) * 1.0e3;   // Mbit/s
    $display("%0d bits: %0d ones, %0d zeros, %f Mbit/s, %f XOR edges per bit",
             N_BITS, ones, zeros, rate, real'(xor_edges - edges_before) / N_BITS);
    check(rate > 1.33 * 0.995 && rate < 1.33 * 1.005, "throughput 1.33 Mbit/s");
    check(real'(xor_edges - edges_before) / N_BITS > 10.0, "XOR toggles much faster than sampling");
    check(ones > 0 && zeros > 0, "both bit values produced");

    // Phase 4.
    @(negedge sample_clk) enable = 1'b0;
    disables++;
    #1ns check(osc_en == '0, "enables cleared");
    repeat (3) @(posedge sample_clk);
    edges_before = xor_edges;
    repeat (20) take_bit(b, 1'b1, 1'b0);
    check(xor_edges == edges_before, "XOR static while disabled");

    check(staggered_starts > 0, "mechanism: staggered start-up");
    check(ones > 0, "mechanism: sampled 1");
    check(zeros > 0, "mechanism: sampled 0");
    check(disables > 0, "mechanism: disable");
    $display("mechanisms: staggered starts=%0d ones=%0d zeros=%0d disables=%0d",
             staggered_starts, ones, zeros, disables);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
