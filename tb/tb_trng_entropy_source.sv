// tb_trng_entropy_source: staggered start-up and free running of the ten rings.
// After enable, oscillator k must start after oscillator k-1, on the first
// rising edge of that ring's delay tap: 3 + 11 = 14 stage delays later. All
// rings must then run at about 1.48 MHz, and a low enable must stop them all.
module tb_trng_entropy_source;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int  N        = 10;
  localparam real STAGE_NS = 1.0e3 / 1.48 / 22.0;
  localparam real WINDOW   = 100000.0;   // ns

  logic         enable = 1'b0;
  logic [N-1:0] osc_out, osc_en;
  int checks = 0, failures = 0;
  real t_start [N];
  int  rises [N];
  int  starts = 0;

  trng_entropy_source dut (.enable(enable), .osc_out(osc_out), .osc_en(osc_en));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(posedge osc_en[k]) begin
      t_start[k] = $realtime;
      starts++;
    end
    always @(posedge osc_out[k]) rises[k]++;
  end

  initial begin
    #1ns enable = 1'b0;
    #2us;
    check(osc_en == '0, "all oscillators off while disabled");
    for (int round = 0; round < 2; round++) begin
      starts = 0;
      enable = 1'b1;
      #(20.0 * STAGE_NS * N * 1ns);
      check(osc_en == '1, "all oscillators started");
      check(starts == N, $sformatf("start events %0d", starts));
      for (int k = 1; k < N; k++) begin
        real gap;
        gap = t_start[k] - t_start[k-1];
        check(gap > 13.5 * STAGE_NS && gap < 14.5 * STAGE_NS,
              $sformatf("oscillator %0d starts %f ns after its predecessor", k, gap));
      end
      foreach (rises[k]) rises[k] = 0;
      #(WINDOW * 1ns);
      for (int k = 0; k < N; k++) begin
        real f_mhz;
        f_mhz = rises[k] / WINDOW * 1.0e3;
        check(f_mhz > 1.46 && f_mhz < 1.50, $sformatf("oscillator %0d at %f MHz", k, f_mhz));
      end
      enable = 1'b0;
      #1ns check(osc_en == '0, "disable clears the enables");
      #(3.0 * STAGE_NS * 1ns);
      foreach (rises[k]) rises[k] = 0;
      #5us;
      check(rises.sum() == 0, "no oscillation while disabled");
      check(osc_out == '1, "outputs at rest");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
