// tb_trng_ring_osc: timing of one jittery ring oscillator.
// Checks the resting levels while disabled, the first edges after enable
// (delay tap after 3 stage delays, output after 11), the mean period
// (1.48 MHz), the period jitter (381 ps nominal, one sigma), that the delay
// tap runs at the output's rate, and that a low enable returns the ring to
// rest. Expected values come from the stage count and period, not the model.
module tb_trng_ring_osc;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned STAGES    = 11;
  localparam real         PERIOD_NS = 1.0e3 / 1.48;          // 675.676 ns
  localparam real         STAGE_NS  = PERIOD_NS / (2.0 * STAGES);
  localparam int          N_PER     = 400;

  logic en = 1'b0, dly, out;
  int checks = 0, failures = 0;

  // Main instance without instance mismatch, so the period can be held to
  // 0.1 %; a second instance with the default mismatch is only checked to
  // stay within 1.5 % of 1.48 MHz.
  trng_ring_osc #(.MISMATCH_PS(0)) dut (.en(en), .dly(dly), .out(out));

  logic dly2, out2;
  int   rises2 = 0;
  trng_ring_osc dut2 (.en(en), .dly(dly2), .out(out2));
  always @(posedge out2) rises2++;

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

  real t_en, t_dly, t_out, t_prev, sum, sumsq, mean, sd;
  int  dly_rises;

  initial begin
    #2us;
    check(out == 1'b1 && dly == 1'b1, "resting levels while disabled");
    en = 1'b1;
    t_en = $realtime;
    @(dly) t_dly = $realtime - t_en;
    check(dly == 1'b0, "tap falls first");
    check(t_dly > 2.8 * STAGE_NS && t_dly < 3.2 * STAGE_NS, $sformatf("tap delay %f ns", t_dly));
    @(out) t_out = $realtime - t_en;
    check(out == 1'b0, "output falls first");
    check(t_out > 10.8 * STAGE_NS && t_out < 11.2 * STAGE_NS, $sformatf("output delay %f ns", t_out));

    // Period statistics over N_PER periods of the output.
    @(posedge out) t_prev = $realtime;
    sum = 0.0; sumsq = 0.0;
    fork
      begin
        for (int i = 0; i < N_PER; i++) begin
          real p;
          @(posedge out);
          p = $realtime - t_prev;
          t_prev = $realtime;
          sum += p;
          sumsq += p * p;
        end
      end
      begin
        dly_rises = 0;
        forever @(posedge dly) dly_rises++;
      end
    join_any
    disable fork;
    mean = sum / N_PER;
    check(rises2 > N_PER * 0.985 && rises2 < N_PER * 1.015 + 2,
          $sformatf("default instance rises %0d in %0d periods", rises2, N_PER));
    sd = $sqrt(sumsq / N_PER - mean * mean) * 1000.0;   // ps
    $display("mean period %f ns (%f MHz), period jitter %f ps", mean, 1.0e3 / mean, sd);
    check(mean > PERIOD_NS * 0.999 && mean < PERIOD_NS * 1.001, "mean period 1.48 MHz");
    check(sd > 381.0 * 0.75 && sd < 381.0 * 1.25, "period jitter about 381 ps");
    check(dly_rises >= N_PER - 1 && dly_rises <= N_PER + 1, $sformatf("tap rises %0d", dly_rises));

    // Disable: back to rest within two stage delays, then static.
    en = 1'b0;
    #(2.0 * STAGE_NS * 1ns);
    check(out == 1'b1 && dly == 1'b1, "rest after disable");
    fork
      begin @(out or dly); check(1'b0, "edge while disabled"); end
      #5us;
    join_any
    disable fork;
    check(out == 1'b1 && dly == 1'b1, "still at rest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
