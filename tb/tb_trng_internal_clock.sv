// tb_trng_internal_clock: rate and jitter of the sampling clock.
// The mean period must give 1.33 Mbit/s (one bit per rising edge) and the
// period jitter must be small (20 ps nominal), far below the entropy
// oscillators' 381 ps.
module tb_trng_internal_clock;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N_PER = 1000;
  logic clk;
  int checks = 0, failures = 0;
  real t_prev, sum, sumsq, mean, sd, hi_sum;

  trng_internal_clock dut (.out(clk));

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk) t_prev = $realtime;
    sum = 0.0; sumsq = 0.0; hi_sum = 0.0;
    for (int i = 0; i < N_PER; i++) begin
      real p, t_rise;
      t_rise = $realtime;
      @(negedge clk) hi_sum += $realtime - t_rise;
      @(posedge clk);
      p = $realtime - t_prev;
      t_prev = $realtime;
      checks++;
      if (p < 751.88 - 0.2 || p > 751.88 + 0.2) failures++;   // +-10 sigma of 20 ps
      sum += p;
      sumsq += p * p;
    end
    mean = sum / N_PER;
    sd = $sqrt(sumsq / N_PER - mean * mean) * 1000.0;
    $display("mean period %f ns = %f Mbit/s, jitter %f ps, duty %f", mean, 1.0e3 / mean, sd, hi_sum / sum);
    checks++; if (!(1.0e3 / mean > 1.33 * 0.995 && 1.0e3 / mean < 1.33 * 1.005)) failures++;
    checks++; if (!(sd > 2.0 && sd < 60.0)) failures++;
    checks++; if (!(hi_sum / sum > 0.49 && hi_sum / sum < 0.51)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
