// tb_trng_act_chain: start-up ordering of the oscillator enables.
// The testbench drives the enable and the delay taps directly. It checks that
// osc_en[0] follows enable, that osc_en[k] rises only on a rising edge of
// dly[k-1] while enable is high (not on a falling edge, not while enable is
// low), that the stages come up one by one when the taps are pulsed in order,
// and that a low enable clears every stage at once.
module tb_trng_act_chain;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 10;
  logic         enable = 1'b0;
  logic [N-2:0] dly    = '0;
  logic [N-1:0] osc_en;
  logic [N-1:0] expected;
  int checks = 0, failures = 0;

  trng_act_chain #(.N_OSC_P(N)) dut (.enable(enable), .dly(dly), .osc_en(osc_en));

  task automatic check(string what);
    checks++;
    if (osc_en !== expected) begin
      failures++;
      $display("%s: osc_en=%b expected=%b", what, osc_en, expected);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Clear the flip-flops with a low enable pulse.
    #5ns enable = 1'b1;
    #5ns enable = 1'b0;
    #5ns expected = '0;
    check("cleared");

    // Taps pulsed while enable is low: nothing starts.
    for (int k = 0; k < int'(N) - 1; k++) begin
      #5ns dly[k] = 1'b1;
      #5ns dly[k] = 1'b0;
    end
    #1ns check("taps while disabled");

    for (int round = 0; round < 3; round++) begin
      enable = 1'b1;
      #1ns expected = 10'b1;
      check("enable starts oscillator 0");
      // Raise the taps in order; each rising edge starts exactly one more stage.
      for (int k = 0; k < int'(N) - 1; k++) begin
        #10ns dly[k] = 1'b1;
        #1ns expected[k+1] = 1'b1;
        check("rising tap starts next stage");
        #10ns dly[k] = 1'b0;
        #1ns check("falling tap changes nothing");
      end
      // A tap out of order on an already running stage changes nothing.
      #10ns dly[N-2] = 1'b1;
      #1ns check("repeated tap");
      dly[N-2] = 1'b0;
      #10ns enable = 1'b0;
      #1ns expected = '0;
      check("low enable clears all");
      // Only the first stage after a tap pulse when the previous stage is off.
      #10ns enable = 1'b1;
      #1ns dly[4] = 1'b1;
      #1ns expected = 10'b1 | (10'b1 << 5);
      check("tap starts its own successor only");
      dly[4] = 1'b0;
      #5ns enable = 1'b0;
      #5ns expected = '0;
      check("cleared again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
