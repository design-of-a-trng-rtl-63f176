// tb_trng_sampler: the sampling flip-flop takes d on rising clock edges only.
// Random data changes between edges; the output is compared, just before and
// just after each edge, with the value the testbench last saw on d at an edge.
module tb_trng_sampler;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, d = 1'b0, q;
  logic expected;
  int checks = 0, failures = 0;

  trng_sampler dut (.clk(clk), .d(d), .q(q));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // First edge defines the output.
    d = 1'b1;
    #10ns clk = 1'b1; expected = 1'b1;
    #10ns clk = 1'b0;
    for (int i = 0; i < 500; i++) begin
      // Toggle d several times while the clock is low or high, away from edges.
      repeat (4) begin
        #7ns d = 1'($urandom());
        checks++;
        if (q !== expected) failures++;
      end
      #5ns clk = 1'b1;
      expected = d;
      #1ns;
      checks++;
      if (q !== expected) begin
        failures++;
        if (failures < 10) $display("edge %0d: q=%b expected=%b", i, q, expected);
      end
      #3ns d = ~d;          // change while clock high: must not pass
      #3ns;
      checks++;
      if (q !== expected) failures++;
      #5ns clk = 1'b0;
      #1ns;
      checks++;
      if (q !== expected) failures++;   // falling edge must not sample
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
