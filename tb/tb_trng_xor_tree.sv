// tb_trng_xor_tree: exhaustive check of the 10-input XOR.
// Every one of the 1024 input words is applied; the expected output is the
// parity of the word, counted bit by bit in the testbench.
module tb_trng_xor_tree;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 10;
  logic [N-1:0] in;
  logic         out;
  int checks = 0, failures = 0;

  trng_xor_tree #(.N_IN(N)) dut (.in(in), .out(out));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < (1 << N); w++) begin
      logic par;
      in = N'(w);
      #1ns;
      par = 1'b0;
      for (int b = 0; b < int'(N); b++) if ((w >> b) & 1) par = ~par;
      checks++;
      if (out !== par) begin
        failures++;
        if (failures < 10) $display("mismatch in=%b out=%b expected=%b", in, out, par);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
