`timescale 1ns/1ps
// Testbench of the divide-by-two: the output is low in reset, then has half
// the input frequency with a 50 % duty cycle, toggling on input rising edges.
module clk_div2_tb;
  logic clk = 0, rst_n = 1, q;
  always #2.5 clk = ~clk;
  int checks = 0, failures = 0;
  clk_div2 dut (.clk_in(clk), .rst_n, .clk_out(q));
  initial begin
    #10000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic prev;
    #1 rst_n = 0;  // a falling edge after time 0
    #11; checks++; if (q !== 1'b0) begin failures++; $display("FAIL: not low in reset"); end
    @(negedge clk); rst_n = 1;
    prev = q;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk); #0.5;
      checks++;
      if (q !== ~prev) begin failures++; $display("FAIL: no toggle at edge %0d", i); end
      prev = q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
