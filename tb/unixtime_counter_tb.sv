`timescale 1ns/1ps
// Testbench of the Unixtime counter with a 10-cycle second: one increment
// and one tick every 10 cycles, and a load restarting the second.
module unixtime_counter_tb;
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1, load = 0; logic [31:0] val = 0, sec; logic tick;
  int checks = 0, failures = 0;
  unixtime_counter #(.CLK_HZ(10)) dut (.clk, .rst, .load, .load_value(val), .seconds(sec), .tick);
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  int ticks = 0; always @(posedge clk) if (tick && !rst) ticks++;
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    repeat (100) @(posedge clk); #1;
    check(sec == 10, $sformatf("10 seconds in 100 cycles (%0d)", sec));
    @(posedge clk); #1;
    check(ticks == 10, $sformatf("one tick per second (%0d)", ticks));
    repeat (5) @(posedge clk); #1;
    val = 32'h5F00_0000; load = 1; @(posedge clk); #1 load = 0;
    check(sec == 32'h5F00_0000, "loaded from PC time");
    repeat (9) @(posedge clk); #1;
    check(sec == 32'h5F00_0000, "no increment before a full second after load");
    @(posedge clk); #1;
    check(sec == 32'h5F00_0001, "increment one second after load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
