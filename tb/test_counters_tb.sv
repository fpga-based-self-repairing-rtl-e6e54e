`timescale 1ns/1ps
// Testbench of the fault-injection test circuit, in both variants (single
// and tripled LATCH): latched counts equal the reference; one corrupted
// counter is flagged but is no failure; two corrupted counters are a failure;
// with tripled LATCH a missing strobe on one copy only affects that copy.
module test_counters_tb;
  logic clk = 0; always #2.5 clk = ~clk;
  logic rst = 1; logic [2:0] latch = 0;
  logic [31:0] cl [3], cr, v, cl3 [3], cr3, v3; logic [2:0] mm, mm3; logic fl, fl3;
  int checks = 0, failures = 0;
  test_counters #(.W(32), .TRIPLE_GLOBAL(1'b0)) d1 (.clk, .rst, .latch, .c_lat(cl), .cref_lat(cr), .voted(v), .mismatch(mm), .fail(fl));
  test_counters #(.W(32), .TRIPLE_GLOBAL(1'b1)) d3 (.clk, .rst, .latch, .c_lat(cl3), .cref_lat(cr3), .voted(v3), .mismatch(mm3), .fail(fl3));
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic strobe(input logic [2:0] l);
    @(negedge clk); latch = l; @(negedge clk); latch = 0; @(negedge clk);
  endtask
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (37) @(posedge clk);
    strobe(3'b111);
    check(cr >= 32'd36 && cr <= 32'd39, $sformatf("reference counts clock cycles (%0d)", cr));
    check(cl[0] == cr && cl[1] == cr && cl[2] == cr && v == cr && mm == 0 && !fl, "clean latch");
    check(cl3[0] == cr3 && mm3 == 0 && !fl3, "clean latch, tripled variant");
    force d1.cnt[1] = 32'hDEAD_BEEF;
    strobe(3'b111);
    check(mm == 3'b010 && !fl && v == cr, "one bad counter: flagged, voted out, no failure");
    force d1.cnt[2] = 32'h0;
    strobe(3'b111);
    check(mm == 3'b110 && fl, "two bad counters: failure");
    release d1.cnt[1]; release d1.cnt[2];
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    repeat (5) @(posedge clk);
    strobe(3'b001);
    check(mm == 0 && !fl, "recovered after reset");
    check(mm3 == 3'b110 && fl3, "tripled LATCH: copies 1 and 2 not strobed keep old counts");
    strobe(3'b111);
    check(mm3 == 0, "tripled LATCH: all strobed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
