`timescale 1ns/1ps
// Testbench of the core reset controller: external reset, loader reset,
// a single core's request (ignored), a majority request (reset), minimum
// hold time, waiting for the scratchpad sweep, and one corrupted copy of
// the hold logic being outvoted.
module c3_reset_ctrl_tb;
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1, loader_rst = 0, sweep = 0; logic [2:0] req = 0;
  logic core_rst, dis; logic [31:0] resets;
  int checks = 0, failures = 0;
  c3_reset_ctrl #(.MIN_CYCLES(16)) dut (.clk, .rst, .loader_rst, .req, .spad_sweep_done(sweep),
    .core_rst, .resets, .hold_disagree(dis));
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  // scratchpad sweep every 40 cycles
  // (every cycle while fast_sweep is set)
  int cyc = 0; bit fast_sweep = 0;
  always @(posedge clk) begin cyc++; sweep <= fast_sweep || (cyc % 40 == 0); end
  task automatic hold_len(output int n);
    n = 0; while (core_rst) begin @(posedge clk); n++; end
  endtask
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    repeat (3) @(posedge clk); #1 rst = 0;
    check(core_rst, "reset held after external reset");
    hold_len(n);
    check(n >= 16 && n <= 16 + 40 + 2, $sformatf("hold within min time + one sweep (%0d)", n));
    repeat (5) @(posedge clk);
    check(!core_rst && resets == 0, "released");
    #1 req = 3'b010; repeat (5) @(posedge clk);
    check(!core_rst, "single request ignored");
    #1 req = 3'b110; @(posedge clk); #1 req = 3'b000;
    check(core_rst, "majority request resets the cores");
    hold_len(n);
    check(n >= 16, $sformatf("minimum hold (%0d)", n));
    check(resets == 1, "periodic reset counted");
    // the hold ends only after a sweep seen during the reset
    #1 req = 3'b111; @(posedge clk); #1 req = 0;
    begin
      int since; since = 0;
      while (core_rst) begin
        @(posedge clk); since++;
      end
      check(since >= 16, "hold not shorter than minimum");
    end
    #1 loader_rst = 1; repeat (100) @(posedge clk);
    check(core_rst, "loader reset holds the cores");
    #1 loader_rst = 0;
    hold_len(n);
    check(!core_rst, "released after loader reset");
    // a sweep right away does not shorten the minimum hold
    fast_sweep = 1;
    repeat (3) @(posedge clk);
    #1 req = 3'b101; @(posedge clk); #1 req = 0;
    hold_len(n);
    check(n >= 16 && n <= 18, $sformatf("minimum hold with an early sweep (%0d)", n));
    fast_sweep = 0;
    // one corrupted hold copy is outvoted
    repeat (5) @(posedge clk);
    force dut.hold[1] = 1'b1;
    repeat (5) @(posedge clk);
    check(!core_rst && dis, "one stuck copy outvoted and flagged");
    release dut.hold[1];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
