`timescale 1ns/1ps
// Testbench of the memory scrubber on three 256 x 8 copies: corrupts words
// in single copies, checks that a sweep (2 cycles per word) repairs them,
// counts the fixes, never touches a word held differently in all three
// copies by only one error each, and checks that a port-A write during the
// check is not overwritten.
module mem_scrubber_tb;
  localparam int D = 256;
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1;
  int checks = 0, failures = 0;
  logic [7:0] addr_b; logic [2:0] we_b; logic [7:0] din_b; logic [7:0] dout_b [3];
  logic [2:0] we_a = 0; logic [7:0] addr_a [3]; logic [7:0] din_a [3]; logic [7:0] dout_a [3];
  logic sweep_done; logic [31:0] fixes;
  logic [7:0] gold [D];

  for (genvar i = 0; i < 3; i++) begin : g_m
    dp_ram #(.WIDTH(8), .DEPTH(D)) m (.clk, .addr_a(addr_a[i]), .we_a(we_a[i]), .din_a(din_a[i]), .dout_a(dout_a[i]),
      .addr_b(addr_b), .we_b(we_b[i]), .din_b(din_b), .dout_b(dout_b[i]));
  end
  mem_scrubber #(.WIDTH(8), .DEPTH(D)) dut (.clk, .rst, .enable(1'b1), .addr_b, .we_b, .din_b, .dout_b,
    .we_a, .addr_a, .sweep_done, .fixes);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  int sweeps = 0; always @(posedge clk) if (sweep_done && !rst) sweeps++;
  task automatic wait_sweep();
    int t; t = sweeps; while (sweeps == t) @(posedge clk);
  endtask
  initial begin
    repeat (50000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 3; i++) begin addr_a[i] = 0; din_a[i] = 0; end
    for (int a = 0; a < D; a++) begin
      gold[a] = 8'($urandom);
      g_m[0].m.mem[a] = gold[a]; g_m[1].m.mem[a] = gold[a]; g_m[2].m.mem[a] = gold[a];
    end
    repeat (2) @(posedge clk); rst = 0;
    begin
      int t0, t1;
      wait_sweep(); t0 = $time;
      wait_sweep(); t1 = $time;
      check((t1 - t0) == 2 * D * 10, $sformatf("sweep takes 2 cycles per word (%0d ns)", t1 - t0));
    end
    check(fixes == 0, "no fixes on clean memory");
    g_m[0].m.mem[3]   = gold[3] ^ 8'h01;
    g_m[1].m.mem[100] = gold[100] ^ 8'hF0;
    g_m[2].m.mem[255] = gold[255] ^ 8'h80;
    wait_sweep(); wait_sweep();
    check(g_m[0].m.mem[3] == gold[3] && g_m[1].m.mem[100] == gold[100] && g_m[2].m.mem[255] == gold[255],
          "single-copy errors repaired");
    check(fixes == 3, $sformatf("three fixes counted (%0d)", fixes));
    // copies 0 and 1 wrong in different bits of the same word: bitwise vote repairs both
    g_m[0].m.mem[20] = gold[20] ^ 8'h01;
    g_m[1].m.mem[20] = gold[20] ^ 8'h02;
    wait_sweep(); wait_sweep();
    check(g_m[0].m.mem[20] == gold[20] && g_m[1].m.mem[20] == gold[20], "bitwise repair of two copies");
    // all three cores write a word while the scrubber checks it: new value kept
    g_m[2].m.mem[50] = gold[50] ^ 8'h04;
    while (dut.ptr != 8'd50 || dut.phase_chk != 1'b1) @(negedge clk);
    for (int i = 0; i < 3; i++) begin addr_a[i] = 50; din_a[i] = 8'h5A; end
    we_a = 3'b111;
    @(negedge clk); we_a = 0;
    repeat (3) @(posedge clk);
    check(g_m[0].m.mem[50] == 8'h5A && g_m[1].m.mem[50] == 8'h5A && g_m[2].m.mem[50] == 8'h5A,
          "core write during check survives");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
