`timescale 1ns/1ps
// Testbench of the dual-port RAM: writes through both ports, reads back
// through the other port with one cycle latency, read-first behaviour and
// port A winning a same-address write collision.
module dp_ram_tb;
  logic clk = 0; always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [11:0] aa, ab; logic wa = 0, wb = 0; logic [7:0] da, db, qa, qb;
  logic [7:0] model [4096];
  dp_ram #(.WIDTH(8), .DEPTH(4096)) dut (.clk, .addr_a(aa), .we_a(wa), .din_a(da), .dout_a(qa),
    .addr_b(ab), .we_b(wb), .din_b(db), .dout_b(qb));
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 4096; i++) model[i] = 0;
    aa = 0; ab = 0; da = 0; db = 0;
    @(negedge clk);
    check(qa == 0, "starts at zero");
    for (int t = 0; t < 300; t++) begin
      aa = 12'($urandom); ab = 12'($urandom); da = 8'($urandom); db = 8'($urandom);
      wa = $urandom % 2; wb = $urandom % 2;
      if (t % 50 == 0) begin ab = aa; wa = 1; wb = 1; end
      @(posedge clk); #1;
      check(qa == model[aa], "read-first A"); check(qb == model[ab], "read-first B");
      if (wb && !(wa && aa == ab)) model[ab] = db;
      if (wa) model[aa] = da;
      @(negedge clk);
    end
    wa = 0; wb = 0;
    for (int i = 0; i < 4096; i += 7) begin
      aa = 12'(i); ab = 12'(4095 - i);
      @(posedge clk); #1;
      check(qa == model[i] && qb == model[4095 - i], "readback");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
