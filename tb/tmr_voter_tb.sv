`timescale 1ns/1ps
// Testbench of the majority voter: exhaustive over 3-bit copies at width 1,
// then random words at width 32 with zero, one or two corrupted copies.
module tmr_voter_tb;
  int checks = 0, failures = 0;
  logic a1, b1, c1, y1; logic [2:0] m1;
  logic [31:0] a, b, c, y; logic [2:0] m;
  tmr_voter #(.WIDTH(1))  u1 (.a(a1), .b(b1), .c(c1), .y(y1), .mism(m1));
  tmr_voter #(.WIDTH(32)) u32 (.a, .b, .c, .y, .mism(m));

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a1, b1, c1} = 3'(v); #1;
      checks++;
      if (y1 != ($countones(3'(v)) >= 2)) begin failures++; $display("FAIL: vote of %b", 3'(v)); end
      checks++;
      if (m1 != {c1 != y1, b1 != y1, a1 != y1}) begin failures++; $display("FAIL: mism of %b", 3'(v)); end
    end
    for (int t = 0; t < 200; t++) begin
      logic [31:0] g, e;
      int which;
      g = $urandom; e = $urandom | 32'h1; which = t % 4;
      a = g; b = g; c = g;
      if (which == 0) a = g ^ e;
      if (which == 1) b = g ^ e;
      if (which == 2) c = g ^ e;
      #1;
      checks++;
      if (y !== g) begin failures++; $display("FAIL: word vote"); end
      checks++;
      if (m != (which == 3 ? 3'b000 : 3'(1 << which))) begin failures++; $display("FAIL: word mism %b", m); end
    end
    // two copies hit in different bits: still corrected bit by bit
    a = 32'hFFFF_0000; b = 32'h0000_0000 ^ 32'h1; c = 32'h0;
    #1; checks++;
    if (y != 32'h0) begin failures++; $display("FAIL: distinct-bit double error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
