`timescale 1ns/1ps
// Testbench of the JTAG loader: shifts 33-bit words in at a 12 MHz DRCK,
// pulses UPDATE, and checks the processor reset bit, writes into all three
// Program ROMs, voted read-back shifted out on TDO, and the port B
// multiplexer handing the ROMs back to the scrubber when the reset bit clears.
module jtag_loader_tb;
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1;
  logic drck = 0, update = 0, capture = 0, sel = 0, shift = 0, tdi = 0, tdo, pb_rst;
  logic [11:0] scrub_addr = 12'h0AB; logic [2:0] scrub_we = 3'b000; logic [17:0] scrub_din = 18'h2_5555;
  logic [11:0] rom_addr; logic [2:0] rom_we; logic [17:0] rom_din; logic [17:0] rom_dout [3];
  logic [17:0] qa [3];
  int checks = 0, failures = 0;

  jtag_loader dut (.clk, .rst, .drck, .update, .capture, .sel, .shift, .tdi, .tdo, .pb_rst,
    .scrub_addr, .scrub_we, .scrub_din, .rom_addr, .rom_we, .rom_din, .rom_dout);
  for (genvar i = 0; i < 3; i++) begin : g_rom
    dp_ram #(.WIDTH(18), .DEPTH(4096)) m (.clk, .addr_a(12'd0), .we_a(1'b0), .din_a(18'd0), .dout_a(qa[i]),
      .addr_b(rom_addr), .we_b(rom_we[i]), .din_b(rom_din), .dout_b(rom_dout[i]));
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // one DR scan: capture, 33 shifts, update; returns the first 18 bits seen on TDO
  task automatic scan(input logic [32:0] w, output logic [17:0] rd);
    sel = 1; capture = 1;
    #40 drck = 1; #40 drck = 0; capture = 0; shift = 1;
    for (int b = 0; b < 33; b++) begin
      tdi = w[b];
      if (b < 18) rd[b] = tdo;
      #40 drck = 1; #40 drck = 0;
    end
    shift = 0;
    #40 update = 1; #400 update = 0; #400;
  endtask
  function automatic logic [32:0] word(bit r, bit en, bit we, logic [11:0] a, logic [17:0] d);
    return {r, en, we, a, d};
  endfunction

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [17:0] rd, gold [16];
    logic [11:0] adr [16];
    repeat (4) @(posedge clk); rst = 0;
    scan(word(1, 0, 0, 0, 0), rd);
    check(pb_rst, "reset bit holds the processor in reset");
    for (int k = 0; k < 16; k++) begin
      adr[k] = 12'(k * 255 + 3); gold[k] = 18'($urandom);
      scan(word(1, 1, 1, adr[k], gold[k]), rd);
    end
    begin
      bit ok; ok = 1;
      for (int k = 0; k < 16; k++)
        for (int i = 0; i < 3; i++) if (i == 0 ? g_rom[0].m.mem[adr[k]] != gold[k] :
                                         i == 1 ? g_rom[1].m.mem[adr[k]] != gold[k] :
                                                  g_rom[2].m.mem[adr[k]] != gold[k]) ok = 0;
      check(ok, "16 words written into all three ROMs");
    end
    // read back, with copy 1 corrupted: voted value comes out
    g_rom[1].m.mem[adr[5]] = ~gold[5];
    scan(word(1, 1, 0, adr[5], 0), rd);
    scan(word(1, 0, 0, 0, 0), rd);
    check(rd == gold[5], $sformatf("voted read-back on TDO (%h vs %h)", rd, gold[5]));
    scan(word(1, 1, 0, adr[9], 0), rd);
    scan(word(1, 0, 0, 0, 0), rd);
    check(rd == gold[9], "second read-back");
    // port B belongs to the loader while in reset
    scrub_we = 3'b111;
    @(posedge clk); #1;
    check(rom_we == 3'b000 && rom_addr != scrub_addr, "scrubber masked while loading");
    scan(word(0, 0, 0, 0, 0), rd);
    check(!pb_rst, "reset bit released");
    #1 check(rom_we == 3'b111 && rom_addr == scrub_addr && rom_din == scrub_din, "scrubber owns port B after loading");
    scrub_we = 3'b000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
