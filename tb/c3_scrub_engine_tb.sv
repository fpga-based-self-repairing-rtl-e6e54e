`timescale 1ns/1ps
// Self-checking testbench of the scrubbing controller of one core.
// A configuration model holds two redundant triplets (frames 0-2, 3-5) and
// two empty frames (6, 7). The test loads the frame list, injects upsets,
// runs scans and checks repaired frames, upset reports, rewrites of only
// the damaged frames, the O (toggle) command, settings surviving a core
// reset through the scratchpad, the periodic reset request and the halt on
// a frame with more than 127 wrong bits.
module c3_scrub_engine_tb;
  import c3_pkg::*;
  localparam int FW = 101;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        cmd_valid = 0, cmd_ready;
  cmd_op_e     cmd_op = CMD_NOP;
  logic [31:0] cmd_arg = 0;
  logic [15:0] cmd_idx = 0;
  logic        csib, rdwrb;
  logic [31:0] icap_i, icap_o;
  logic [11:0] dram_addr; logic dram_we; logic [7:0] dram_din, dram_dout;
  logic [6:0]  spad_addr; logic spad_we; logic [7:0] spad_din, spad_dout;
  logic        upset_valid, halted, running, scan_done, reset_req;
  upset_t      upset;
  logic [7:0]  unused_b8a, unused_b8b;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  c3_scrub_engine dut (
    .clk, .rst, .cmd_valid, .cmd_op, .cmd_arg, .cmd_idx, .cmd_ready,
    .icap_csib(csib), .icap_rdwrb(rdwrb), .icap_i, .icap_o,
    .dram_addr, .dram_we, .dram_din, .dram_dout,
    .spad_addr, .spad_we, .spad_din, .spad_dout,
    .unixtime(32'h1234_5678), .upset_valid, .upset, .halted, .running, .scan_done, .reset_req
  );
  dp_ram #(.WIDTH(8), .DEPTH(4096)) u_dram (.clk, .addr_a(dram_addr), .we_a(dram_we), .din_a(dram_din),
    .dout_a(dram_dout), .addr_b(12'd0), .we_b(1'b0), .din_b(8'd0), .dout_b(unused_b8a));
  dp_ram #(.WIDTH(8), .DEPTH(128)) u_spad (.clk, .addr_a(spad_addr), .we_a(spad_we), .din_a(spad_din),
    .dout_a(spad_dout), .addr_b(7'd0), .we_b(1'b0), .din_b(8'd0), .dout_b(unused_b8b));
  icap_cfg_model #(.FRAME_WORDS(FW), .NFRAMES(8)) u_cfg (.clk, .rst, .csib, .rdwrb, .i(icap_i), .o(icap_o));

  // upset log
  upset_t log_q [$];
  always @(posedge clk) if (upset_valid && !rst) log_q.push_back(upset);
  int scans = 0;
  always @(posedge clk) if (scan_done && !rst) scans++;

  task automatic cmd(input cmd_op_e op, input logic [31:0] arg, input logic [15:0] idx = 0);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_arg = arg; cmd_idx = idx;
    @(negedge clk);
    cmd_valid = 0; cmd_op = CMD_NOP;
  endtask

  task automatic wait_scans(input int n);
    int target;
    target = scans + n;
    while (scans < target) @(posedge clk);
  endtask

  logic [31:0] gold [2][FW];
  bit ok;

  initial begin
    // watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;  // after the model has cleared its memory
    for (int g = 0; g < 2; g++)
      for (int w = 0; w < FW; w++) begin
        gold[g][w] = $urandom;
        for (int c = 0; c < 3; c++) u_cfg.mem[3*g+c][w] = gold[g][w];
      end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    check(cmd_ready && !running, "idle and stopped after reset with blank scratchpad");

    for (int f = 0; f < 8; f++) cmd(CMD_SET_LIST, 32'(f), 16'(f));
    cmd(CMD_SET_NRED, 2);
    cmd(CMD_SET_NEMPTY, 2);
    cmd(CMD_SET_RSTSCANS, 0);

    // clean scan: nothing reported, nothing written
    cmd(CMD_VOTE, 0);
    wait_scans(1);
    check(log_q.size() == 0, "clean scan reports nothing");
    ok = 1;
    for (int f = 0; f < 8; f++) if (u_cfg.writes[f] != 0) ok = 0;
    check(ok, "clean scan writes no frame");

    // three upsets
    u_cfg.mem[1][5] ^= 32'h0000_0008;
    u_cfg.mem[5][100] ^= 32'h8000_0000;
    u_cfg.mem[7][0] |= 32'h0000_0001;
    wait_scans(2);
    check(u_cfg.mem[1][5] == gold[0][5], "frame 1 repaired");
    check(u_cfg.mem[5][100] == gold[1][100], "frame 5 repaired");
    check(u_cfg.mem[7][0] == 0, "empty frame 7 cleared");
    check(u_cfg.writes[1] == 1 && u_cfg.writes[5] == 1 && u_cfg.writes[7] == 1, "damaged frames written once");
    check(u_cfg.writes[0] == 0 && u_cfg.writes[2] == 0 && u_cfg.writes[3] == 0 && u_cfg.writes[4] == 0 && u_cfg.writes[6] == 0,
          "intact frames not written");
    check(log_q.size() == 3, $sformatf("three upsets reported (%0d)", log_q.size()));
    if (log_q.size() == 3) begin
      check(log_q[0].frame_addr == 1 && log_q[0].word == 5 && log_q[0].bitpos == 3 &&
            log_q[0].polarity == !gold[0][5][3] && log_q[0].time_s == 32'h1234_5678, "upset 1 fields");
      check(log_q[1].frame_addr == 5 && log_q[1].word == 100 && log_q[1].bitpos == 31 &&
            log_q[1].polarity == !gold[1][100][31], "upset 2 fields");
      check(log_q[2].frame_addr == 7 && log_q[2].word == 0 && log_q[2].bitpos == 0 && log_q[2].polarity == 1,
            "upset 3 fields (empty frame, 0->1)");
    end
    log_q.delete();

    // O command: flip word 10 bit 7 of frame 3 while paused
    cmd(CMD_PAUSE, 0);
    cmd(CMD_TOGGLE, 32'd3, {4'd0, 7'd10, 5'd7});
    repeat (5) @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    check(u_cfg.mem[3][10] == (gold[1][10] ^ 32'h80), "toggle flipped exactly one bit");
    ok = 1;
    for (int w = 0; w < FW; w++) if (w != 10 && u_cfg.mem[3][w] != gold[1][w]) ok = 0;
    check(ok, "toggle left the other words alone");
    check(log_q.size() == 0, "toggle reports nothing");
    cmd(CMD_CONTINUE, 0);
    wait_scans(2);
    check(u_cfg.mem[3][10] == gold[1][10], "toggled bit repaired by voting");
    check(log_q.size() == 1 && log_q[0].frame_addr == 3 && log_q[0].word == 10 && log_q[0].bitpos == 7,
          "toggled bit reported");
    log_q.delete();

    // step-by-step toggle: F, R, T, W (frame 4, word 33, bit 30)
    cmd(CMD_PAUSE, 0);
    cmd(CMD_SET_FAR, 32'd4);
    cmd(CMD_READ, 0);
    @(negedge clk); while (!cmd_ready) @(negedge clk);
    check(u_dram.mem[33 * 4 + 3] == gold[1][33][31:24], "R: selected frame buffered in area 0");
    check(u_cfg.mem[4][33] == gold[1][33], "R: configuration unchanged");
    cmd(CMD_FLIP, 0, {4'd0, 7'd33, 5'd30});
    @(negedge clk); while (!cmd_ready) @(negedge clk);
    check(u_dram.mem[33 * 4 + 3] == (gold[1][33][31:24] ^ 8'h40), "T: bit flipped in the buffer");
    check(u_cfg.mem[4][33] == gold[1][33], "T: configuration not yet written");
    cmd(CMD_WRITE, 0);
    @(negedge clk); while (!cmd_ready) @(negedge clk);
    check(u_cfg.mem[4][33] == (gold[1][33] ^ 32'h4000_0000), "W: flipped frame written");
    cmd(CMD_CONTINUE, 0);
    wait_scans(2);
    check(u_cfg.mem[4][33] == gold[1][33] && log_q.size() == 1 && log_q[0].bitpos == 30,
          "F/R/T/W upset found and repaired");
    log_q.delete();

    // periodic reset request after 2 scans; settings survive in the scratchpad
    cmd(CMD_SET_RSTSCANS, 2);
    begin
      int t0;
      t0 = scans;
      while (!reset_req) @(posedge clk);
      @(posedge clk);
      check(scans - t0 == 2, $sformatf("reset requested after 2 scans (%0d)", scans - t0));
    end
    repeat (3) @(posedge clk);
    check(reset_req, "reset request held until reset");
    rst = 1; repeat (2) @(posedge clk); rst = 0;
    repeat (12) @(posedge clk);
    check(dut.nred == 2 && dut.nempty == 2 && dut.rstscans == 2 && running, "settings reloaded after reset");
    u_cfg.mem[2][50] ^= 32'h0001_0000;
    wait_scans(1);
    check(u_cfg.mem[2][50] == gold[0][50], "scanning resumed after reset");
    cmd(CMD_SET_RSTSCANS, 0);
    log_q.delete();

    // halt: 200 wrong bits in one frame
    for (int w = 0; w < 50; w++) u_cfg.mem[4][w] ^= 32'h0F00_0000;
    begin
      int n;
      n = 0;
      while (!halted && n < 100000) begin @(posedge clk); n++; end
    end
    check(halted && !running, "halted on more than 127 errors in a frame");
    check(log_q.size() == 200, $sformatf("200 upsets reported before halting (%0d)", log_q.size()));
    begin
      int wr;
      wr = u_cfg.writes[4];
      repeat (2000) @(posedge clk);
      check(u_cfg.writes[4] == wr && halted && !cmd_ready, "no rewrite and no commands while halted");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
