`timescale 1ns/1ps
// Testbench of one core: the controller working through the core's own
// memories (frame list visible on Data RAM port B, settings on scratchpad
// port B), a scan repairing an upset, a Program ROM word written on port B
// and read through the instruction fetch port, and the port A write
// activity outputs.
module c3_core_tb;
  import c3_pkg::*;
  localparam int FW = 101;
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1;
  logic cmd_valid = 0, cmd_ready; cmd_op_e cmd_op = CMD_NOP; logic [31:0] cmd_arg = 0; logic [15:0] cmd_idx = 0;
  logic csib, rdwrb, uv, halted, running, sd, rreq; logic [31:0] icap_i, icap_o; upset_t up;
  logic [11:0] fetch_addr = 0; logic [17:0] fetch_instr;
  logic [11:0] db_addr = 0; logic db_we = 0; logic [7:0] db_din = 0, db_dout;
  logic [11:0] pb_addr = 0; logic pb_we = 0; logic [17:0] pb_din = 0, pb_dout;
  logic [6:0] sb_addr = 0; logic sb_we = 0; logic [7:0] sb_din = 0, sb_dout;
  logic da_we, sa_we; logic [11:0] da_addr; logic [6:0] sa_addr;
  int checks = 0, failures = 0;
  c3_core dut (.clk, .rst, .cmd_valid, .cmd_op, .cmd_arg, .cmd_idx, .cmd_ready,
    .icap_csib(csib), .icap_rdwrb(rdwrb), .icap_i, .icap_o, .unixtime(32'd7),
    .upset_valid(uv), .upset(up), .halted, .running, .scan_done(sd), .reset_req(rreq),
    .fetch_addr, .fetch_instr,
    .dram_b_addr(db_addr), .dram_b_we(db_we), .dram_b_din(db_din), .dram_b_dout(db_dout),
    .prom_b_addr(pb_addr), .prom_b_we(pb_we), .prom_b_din(pb_din), .prom_b_dout(pb_dout),
    .spad_b_addr(sb_addr), .spad_b_we(sb_we), .spad_b_din(sb_din), .spad_b_dout(sb_dout),
    .dram_a_we(da_we), .dram_a_addr(da_addr), .spad_a_we(sa_we), .spad_a_addr(sa_addr));
  icap_cfg_model #(.FRAME_WORDS(FW), .NFRAMES(4)) u_cfg (.clk, .rst, .csib, .rdwrb, .i(icap_i), .o(icap_o));
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic cmd(input cmd_op_e op, input logic [31:0] arg, input logic [15:0] idx = 0);
    @(negedge clk); while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_arg = arg; cmd_idx = idx;
    @(negedge clk); cmd_valid = 0;
  endtask
  int da_writes = 0, uvs = 0, scans = 0;
  always @(posedge clk) begin
    if (da_we && !rst) da_writes++;
    if (uv && !rst) uvs++;
    if (sd && !rst) scans++;
  end
  initial begin
    repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] g [FW];
    #1;  // after the model has cleared its memory
    for (int w = 0; w < FW; w++) begin g[w] = $urandom; for (int c = 0; c < 3; c++) u_cfg.mem[c][w] = g[w]; end
    repeat (3) @(posedge clk); rst = 0;
    cmd(CMD_SET_LIST, 32'h0000_0000, 0);
    cmd(CMD_SET_LIST, 32'h0000_0001, 1);
    cmd(CMD_SET_LIST, 32'h0000_0002, 2);
    cmd(CMD_SET_LIST, 32'h0000_0003, 3);
    cmd(CMD_SET_NRED, 1);
    cmd(CMD_SET_NEMPTY, 1);
    @(negedge clk); db_addr = 12'(LIST_BASE + 4 * 3); @(negedge clk);
    check(db_dout == 8'h03, "frame list entry visible on Data RAM port B");
    sb_addr = 7'(SP_NEMPTY); @(negedge clk);
    check(sb_dout == 8'd1, "setting stored in the scratchpad");
    check(da_writes == 16, $sformatf("16 Data RAM writes for 4 list entries (%0d)", da_writes));
    u_cfg.mem[2][77] ^= 32'h0000_0400;
    cmd(CMD_VOTE, 0);
    while (scans < 1) @(posedge clk);
    check(u_cfg.mem[2][77] == g[77] && uvs == 1, "upset repaired and reported through the core");
    // Program ROM: write on port B, read on the fetch port
    @(negedge clk); pb_addr = 12'h123; pb_din = 18'h2_ABCD; pb_we = 1; @(negedge clk); pb_we = 0;
    pb_addr = 12'h000; fetch_addr = 12'h123; @(negedge clk);
    check(fetch_instr == 18'h2_ABCD, "Program ROM word on the fetch port");
    // a frame copy is in Data RAM area 2: word 77 byte 1 holds bits 15:8
    db_addr = 12'(2 * FW * 4 + 77 * 4 + 1); @(negedge clk);
    check(db_dout == (g[77][15:8] ^ 8'h04), "read copy 2 (with the upset) buffered in Data RAM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
