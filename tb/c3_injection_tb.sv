`timescale 1ns/1ps
// Fault-injection campaign on the whole design at its default parameters,
// done the way a campaign is run from the host: for every injected bit one
// toggle command (flip a single configuration bit through the scrubber's
// own ICAP path) followed by one vote command (restart a scan from the top
// of the list). The list holds one redundant triplet (frames 0..2) and one
// empty frame (3). Each injection picks a random frame of the list, word
// and bit. After the scan the testbench checks that exactly one upset was
// reported, with the right frame, word, bit and polarity, that the bit is
// back to its original value, and that no other frame changed.
// NINJ injections are made (a real campaign on the device uses thousands;
// each one here costs about 9,000 system-clock cycles).
module c3_injection_tb;
  import c3_pkg::*;
  localparam int FW   = 101;
  localparam int NM   = 64;
  localparam int NINJ = 300;

  logic rst_n = 1;
  logic dco_clk, sys_clk; logic [NM-1:0] dco_sel;
  logic cmd_valid = 0, cmd_ready; cmd_op_e cmd_op = CMD_NOP; logic [31:0] cmd_arg = 0; logic [15:0] cmd_idx = 0;
  logic upset_valid, halted, running, scan_done; upset_t upset;
  logic time_load = 0; logic [31:0] time_value = 0, unixtime;
  logic icap_csib, icap_rdwrb; logic [31:0] icap_i, icap_o;
  logic tdo;
  logic [11:0] fetch_addr [3]; logic [17:0] fetch_instr [3];
  logic core_rst, idis, iodis; logic [31:0] core_resets, dram_fixes, prom_fixes, spad_fixes;
  logic cal_dco_clk = 0, ext_clk = 0;
  logic [NM-1:0] cal_sel; logic [31:0] cal_dcnt, cal_ecnt;
  logic [31:0] tc_c [3], tc_cref, tc_v; logic [2:0] tc_mm; logic tc_fail;

  always #2.5 ext_clk = ~ext_clk;

  dco_ring #(.NMAX(NM)) u_ring (.enable(1'b1), .sel(dco_sel), .clk_out(dco_clk));
  icap_cfg_model #(.FRAME_WORDS(FW), .NFRAMES(4)) u_cfg (.clk(sys_clk), .rst(dut.sys_rst), .csib(icap_csib),
    .rdwrb(icap_rdwrb), .i(icap_i), .o(icap_o));

  c3_top dut (
    .rst_n, .dco_clk, .dco_sel, .sys_clk,
    .cmd_valid, .cmd_op, .cmd_arg, .cmd_idx, .cmd_ready,
    .upset_valid, .upset, .halted, .running, .scan_done,
    .time_load, .time_value, .unixtime,
    .icap_csib, .icap_rdwrb, .icap_i, .icap_o,
    .jtag_drck(1'b0), .jtag_update(1'b0), .jtag_capture(1'b0), .jtag_sel(1'b0),
    .jtag_shift(1'b0), .jtag_tdi(1'b0), .jtag_tdo(tdo),
    .fetch_addr, .fetch_instr,
    .core_rst, .core_resets, .dram_fixes, .prom_fixes, .spad_fixes,
    .icap_disagree(idis), .io_disagree(iodis),
    .cal_dco_clk, .cal_ext_clk(ext_clk), .cal_dco_rst(1'b1), .cal_ext_rst(1'b1), .cal_k(7'd40),
    .cal_k_dither(4'd0), .cal_dco_sel(cal_sel), .cal_dco_count(cal_dcnt), .cal_ext_count(cal_ecnt),
    .tc_clk(ext_clk), .tc_rst(1'b1), .tc_latch(3'b000), .tc_c_lat(tc_c), .tc_cref_lat(tc_cref),
    .tc_voted(tc_v), .tc_mismatch(tc_mm), .tc_fail
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  upset_t log_q [$];
  int scans = 0;
  always @(posedge sys_clk) begin
    if (upset_valid && !core_rst) log_q.push_back(upset);
    if (scan_done && !core_rst) scans++;
  end

  task automatic cmd(input cmd_op_e op, input logic [31:0] arg, input logic [15:0] idx = 0);
    @(negedge sys_clk); while (!cmd_ready) @(negedge sys_clk);
    cmd_valid = 1; cmd_op = op; cmd_arg = arg; cmd_idx = idx;
    @(negedge sys_clk); cmd_valid = 0; cmd_op = CMD_NOP;
  endtask
  task automatic wait_scans(input int n);
    int t; t = scans + n;
    while (scans < t) @(posedge sys_clk);
  endtask

  initial begin
    #80ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] gold [FW];
  initial begin
    int found, repaired, clean_others;
    for (int i = 0; i < 3; i++) fetch_addr[i] = 0;
    #1;  // after the model has cleared its memory
    rst_n = 0;
    for (int w = 0; w < FW; w++) begin
      gold[w] = $urandom;
      for (int c = 0; c < 3; c++) u_cfg.mem[c][w] = gold[w];
    end
    #50 rst_n = 1;
    while (core_rst !== 1'b0) @(posedge sys_clk);
    for (int f = 0; f < 4; f++) cmd(CMD_SET_LIST, 32'(f), 16'(f));
    cmd(CMD_SET_NRED, 1);
    cmd(CMD_SET_NEMPTY, 1);
    cmd(CMD_VOTE, 0);
    wait_scans(1);
    check(log_q.size() == 0, "clean scan before the campaign");

    found = 0; repaired = 0; clean_others = 0;
    for (int k = 0; k < NINJ; k++) begin
      int f, w, b; bit pol; bit ok;
      f = $urandom_range(3); w = $urandom_range(FW - 1); b = $urandom_range(31);
      pol = !u_cfg.mem[f][w][b];
      cmd(CMD_PAUSE, 0);
      log_q.delete();
      cmd(CMD_TOGGLE, 32'(f), {4'd0, 7'(w), 5'(b)});
      @(negedge sys_clk); while (!cmd_ready) @(negedge sys_clk);
      check(u_cfg.mem[f][w][b] == pol, $sformatf("injection %0d: bit flipped", k));
      cmd(CMD_VOTE, 0);
      wait_scans(1);
      if (log_q.size() == 1 && log_q[0].frame_addr == 32'(f) && log_q[0].word == 7'(w)
          && log_q[0].bitpos == 5'(b) && log_q[0].polarity == pol)
        found++;
      else
        $display("FAIL: injection %0d (frame %0d word %0d bit %0d): %0d reports", k, f, w, b, log_q.size());
      if (u_cfg.mem[f][w][b] == !pol) repaired++;
      ok = 1;
      for (int ff = 0; ff < 4; ff++)
        for (int ww = 0; ww < FW; ww++)
          if (u_cfg.mem[ff][ww] != ((ff < 3) ? gold[ww] : 32'd0)) ok = 0;
      if (ok) clean_others++;
    end
    check(found == NINJ, $sformatf("every injected bit reported exactly (%0d of %0d)", found, NINJ));
    check(repaired == NINJ, $sformatf("every injected bit repaired (%0d of %0d)", repaired, NINJ));
    check(clean_others == NINJ, $sformatf("configuration back to golden after each scan (%0d of %0d)",
                                          clean_others, NINJ));
    check(!halted, "no halt during the campaign");
    $display("campaign: %0d injections, %0d reported, %0d repaired", NINJ, found, repaired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
