`timescale 1ns/1ps
// End-to-end testbench of the whole design at its default parameters.
// The ring-oscillator model closes the DCO loop (200 MHz, divided to a
// 100 MHz system clock), a configuration model stands behind the ICAP port,
// and the boundary-scan signals are driven directly. The test uploads a
// program over JTAG, sets up two redundant frame triplets and two empty
// frames, and then makes every mechanism happen at least once, counting
// each: JTAG upload with the cores held in reset, repair of a redundant
// frame, clearing of an empty frame, Data RAM / Program ROM / scratchpad
// repair, the periodic voted reset with settings kept, masking of a core
// with a corrupted ICAP output, the O toggle command, the halt on a broken
// frame, and the two side circuits (DCO calibration, counter test circuit).
module c3_top_tb;
  import c3_pkg::*;
  localparam int FW = 101;
  localparam int NM = 64;

  logic rst_n = 1;  // pulled low after time 0 so that the asynchronous resets see an edge
  logic dco_clk, sys_clk; logic [NM-1:0] dco_sel;
  logic cmd_valid = 0, cmd_ready; cmd_op_e cmd_op = CMD_NOP; logic [31:0] cmd_arg = 0; logic [15:0] cmd_idx = 0;
  logic upset_valid, halted, running, scan_done; upset_t upset;
  logic time_load = 0; logic [31:0] time_value = 0, unixtime;
  logic icap_csib, icap_rdwrb; logic [31:0] icap_i, icap_o;
  logic drck = 0, update = 0, capture = 0, jsel = 0, jshift = 0, tdi = 0, tdo;
  logic [11:0] fetch_addr [3]; logic [17:0] fetch_instr [3];
  logic core_rst, idis, iodis; logic [31:0] core_resets, dram_fixes, prom_fixes, spad_fixes;
  logic cal_dco_clk, ext_clk = 0, cal_dco_rst = 1, cal_ext_rst = 1; logic [6:0] cal_k = 40; logic [3:0] cal_kd = 0;
  logic [NM-1:0] cal_sel; logic [31:0] cal_dcnt, cal_ecnt;
  logic [2:0] tc_latch = 0; logic tc_rst = 1; logic [31:0] tc_c [3], tc_cref, tc_v; logic [2:0] tc_mm; logic tc_fail;

  always #2.5 ext_clk = ~ext_clk;

  dco_ring #(.NMAX(NM)) u_ring (.enable(1'b1), .sel(dco_sel), .clk_out(dco_clk));
  dco_ring #(.NMAX(NM)) u_cal_ring (.enable(1'b1), .sel(cal_sel), .clk_out(cal_dco_clk));
  icap_cfg_model #(.FRAME_WORDS(FW), .NFRAMES(8)) u_cfg (.clk(sys_clk), .rst(dut.sys_rst), .csib(icap_csib), .rdwrb(icap_rdwrb),
    .i(icap_i), .o(icap_o));

  c3_top dut (
    .rst_n, .dco_clk, .dco_sel, .sys_clk,
    .cmd_valid, .cmd_op, .cmd_arg, .cmd_idx, .cmd_ready,
    .upset_valid, .upset, .halted, .running, .scan_done,
    .time_load, .time_value, .unixtime,
    .icap_csib, .icap_rdwrb, .icap_i, .icap_o,
    .jtag_drck(drck), .jtag_update(update), .jtag_capture(capture), .jtag_sel(jsel),
    .jtag_shift(jshift), .jtag_tdi(tdi), .jtag_tdo(tdo),
    .fetch_addr, .fetch_instr,
    .core_rst, .core_resets, .dram_fixes, .prom_fixes, .spad_fixes,
    .icap_disagree(idis), .io_disagree(iodis),
    .cal_dco_clk, .cal_ext_clk(ext_clk), .cal_dco_rst, .cal_ext_rst, .cal_k, .cal_k_dither(cal_kd),
    .cal_dco_sel(cal_sel), .cal_dco_count(cal_dcnt), .cal_ext_count(cal_ecnt),
    .tc_clk(ext_clk), .tc_rst, .tc_latch, .tc_c_lat(tc_c), .tc_cref_lat(tc_cref), .tc_voted(tc_v),
    .tc_mismatch(tc_mm), .tc_fail
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // mechanism counters
  typedef enum int {M_JTAG_UPLOAD, M_FRAME_REPAIR, M_EMPTY_CLEAR, M_DRAM_FIX, M_PROM_FIX, M_SPAD_FIX,
                    M_PERIODIC_RESET, M_ICAP_MASK, M_TOGGLE, M_HALT, M_DCO_CAL, M_TEST_CIRCUIT, M_NUM} mech_e;
  int mech [M_NUM];
  string mname [M_NUM] = '{"jtag_upload", "frame_repair", "empty_clear", "dram_fix", "prom_fix", "spad_fix",
                           "periodic_reset", "icap_mask", "toggle", "halt", "dco_calibration", "test_circuit"};

  upset_t log_q [$];
  int scans = 0;
  always @(posedge sys_clk) begin
    if (upset_valid && !core_rst) log_q.push_back(upset);
    if (scan_done && !core_rst) scans++;
  end
  int resets_seen = 0;
  always @(posedge sys_clk) if (core_rst && dut.pb_rst) resets_seen++;

  task automatic cmd(input cmd_op_e op, input logic [31:0] arg, input logic [15:0] idx = 0);
    @(negedge sys_clk); while (!cmd_ready) @(negedge sys_clk);
    cmd_valid = 1; cmd_op = op; cmd_arg = arg; cmd_idx = idx;
    @(negedge sys_clk); cmd_valid = 0; cmd_op = CMD_NOP;
  endtask
  task automatic wait_scans(input int n);
    int t; t = scans + n;
    while (scans < t) @(posedge sys_clk);
  endtask
  task automatic scan(input logic [32:0] w, output logic [17:0] rd);
    jsel = 1; capture = 1;
    #40 drck = 1; #40 drck = 0; capture = 0; jshift = 1;
    for (int b = 0; b < 33; b++) begin
      tdi = w[b];
      if (b < 18) rd[b] = tdo;
      #40 drck = 1; #40 drck = 0;
    end
    jshift = 0;
    #40 update = 1; #400 update = 0; #400;
  endtask

  logic [31:0] gold [2][FW];

  initial begin
    #10ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [17:0] rd;
    logic [17:0] prog [8];
    realtime t0, t1;
    for (int i = 0; i < 3; i++) fetch_addr[i] = 0;
    #1;  // after the model has cleared its memory
    rst_n = 0;
    for (int g = 0; g < 2; g++)
      for (int w = 0; w < FW; w++) begin
        gold[g][w] = $urandom;
        for (int c = 0; c < 3; c++) u_cfg.mem[3*g+c][w] = gold[g][w];
      end
    #50 rst_n = 1;
    // system clock: DCO at 200 MHz divided by two
    repeat (5) @(posedge sys_clk);
    t0 = $realtime; repeat (100) @(posedge sys_clk); t1 = $realtime;
    check((t1 - t0) > 999.0 && (t1 - t0) < 1001.0, $sformatf("100 MHz system clock (%f ns per 100)", t1 - t0));
    while (core_rst) @(posedge sys_clk);

    // ---- JTAG upload of a small program into the three Program ROMs ----
    scan({1'b1, 1'b0, 1'b0, 12'd0, 18'd0}, rd);
    check(core_rst, "cores held in reset during upload");
    for (int k = 0; k < 8; k++) begin
      prog[k] = 18'($urandom);
      scan({1'b1, 1'b1, 1'b1, 12'(k), prog[k]}, rd);
    end
    scan({1'b1, 1'b1, 1'b0, 12'd6, 18'd0}, rd);
    scan({1'b0, 1'b0, 1'b0, 12'd0, 18'd0}, rd);
    check(rd == prog[6], "program word read back over TDO");
    while (core_rst) @(posedge sys_clk);
    begin
      bit ok; ok = 1;
      for (int k = 0; k < 8; k++) begin
        @(negedge sys_clk); for (int i = 0; i < 3; i++) fetch_addr[i] = 12'(k);
        @(negedge sys_clk);
        for (int i = 0; i < 3; i++) if (fetch_instr[i] != prog[k]) ok = 0;
      end
      check(ok, "program visible on all three fetch ports");
      if (ok) mech[M_JTAG_UPLOAD]++;
    end

    // ---- set up the scrubber ----
    @(negedge sys_clk); time_value = 32'h6000_0000; time_load = 1; @(negedge sys_clk); time_load = 0;
    for (int f = 0; f < 8; f++) cmd(CMD_SET_LIST, 32'(f), 16'(f));
    cmd(CMD_SET_NRED, 2);
    cmd(CMD_SET_NEMPTY, 2);
    cmd(CMD_SET_RSTSCANS, 0);
    cmd(CMD_VOTE, 0);
    wait_scans(1);
    check(log_q.size() == 0 && running, "clean first scan");

    // ---- configuration upsets ----
    u_cfg.mem[4][20] ^= 32'h0000_0200;
    u_cfg.mem[6][99] ^= 32'h0100_0000;
    wait_scans(2);
    check(u_cfg.mem[4][20] == gold[1][20], "redundant frame repaired");
    if (u_cfg.mem[4][20] == gold[1][20]) mech[M_FRAME_REPAIR]++;
    check(u_cfg.mem[6][99] == 0, "empty frame cleared");
    if (u_cfg.mem[6][99] == 0) mech[M_EMPTY_CLEAR]++;
    check(log_q.size() == 2, $sformatf("two upsets reported (%0d)", log_q.size()));
    if (log_q.size() == 2) begin
      check(log_q[0].frame_addr == 4 && log_q[0].word == 20 && log_q[0].bitpos == 9 && log_q[0].time_s == 32'h6000_0000,
            "report of the redundant-frame upset");
      check(log_q[1].frame_addr == 6 && log_q[1].word == 99 && log_q[1].bitpos == 24 && log_q[1].polarity,
            "report of the empty-frame upset");
    end
    log_q.delete();

    // ---- upsets in the scrubber's own memories ----
    begin
      logic [7:0]  d0; logic [17:0] p0; logic [7:0] s0; int f0;
      d0 = dut.g_core[1].u_core.u_dram.mem[LIST_BASE + 5];
      f0 = dram_fixes;
      dut.g_core[1].u_core.u_dram.mem[LIST_BASE + 5] = ~d0;
      for (int n = 0; dram_fixes == f0 && n < 50000; n++) @(posedge sys_clk);
      check(dut.g_core[1].u_core.u_dram.mem[LIST_BASE + 5] == d0, "Data RAM copy repaired");
      if (dut.g_core[1].u_core.u_dram.mem[LIST_BASE + 5] == d0) mech[M_DRAM_FIX]++;
      p0 = dut.g_core[2].u_core.u_prom.mem[3];
      f0 = prom_fixes;
      dut.g_core[2].u_core.u_prom.mem[3] = p0 ^ 18'h0_0010;
      for (int n = 0; prom_fixes == f0 && n < 50000; n++) @(posedge sys_clk);
      check(dut.g_core[2].u_core.u_prom.mem[3] == prog[3], "Program ROM copy repaired");
      if (dut.g_core[2].u_core.u_prom.mem[3] == prog[3]) mech[M_PROM_FIX]++;
      s0 = dut.g_core[0].u_core.u_spad.mem[SP_NRED];
      f0 = spad_fixes;
      dut.g_core[0].u_core.u_spad.mem[SP_NRED] = 8'hFF;
      for (int n = 0; spad_fixes == f0 && n < 50000; n++) @(posedge sys_clk);
      check(dut.g_core[0].u_core.u_spad.mem[SP_NRED] == s0 && s0 == 8'd2, "scratchpad copy repaired");
      if (dut.g_core[0].u_core.u_spad.mem[SP_NRED] == 8'd2) mech[M_SPAD_FIX]++;
    end

    // ---- periodic reset every 2 scans ----
    begin
      int r0;
      r0 = core_resets;
      cmd(CMD_SET_RSTSCANS, 2);
      for (int n = 0; core_resets == r0 && n < 50000; n++) @(posedge sys_clk);
      while (core_rst) @(posedge sys_clk);
      repeat (20) @(posedge sys_clk);
      check(running && dut.g_core[1].u_core.u_engine.nred == 2, "cores resumed with their settings after reset");
      u_cfg.mem[0][0] ^= 32'h1;
      wait_scans(1);
      check(u_cfg.mem[0][0] == gold[0][0], "scrubbing after the periodic reset");
      if (running && u_cfg.mem[0][0] == gold[0][0]) mech[M_PERIODIC_RESET]++;
      cmd(CMD_SET_RSTSCANS, 0);
      log_q.delete();
    end

    // ---- one core drives garbage to the ICAP: outvoted ----
    begin
      bit seen; seen = 0;
      force dut.c_icap_i[0] = 32'hFFFF_FFFF;
      u_cfg.mem[1][60] ^= 32'h0000_8000;
      fork
        begin wait_scans(2); end
        begin forever begin @(posedge sys_clk); if (idis) seen = 1; end end
      join_any
      disable fork;
      release dut.c_icap_i[0];
      check(seen, "ICAP voter saw the disagreeing core");
      check(u_cfg.mem[1][60] == gold[0][60] && u_cfg.mem[0][60] == gold[0][60] && u_cfg.mem[2][60] == gold[0][60],
            "repair correct with one core's ICAP output corrupted");
      if (seen && u_cfg.mem[1][60] == gold[0][60]) mech[M_ICAP_MASK]++;
      log_q.delete();
    end

    // ---- O command ----
    cmd(CMD_PAUSE, 0);
    cmd(CMD_TOGGLE, 32'd3, {4'd0, 7'd3, 5'd2});
    @(negedge sys_clk); while (!cmd_ready) @(negedge sys_clk);
    check(u_cfg.mem[3][3] == (gold[1][3] ^ 32'h4), "O command flipped one bit");
    cmd(CMD_CONTINUE, 0);
    wait_scans(2);
    check(u_cfg.mem[3][3] == gold[1][3] && log_q.size() == 1, "flipped bit found and repaired");
    if (u_cfg.mem[3][3] == gold[1][3]) mech[M_TOGGLE]++;

    // ---- broken frame: halt ----
    for (int w = 0; w < 65; w++) u_cfg.mem[2][w] ^= 32'h0000_0003;
    begin
      int n; n = 0;
      while (!halted && n < 200000) begin @(posedge sys_clk); n++; end
    end
    check(halted && !running, "halted on 130 errors in one frame");
    if (halted) mech[M_HALT]++;

    // ---- DCO calibration circuit ----
    begin
      int d0, e0; real r;
      #20 cal_dco_rst = 0; cal_ext_rst = 0;
      #200 d0 = cal_dcnt; e0 = cal_ecnt;
      #4000;
      r = real'(cal_dcnt - d0) / real'(cal_ecnt - e0);
      check(r > 0.99 && r < 1.01, $sformatf("calibration: DCO at 200 MHz for k=40 (ratio %f)", r));
      if (r > 0.99 && r < 1.01) mech[M_DCO_CAL]++;
    end

    // ---- counter test circuit ----
    #20 tc_rst = 0;
    #500;
    @(negedge ext_clk); tc_latch = 3'b111; @(negedge ext_clk); tc_latch = 0; @(negedge ext_clk);
    check(tc_cref != 0 && tc_c[0] == tc_cref && tc_v == tc_cref && !tc_fail, "test counters agree with reference");
    if (!tc_fail && tc_cref != 0) mech[M_TEST_CIRCUIT]++;

    for (int m = 0; m < int'(M_NUM); m++) begin
      $display("mechanism %-16s happened %0d time(s)", mname[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL: mechanism %s never happened", mname[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
