`timescale 1ns/1ps
// Top level: the C3 (Configuration Consistency Corrector) self-repairing
// configuration scrubber, with the DCO calibration circuit and the
// fault-injection test circuit beside it.
//
// C3 protects the configuration memory of an SRAM FPGA without any external
// memory. Every frame used by the protected logic is kept in three copies in
// the configuration itself; three identical cores read the copies through
// the ICAP port, vote them and rewrite the copies that disagree, and force
// unused frames back to all-zero. The scrubber protects itself with TMR:
//   * three cores run in lockstep from the same commands; their ICAP signals
//     and IO-port outputs are majority voted (c3_out_voter);
//   * the three copies of the Data RAM, the Program ROM and the scratchpad
//     are continuously voted and repaired through their second port by three
//     memory scrubbers;
//   * the cores are reset together, from a voted reset controller, every
//     rstscans scans; the scratchpad, which keeps their settings, is voted
//     before they leave reset;
//   * the JTAG loader can rewrite the Program ROMs while the cores are held
//     in reset, sharing port B with the Program ROM scrubber.
// The system clock is the 200 MHz output of an on-chip ring oscillator
// (dco_clk) divided by two; the oscillator's delay line is set by the
// encoder here (dco_sel) with the fixed coarse/fine values DCO_K and
// DCO_KDITHER. A Unixtime counter time-stamps the upset reports.
//
// Outside this module, and brought out as ports: the ICAPE2 primitive (with
// the configuration memory), the boundary-scan primitive (jtag_*), the
// host link that delivers commands and takes reports (cmd_*, upset_*), the
// processors that would fetch from the Program ROMs (fetch_*), the ring
// oscillator itself, and the virtual I/O core of the two side circuits
// (cal_*, tc_*). rst_n is asynchronous; all C3 logic runs on the divided
// clock sys_clk after a two-stage reset synchroniser.
module c3_top
  import c3_pkg::cmd_op_e, c3_pkg::upset_t;
#(
  parameter int          FRAME_WORDS = c3_pkg::FRAME_WORDS,
  parameter int          HALT_THR    = c3_pkg::HALT_THRESHOLD,
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int          RST_MIN     = 16,
  parameter int          DCO_NMAX    = 64,
  parameter int          DCO_KDW     = 4,
  parameter int          DCO_K       = 40,
  parameter int          DCO_KDITHER = 0,
  parameter bit          TC_TRIPLE   = 1'b1,
  localparam int         KW          = $clog2(DCO_NMAX + 1)
) (
  input  logic                rst_n,
  // ring oscillator
  input  logic                dco_clk,
  output logic [DCO_NMAX-1:0] dco_sel,
  output logic                sys_clk,
  // host commands and reports
  input  logic                cmd_valid,
  input  cmd_op_e             cmd_op,
  input  logic [31:0]         cmd_arg,
  input  logic [15:0]         cmd_idx,
  output logic                cmd_ready,
  output logic                upset_valid,
  output upset_t              upset,
  output logic                halted,
  output logic                running,
  output logic                scan_done,
  input  logic                time_load,
  input  logic [31:0]         time_value,
  output logic [31:0]         unixtime,
  // ICAPE2
  output logic                icap_csib,
  output logic                icap_rdwrb,
  output logic [31:0]         icap_i,
  input  logic [31:0]         icap_o,
  // boundary scan user register
  input  logic                jtag_drck,
  input  logic                jtag_update,
  input  logic                jtag_capture,
  input  logic                jtag_sel,
  input  logic                jtag_shift,
  input  logic                jtag_tdi,
  output logic                jtag_tdo,
  // processor instruction fetch ports
  input  logic [11:0]         fetch_addr  [3],
  output logic [17:0]         fetch_instr [3],
  // monitoring
  output logic                core_rst,
  output logic [31:0]         core_resets,
  output logic [31:0]         dram_fixes,
  output logic [31:0]         prom_fixes,
  output logic [31:0]         spad_fixes,
  output logic                icap_disagree,
  output logic                io_disagree,
  // DCO calibration circuit
  input  logic                cal_dco_clk,
  input  logic                cal_ext_clk,
  input  logic                cal_dco_rst,
  input  logic                cal_ext_rst,
  input  logic [KW-1:0]       cal_k,
  input  logic [DCO_KDW-1:0]  cal_k_dither,
  output logic [DCO_NMAX-1:0] cal_dco_sel,
  output logic [31:0]         cal_dco_count,
  output logic [31:0]         cal_ext_count,
  // fault-injection test circuit
  input  logic                tc_clk,
  input  logic                tc_rst,
  input  logic [2:0]          tc_latch,
  output logic [31:0]         tc_c_lat [3],
  output logic [31:0]         tc_cref_lat,
  output logic [31:0]         tc_voted,
  output logic [2:0]          tc_mismatch,
  output logic                tc_fail
);
  // ---------------- clock, reset, time ----------------
  logic [1:0] rs_sys, rs_dco;
  logic       sys_rst, dco_rst, pb_rst, spad_done;
  logic [KW-1:0] dco_n;

  clk_div2 u_div (.clk_in(dco_clk), .rst_n, .clk_out(sys_clk));

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) rs_sys <= 2'b11;
    else        rs_sys <= {rs_sys[0], 1'b0};
  end
  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) rs_dco <= 2'b11;
    else        rs_dco <= {rs_dco[0], 1'b0};
  end
  assign sys_rst = rs_sys[1];
  assign dco_rst = rs_dco[1];

  dco_encoder #(.NMAX(DCO_NMAX), .KDW(DCO_KDW)) u_dco_enc (
    .clk(dco_clk), .rst(dco_rst), .k(KW'(DCO_K)), .k_dither(DCO_KDW'(DCO_KDITHER)),
    .sel(dco_sel), .n_used(dco_n)
  );

  unixtime_counter #(.CLK_HZ(CLK_HZ)) u_time (
    .clk(sys_clk), .rst(sys_rst), .load(time_load), .load_value(time_value),
    .seconds(unixtime), .tick()
  );

  // ---------------- the three cores ----------------
  logic        c_ready [3], c_csib [3], c_rdwrb [3], c_uv [3], c_halt [3], c_run [3], c_sd [3];
  logic [2:0]  c_req;
  logic [31:0] c_icap_i [3];
  upset_t      c_upset [3];
  logic [3:0]  c_flags [3];
  logic [3:0]  v_flags;

  logic [11:0] dram_b_addr, prom_b_addr, prom_s_addr;
  logic [2:0]  dram_b_we, prom_b_we, prom_s_we, spad_b_we;
  logic [7:0]  dram_b_din, spad_b_din;
  logic [17:0] prom_b_din, prom_s_din;
  logic [6:0]  spad_b_addr;
  logic [7:0]  dram_b_dout [3], spad_b_dout [3];
  logic [17:0] prom_b_dout [3];
  logic [2:0]  dram_a_we, spad_a_we;
  logic [11:0] dram_a_addr [3];
  logic [6:0]  spad_a_addr [3];

  for (genvar i = 0; i < 3; i++) begin : g_core
    c3_core #(.FRAME_WORDS(FRAME_WORDS), .HALT_THR(HALT_THR)) u_core (
      .clk(sys_clk), .rst(core_rst),
      .cmd_valid, .cmd_op, .cmd_arg, .cmd_idx, .cmd_ready(c_ready[i]),
      .icap_csib(c_csib[i]), .icap_rdwrb(c_rdwrb[i]), .icap_i(c_icap_i[i]), .icap_o,
      .unixtime, .upset_valid(c_uv[i]), .upset(c_upset[i]),
      .halted(c_halt[i]), .running(c_run[i]), .scan_done(c_sd[i]), .reset_req(c_req[i]),
      .fetch_addr(fetch_addr[i]), .fetch_instr(fetch_instr[i]),
      .dram_b_addr, .dram_b_we(dram_b_we[i]), .dram_b_din, .dram_b_dout(dram_b_dout[i]),
      .prom_b_addr, .prom_b_we(prom_b_we[i]), .prom_b_din, .prom_b_dout(prom_b_dout[i]),
      .spad_b_addr, .spad_b_we(spad_b_we[i]), .spad_b_din, .spad_b_dout(spad_b_dout[i]),
      .dram_a_we(dram_a_we[i]), .dram_a_addr(dram_a_addr[i]),
      .spad_a_we(spad_a_we[i]), .spad_a_addr(spad_a_addr[i])
    );
    assign c_flags[i] = {c_ready[i], c_halt[i], c_run[i], c_sd[i]};
  end

  // ---------------- voters ----------------
  c3_out_voter u_vote (
    .icap_csib_c(c_csib), .icap_rdwrb_c(c_rdwrb), .icap_i_c(c_icap_i),
    .flags_c(c_flags), .upset_valid_c(c_uv), .upset_c(c_upset),
    .icap_csib, .icap_rdwrb, .icap_i,
    .flags(v_flags), .upset_valid, .upset,
    .icap_disagree, .io_disagree
  );
  assign {cmd_ready, halted, running, scan_done} = v_flags;

  // ---------------- memory scrubbers ----------------
  mem_scrubber #(.WIDTH(8), .DEPTH(c3_pkg::DRAM_DEPTH)) u_dram_scrub (
    .clk(sys_clk), .rst(sys_rst), .enable(1'b1),
    .addr_b(dram_b_addr), .we_b(dram_b_we), .din_b(dram_b_din), .dout_b(dram_b_dout),
    .we_a(dram_a_we), .addr_a(dram_a_addr), .sweep_done(), .fixes(dram_fixes)
  );

  mem_scrubber #(.WIDTH(8), .DEPTH(c3_pkg::SPAD_DEPTH)) u_spad_scrub (
    .clk(sys_clk), .rst(sys_rst), .enable(1'b1),
    .addr_b(spad_b_addr), .we_b(spad_b_we), .din_b(spad_b_din), .dout_b(spad_b_dout),
    .we_a(spad_a_we), .addr_a(spad_a_addr), .sweep_done(spad_done), .fixes(spad_fixes)
  );

  logic [2:0]  no_we;
  logic [11:0] no_addr [3];
  assign no_we = 3'b000;
  assign no_addr = '{default: '0};

  mem_scrubber #(.WIDTH(18), .DEPTH(c3_pkg::PROM_DEPTH)) u_prom_scrub (
    .clk(sys_clk), .rst(sys_rst), .enable(!pb_rst),
    .addr_b(prom_s_addr), .we_b(prom_s_we), .din_b(prom_s_din), .dout_b(prom_b_dout),
    .we_a(no_we), .addr_a(no_addr), .sweep_done(), .fixes(prom_fixes)
  );

  jtag_loader u_loader (
    .clk(sys_clk), .rst(sys_rst),
    .drck(jtag_drck), .update(jtag_update), .capture(jtag_capture), .sel(jtag_sel),
    .shift(jtag_shift), .tdi(jtag_tdi), .tdo(jtag_tdo),
    .pb_rst,
    .scrub_addr(prom_s_addr), .scrub_we(prom_s_we), .scrub_din(prom_s_din),
    .rom_addr(prom_b_addr), .rom_we(prom_b_we), .rom_din(prom_b_din), .rom_dout(prom_b_dout)
  );

  c3_reset_ctrl #(.MIN_CYCLES(RST_MIN)) u_rst (
    .clk(sys_clk), .rst(sys_rst), .loader_rst(pb_rst), .req(c_req),
    .spad_sweep_done(spad_done), .core_rst, .resets(core_resets), .hold_disagree()
  );

  // ---------------- side circuits ----------------
  dco_calib #(.NMAX(DCO_NMAX), .KDW(DCO_KDW)) u_cal (
    .dco_clk(cal_dco_clk), .ext_clk(cal_ext_clk), .dco_rst(cal_dco_rst), .ext_rst(cal_ext_rst),
    .k(cal_k), .k_dither(cal_k_dither), .dco_sel(cal_dco_sel),
    .dco_count(cal_dco_count), .ext_count(cal_ext_count)
  );

  test_counters #(.W(32), .TRIPLE_GLOBAL(TC_TRIPLE)) u_tc (
    .clk(tc_clk), .rst(tc_rst), .latch(tc_latch),
    .c_lat(tc_c_lat), .cref_lat(tc_cref_lat), .voted(tc_voted),
    .mismatch(tc_mismatch), .fail(tc_fail)
  );
endmodule
