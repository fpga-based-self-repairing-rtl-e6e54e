`timescale 1ns/1ps
// One of the three identical C3 cores.
//
// A core holds the scrubbing controller and its three memories: the 4k x 8
// Data RAM (frame buffers, vote result, frame list), the 4k x 18 Program ROM
// (program of the core's processor; its port A is brought out as the
// instruction fetch port) and the 128 x 8 scratchpad (settings that survive
// the periodic reset). Port A of every memory belongs to the core; port B
// of every memory is brought out so that the shared memory scrubbers (and,
// for the Program ROM, the JTAG loader) can reach it. The core's own port A
// write activity on Data RAM and scratchpad is brought out as well, so a
// scrubber can avoid rewriting a word the core has just changed.
module c3_core
  import c3_pkg::cmd_op_e, c3_pkg::upset_t;
#(
  parameter int FRAME_WORDS = c3_pkg::FRAME_WORDS,
  parameter int HALT_THR    = c3_pkg::HALT_THRESHOLD
) (
  input  logic        clk,
  input  logic        rst,
  // host commands
  input  logic        cmd_valid,
  input  cmd_op_e     cmd_op,
  input  logic [31:0] cmd_arg,
  input  logic [15:0] cmd_idx,
  output logic        cmd_ready,
  // ICAP (to the voter / from the primitive)
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i,
  input  logic [31:0] icap_o,
  input  logic [31:0] unixtime,
  output logic        upset_valid,
  output upset_t      upset,
  output logic        halted,
  output logic        running,
  output logic        scan_done,
  output logic        reset_req,
  // instruction fetch port of the Program ROM
  input  logic [11:0] fetch_addr,
  output logic [17:0] fetch_instr,
  // port B of Data RAM, Program ROM and scratchpad
  input  logic [11:0] dram_b_addr,
  input  logic        dram_b_we,
  input  logic [7:0]  dram_b_din,
  output logic [7:0]  dram_b_dout,
  input  logic [11:0] prom_b_addr,
  input  logic        prom_b_we,
  input  logic [17:0] prom_b_din,
  output logic [17:0] prom_b_dout,
  input  logic [6:0]  spad_b_addr,
  input  logic        spad_b_we,
  input  logic [7:0]  spad_b_din,
  output logic [7:0]  spad_b_dout,
  // port A write activity
  output logic        dram_a_we,
  output logic [11:0] dram_a_addr,
  output logic        spad_a_we,
  output logic [6:0]  spad_a_addr
);
  logic [7:0] dram_din, dram_dout, spad_din, spad_dout;

  c3_scrub_engine #(.FRAME_WORDS(FRAME_WORDS), .HALT_THR(HALT_THR)) u_engine (
    .clk, .rst,
    .cmd_valid, .cmd_op, .cmd_arg, .cmd_idx, .cmd_ready,
    .icap_csib, .icap_rdwrb, .icap_i, .icap_o,
    .dram_addr(dram_a_addr), .dram_we(dram_a_we), .dram_din, .dram_dout,
    .spad_addr(spad_a_addr), .spad_we(spad_a_we), .spad_din, .spad_dout,
    .unixtime, .upset_valid, .upset, .halted, .running, .scan_done, .reset_req
  );

  dp_ram #(.WIDTH(8), .DEPTH(c3_pkg::DRAM_DEPTH)) u_dram (
    .clk,
    .addr_a(dram_a_addr), .we_a(dram_a_we), .din_a(dram_din), .dout_a(dram_dout),
    .addr_b(dram_b_addr), .we_b(dram_b_we), .din_b(dram_b_din), .dout_b(dram_b_dout)
  );

  dp_ram #(.WIDTH(18), .DEPTH(c3_pkg::PROM_DEPTH)) u_prom (
    .clk,
    .addr_a(fetch_addr), .we_a(1'b0), .din_a(18'd0), .dout_a(fetch_instr),
    .addr_b(prom_b_addr), .we_b(prom_b_we), .din_b(prom_b_din), .dout_b(prom_b_dout)
  );

  dp_ram #(.WIDTH(8), .DEPTH(c3_pkg::SPAD_DEPTH)) u_spad (
    .clk,
    .addr_a(spad_a_addr), .we_a(spad_a_we), .din_a(spad_din), .dout_a(spad_dout),
    .addr_b(spad_b_addr), .we_b(spad_b_we), .din_b(spad_b_din), .dout_b(spad_b_dout)
  );
endmodule
