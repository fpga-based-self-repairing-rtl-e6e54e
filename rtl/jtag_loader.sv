`timescale 1ns/1ps
// JTAG loader for the three Program ROMs, synchronous to the system clock.
//
// The loader sits behind a user register of the boundary-scan primitive.
// Writing: 33 bits are shifted in from TDI, least significant bit first,
// on rising edges of DRCK while SEL and SHIFT are high; on the rising edge of
// UPDATE they are copied to an update register laid out as
//   [32] processor reset, [31] BRAM enable, [30] BRAM write enable,
//   [29:18] BRAM address, [17:0] BRAM data in.
// The UPDATE level is brought into the system clock domain by a two-stage
// synchroniser; on its rising edge the update register (stable by then) is
// applied to port B of the three Program ROMs for one clock cycle, and the
// reset bit is stored. A read (enable without write enable) returns the voted
// BRAM output, which is loaded into an 18-bit shift register on the next DRCK
// edge with CAPTURE high and shifted out on TDO, least significant bit first.
// Port B of the ROMs is shared with the Program ROM scrubber: a multiplexer
// hands it to the loader while the processor reset bit is set (the cores are
// held in reset during an upload) and to the scrubber otherwise. Because the
// loader drives port B from the system clock, no clock multiplexing is
// needed on the BRAM.
module jtag_loader (
  input  logic        clk,
  input  logic        rst,
  // boundary-scan user register
  input  logic        drck,
  input  logic        update,
  input  logic        capture,
  input  logic        sel,
  input  logic        shift,
  input  logic        tdi,
  output logic        tdo,
  // processor reset (1 while uploading)
  output logic        pb_rst,
  // Program ROM scrubber side of the multiplexer
  input  logic [11:0] scrub_addr,
  input  logic [2:0]  scrub_we,
  input  logic [17:0] scrub_din,
  // port B of the three Program ROMs
  output logic [11:0] rom_addr,
  output logic [2:0]  rom_we,
  output logic [17:0] rom_din,
  input  logic [17:0] rom_dout [3]
);
  typedef struct packed {
    logic        rst;
    logic        en;
    logic        we;
    logic [11:0] addr;
    logic [17:0] din;
  } ldr_word_t;

  ldr_word_t   wr_sr;      // DRCK domain
  logic [17:0] rd_sr;      // DRCK domain
  ldr_word_t   upd_reg;    // UPDATE domain
  logic [2:0]  upd_sync;   // system clock domain
  logic        apply, rd_pending;
  ldr_word_t   cur;
  logic [17:0] rd_hold;
  logic [17:0] rom_vote;
  logic [2:0]  rom_mism;

  // shift registers on DRCK
  always_ff @(posedge drck) begin
    if (sel && capture) begin
      rd_sr <= rd_hold;
    end else if (sel && shift) begin
      wr_sr <= {tdi, wr_sr[32:1]};
      rd_sr <= {1'b0, rd_sr[17:1]};
    end
  end
  assign tdo = rd_sr[0];

  // update register on UPDATE
  always_ff @(posedge update) begin
    if (sel) upd_reg <= wr_sr;
  end

  tmr_voter #(.WIDTH(18)) u_rdvote (
    .a(rom_dout[0]), .b(rom_dout[1]), .c(rom_dout[2]), .y(rom_vote), .mism(rom_mism)
  );

  // system clock side
  always_ff @(posedge clk) begin
    if (rst) begin
      upd_sync   <= '0;
      apply      <= 1'b0;
      rd_pending <= 1'b0;
      cur        <= '0;
      rd_hold    <= '0;
      pb_rst     <= 1'b0;
    end else begin
      upd_sync   <= {upd_sync[1:0], update};
      apply      <= 1'b0;
      rd_pending <= 1'b0;
      if (upd_sync[1] && !upd_sync[2]) begin
        cur    <= upd_reg;
        pb_rst <= upd_reg.rst;
        apply  <= upd_reg.en;
      end
      if (apply && !cur.we) rd_pending <= 1'b1;
      if (rd_pending) rd_hold <= rom_vote;
    end
  end

  // port B multiplexer: loader while the processor is held in reset
  always_comb begin
    if (pb_rst) begin
      rom_addr = cur.addr;
      rom_we   = (apply && cur.we) ? 3'b111 : 3'b000;
      rom_din  = cur.din;
    end else begin
      rom_addr = scrub_addr;
      rom_we   = scrub_we;
      rom_din  = scrub_din;
    end
  end
endmodule
