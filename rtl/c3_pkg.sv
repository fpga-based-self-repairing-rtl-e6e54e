`timescale 1ns/1ps
// Shared constants and types of the C3 configuration scrubber.
//
// A 7-series configuration frame holds 101 words of 32 bits (word index
// 0x00..0x64, bit index 0x00..0x1F). Each core owns a 4k x 8 Data RAM, a
// 4k x 18 Program ROM and a 128 x 8 scratchpad. A frame with more than 127
// wrong bits halts the scrubber, since it points to a broken ICAP rather than
// to single upsets. The ICAP command words and the host command set below
// are this design's own encoding: the real ICAPE2 command sequences are not
// reproduced here.
package c3_pkg;
  localparam int FRAME_WORDS    = 101;
  localparam int WORD_BITS      = 32;
  localparam int DRAM_DEPTH     = 4096;
  localparam int DRAM_WIDTH     = 8;
  localparam int PROM_DEPTH     = 4096;
  localparam int PROM_WIDTH     = 18;
  localparam int SPAD_DEPTH     = 128;
  localparam int HALT_THRESHOLD = 127;
  localparam int LIST_BASE      = 2048;  // Data RAM byte address of the frame list

  // First word of an ICAP transaction (second word: frame address)
  localparam logic [31:0] ICAP_CMD_READ  = 32'h0000_0001;
  localparam logic [31:0] ICAP_CMD_WRITE = 32'h0000_0002;

  // Scratchpad locations that survive the periodic core reset
  localparam int SP_NRED    = 0;
  localparam int SP_NEMPTY  = 1;
  localparam int SP_RSTSCAN = 2;
  localparam int SP_FLAGS   = 3;

  // Host commands, named after the terminal letters of the scrubber
  typedef enum logic [3:0] {
    CMD_NOP          = 4'd0,
    CMD_SET_NRED     = 4'd1,  // N: number of redundant frame triplets
    CMD_SET_NEMPTY   = 4'd2,  // N: number of empty frames
    CMD_SET_RSTSCANS = 4'd3,  // K: scans between two core resets (0 = never)
    CMD_SET_LIST     = 4'd4,  // write frame list entry cmd_idx with address cmd_arg
    CMD_TOGGLE       = 4'd5,  // O: read frame cmd_arg, flip one bit, write it back
    CMD_VOTE         = 4'd6,  // V: start voting from the first frame
    CMD_STOP         = 4'd7,  // S: stop and return to the first frame
    CMD_PAUSE        = 4'd8,  // P: pause at the current frame
    CMD_CONTINUE     = 4'd9,  // C: continue from the current frame
    CMD_SET_FAR      = 4'd10, // F: select frame cmd_arg for R, T and W
    CMD_READ         = 4'd11, // R: read the selected frame into Data RAM area 0
    CMD_FLIP         = 4'd12, // T: flip one bit of the frame held in area 0
    CMD_WRITE        = 4'd13  // W: write area 0 to the selected frame
  } cmd_op_e;

  // One corrected bit, as reported to the host
  typedef struct packed {
    logic [31:0] frame_addr; // frame address
    logic [6:0]  word;      // word in frame
    logic [4:0]  bitpos;    // bit in word
    logic        polarity;  // 1: bit had flipped 0->1, 0: bit had flipped 1->0
    logic [31:0] time_s;    // Unixtime stamp
  } upset_t;
endpackage
