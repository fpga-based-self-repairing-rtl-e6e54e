`timescale 1ns/1ps
// Core reset controller of the C3 scrubber.
//
// The three cores are reset together, and periodically, to clear corrupted
// registers (flags, stack, program counter). A reset starts on the external
// reset, on the JTAG loader's processor reset, or when a majority of the
// cores request one (reset_req, raised after a set number of scans). The
// reset is then held for at least MIN_CYCLES clock cycles and until the
// scratchpad voter has finished a full sweep that began during the reset,
// so every core restarts from the same voted scratchpad. The hold logic is
// kept in three copies whose outputs are voted, so a single corrupted copy
// cannot reset the cores or keep them in reset. core_rst comes from
// registers through the voter and rises one cycle after its cause.
module c3_reset_ctrl #(
  parameter int MIN_CYCLES = 16
) (
  input  logic       clk,
  input  logic       rst,          // external / power-on reset
  input  logic       loader_rst,   // processor reset from the JTAG loader
  input  logic [2:0] req,          // reset requests of the three cores
  input  logic       spad_sweep_done,
  output logic       core_rst,
  output logic [31:0] resets,      // number of periodic (requested) resets
  output logic       hold_disagree // one copy of the hold logic is outvoted
);
  localparam int CW = $clog2(MIN_CYCLES + 1);

  logic       req_v;
  logic [2:0] hold;
  logic [2:0] swept;
  logic [CW-1:0] cnt [3];
  logic [2:0] hold_mism;
  logic       hold_v;

  assign req_v = (req[0] & req[1]) | (req[1] & req[2]) | (req[0] & req[2]);

  for (genvar i = 0; i < 3; i++) begin : g_copy
    always_ff @(posedge clk) begin
      if (rst || loader_rst || (req_v && !hold_v)) begin
        hold[i]  <= 1'b1;
        swept[i] <= 1'b0;
        cnt[i]   <= '0;
      end else if (hold[i]) begin
        if (cnt[i] != CW'(MIN_CYCLES)) cnt[i] <= cnt[i] + 1'b1;
        if (spad_sweep_done) swept[i] <= 1'b1;
        if (cnt[i] == CW'(MIN_CYCLES) && swept[i]) hold[i] <= 1'b0;
      end
    end
  end

  tmr_voter #(.WIDTH(1)) u_vote (
    .a(hold[0]), .b(hold[1]), .c(hold[2]), .y(hold_v), .mism(hold_mism)
  );

  assign core_rst      = hold_v;
  assign hold_disagree = |hold_mism;

  always_ff @(posedge clk) begin
    if (rst) resets <= '0;
    else if (req_v && !hold_v) resets <= resets + 32'd1;
  end
endmodule
