`timescale 1ns/1ps
// Memory scrubber for a memory that is kept in three copies, one per core.
//
// It walks all addresses on port B of the three copies, two clock cycles per
// address: in the READ cycle it presents the address, in the CHECK cycle the
// three words are voted and every copy that disagrees with the majority is
// rewritten with the voted word. The same module serves as Data RAM scrubber,
// Program ROM scrubber and scratchpad voter. A rewrite is skipped when port A
// of any copy wrote the same address during the READ or CHECK cycle, because
// the word read is then stale; the next sweep catches a real error there.
// sweep_done pulses for one cycle after the last address has been checked;
// fixes counts rewritten words. With enable low the scrubber drives no write
// and holds its position.
module mem_scrubber #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 4096,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  // port B of the three copies
  output logic [AW-1:0]    addr_b,
  output logic [2:0]       we_b,
  output logic [WIDTH-1:0] din_b,
  input  logic [WIDTH-1:0] dout_b [3],
  // port A write activity of the three copies
  input  logic [2:0]       we_a,
  input  logic [AW-1:0]    addr_a [3],
  output logic             sweep_done,
  output logic [31:0]      fixes
);
  logic            phase_chk;   // 0: READ cycle, 1: CHECK cycle
  logic [AW-1:0]   ptr;
  logic            hazard_q;
  logic [WIDTH-1:0] voted;
  logic [2:0]      mism;
  logic            hazard_now;

  tmr_voter #(.WIDTH(WIDTH)) u_vote (
    .a(dout_b[0]), .b(dout_b[1]), .c(dout_b[2]), .y(voted), .mism(mism)
  );

  always_comb begin
    hazard_now = 1'b0;
    for (int i = 0; i < 3; i++)
      if (we_a[i] && addr_a[i] == ptr) hazard_now = 1'b1;
  end

  assign addr_b = ptr;
  assign din_b  = voted;
  assign we_b   = (enable && phase_chk && !hazard_q && !hazard_now) ? mism : 3'b000;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_chk  <= 1'b0;
      ptr        <= '0;
      hazard_q   <= 1'b0;
      sweep_done <= 1'b0;
      fixes      <= '0;
    end else begin
      sweep_done <= 1'b0;
      if (enable) begin
        if (!phase_chk) begin
          hazard_q  <= hazard_now;
          phase_chk <= 1'b1;
        end else begin
          phase_chk <= 1'b0;
          if (|we_b) fixes <= fixes + 32'd1;
          if (ptr == AW'(DEPTH - 1)) begin
            ptr        <= '0;
            sweep_done <= 1'b1;
          end else begin
            ptr <= ptr + 1'b1;
          end
        end
      end
    end
  end
endmodule
