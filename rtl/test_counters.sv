`timescale 1ns/1ps
// Fault-injection test circuit for isolated (or not isolated) modules.
//
// Three identical 32-bit counters C0, C1, C2 are the targets of the fault
// injection; a fourth counter CREF, placed away from them and never
// injected, is the reference. All four count on the same clock from the
// same reset. The glue logic ("mixer") latches the counts into registers
// on a LATCH strobe, so a slow reader can compare values taken at the same
// instant, and presents the latched counts, their 2-of-3 vote and a
// per-counter mismatch against the latched reference. A failure of the
// circuit is two or more counters disagreeing with CREF at once (fail).
// With TRIPLE_GLOBAL = 1 the LATCH strobe is taken in three copies, one per
// counter (the variant with tripled global signals); with 0 latch[0] is
// used for all. Counts are latched on the clock edge where LATCH is high.
module test_counters #(
  parameter int W = 32,
  parameter bit TRIPLE_GLOBAL = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [2:0]   latch,
  output logic [W-1:0] c_lat [3],
  output logic [W-1:0] cref_lat,
  output logic [W-1:0] voted,
  output logic [2:0]   mismatch,
  output logic         fail
);
  logic [W-1:0] cnt [3];
  logic [W-1:0] cref;
  logic [2:0]   lat_en;
  logic [2:0]   vote_m;

  always_comb begin
    for (int i = 0; i < 3; i++) lat_en[i] = TRIPLE_GLOBAL ? latch[i] : latch[0];
  end

  for (genvar i = 0; i < 3; i++) begin : g_cnt
    always_ff @(posedge clk) begin
      if (rst) cnt[i] <= '0;
      else     cnt[i] <= cnt[i] + 1'b1;
    end
    always_ff @(posedge clk) begin
      if (rst)            c_lat[i] <= '0;
      else if (lat_en[i]) c_lat[i] <= cnt[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cref     <= '0;
      cref_lat <= '0;
    end else begin
      cref <= cref + 1'b1;
      if (latch[0]) cref_lat <= cref;
    end
  end

  tmr_voter #(.WIDTH(W)) u_vote (
    .a(c_lat[0]), .b(c_lat[1]), .c(c_lat[2]), .y(voted), .mism(vote_m)
  );

  always_comb begin
    for (int i = 0; i < 3; i++) mismatch[i] = (c_lat[i] != cref_lat);
    fail = (mismatch[0] & mismatch[1]) | (mismatch[1] & mismatch[2]) | (mismatch[0] & mismatch[2]);
  end
endmodule
