`timescale 1ns/1ps
// Unixtime counter: a 32-bit seconds counter that time-stamps upset reports.
//
// A prescaler counts CLK_HZ cycles of the DCO-derived system clock per
// second. Because the DCO frequency drifts with temperature and core voltage,
// the host reloads the counter from PC time (load / load_value) every few
// minutes; a load also restarts the prescaler. tick pulses once per second.
module unixtime_counter #(
  parameter int unsigned CLK_HZ = 100_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [31:0] load_value,
  output logic [31:0] seconds,
  output logic        tick
);
  logic [$clog2(CLK_HZ)-1:0] pre;

  always_ff @(posedge clk) begin
    if (rst) begin
      pre     <= '0;
      seconds <= '0;
      tick    <= 1'b0;
    end else if (load) begin
      pre     <= '0;
      seconds <= load_value;
      tick    <= 1'b0;
    end else if (pre == ($clog2(CLK_HZ))'(CLK_HZ - 1)) begin
      pre     <= '0;
      seconds <= seconds + 32'd1;
      tick    <= 1'b1;
    end else begin
      pre  <= pre + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
