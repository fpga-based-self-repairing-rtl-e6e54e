`timescale 1ns/1ps
// Divide-by-two clock generator: turns the 200 MHz DCO output into the
// 100 MHz system clock of the scrubber. A toggle flip-flop with its own
// asynchronous reset, so the divided clock starts in a known phase.
module clk_div2 (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) clk_out <= 1'b0;
    else        clk_out <= ~clk_out;
  end
endmodule
