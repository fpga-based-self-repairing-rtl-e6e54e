`timescale 1ns/1ps
// Bitwise two-out-of-three majority voter.
//
// Every output bit is the OR of the three pairwise ANDs of the copies, the
// gate arrangement of the classic TMR voter. mism[i] is set when copy i
// differs from the voted value in any bit; the memory scrubbers use it to
// decide which copy to rewrite. Purely combinational, no latency.
module tmr_voter #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y,
  output logic [2:0]       mism
);
  always_comb begin
    y       = (a & b) | (b & c) | (a & c);
    mism[0] = |(a ^ y);
    mism[1] = |(b ^ y);
    mism[2] = |(c ^ y);
  end
endmodule
