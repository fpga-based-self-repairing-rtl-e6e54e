`timescale 1ns/1ps
// True dual-port block RAM with one clock for both ports.
//
// Each port has address, data in, write enable and a registered data out
// (read-first: a read returns the word as it was before a write at the same
// edge). In the C3 scrubber port A belongs to the core and port B to the
// memory scrubber or the JTAG loader. When both ports write the same word
// at the same edge port A wins, so a scrubber can never overwrite fresh data
// of the core. Contents start at zero, as an FPGA block RAM without an
// initial image does.
module dp_ram #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 4096,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr_a,
  input  logic             we_a,
  input  logic [WIDTH-1:0] din_a,
  output logic [WIDTH-1:0] dout_a,
  input  logic [AW-1:0]    addr_b,
  input  logic             we_b,
  input  logic [WIDTH-1:0] din_b,
  output logic [WIDTH-1:0] dout_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
    if (we_b && !(we_a && addr_a == addr_b)) mem[addr_b] <= din_b;
    if (we_a) mem[addr_a] <= din_a;
  end
endmodule
