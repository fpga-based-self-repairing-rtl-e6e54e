`timescale 1ns/1ps
// Behavioural model of the DCO ring: a digitally-controlled delay line whose
// output is fed back to its input through an inverter.
//
// This is not synthesizable logic: on the FPGA the loop is built from
// placed CARRY4 multiplexers, a clock buffer as high fan-out input network
// and an inverter, and its delay depends on placement, core voltage and
// temperature. The model reproduces its timing: with n the number of chain
// elements crossed (one more than the number of ones in the thermometer
// select code), the loop delay is T_FB + T0 + n*TPD and the output
// toggles after every loop delay, so the period is twice the loop delay.
// With enable low the output stays low. Times are in ns.
module dco_ring #(
  parameter int  NMAX = 64,
  parameter real T0   = 1.2,    // input network + output gate delay
  parameter real TPD  = 0.025,  // delay of one chain element
  parameter real T_FB = 0.3     // feedback inverter and routing
) (
  input  logic            enable,
  input  logic [NMAX-1:0] sel,
  output logic            clk_out
);
  int  n;
  real half;

  always_comb begin
    n = 1;
    for (int i = 0; i < NMAX; i++) n = n + int'(sel[i]);
  end

  initial clk_out = 1'b0;

  always begin
    half = T_FB + T0 + real'(n) * TPD;
    #(half);
    if (enable) clk_out = ~clk_out;
    else        clk_out = 1'b0;
  end
endmodule
