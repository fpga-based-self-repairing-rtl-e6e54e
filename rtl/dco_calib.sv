`timescale 1ns/1ps
// DCO calibration circuit.
//
// Two free-running 32-bit counters, the DCO-counter on the DCO output and
// the EXT-counter on an external 200 MHz reference, are read and reset from
// a virtual I/O core, which also sets the coarse (k) and fine (k_dither)
// delay controls of the DCO. After resetting both counters and letting them
// run, f_DCO = 200 MHz * dco_count / ext_count, and k / k_dither are adjusted
// until the ratio is 1. The encoder of the DCO runs on the DCO clock. Each
// reset is synchronised into the domain of its counter (two flip-flops),
// so a counter starts two of its own clock cycles after the reset is
// released. This circuit is only used to find k and k_dither; the scrubber
// itself uses fixed values.
module dco_calib #(
  parameter int NMAX = 64,
  parameter int KDW  = 4,
  localparam int KW  = $clog2(NMAX + 1)
) (
  input  logic            dco_clk,
  input  logic            ext_clk,
  input  logic            dco_rst,     // from the VIO
  input  logic            ext_rst,     // from the VIO
  input  logic [KW-1:0]   k,           // from the VIO
  input  logic [KDW-1:0]  k_dither,    // from the VIO
  output logic [NMAX-1:0] dco_sel,     // to the delay line
  output logic [31:0]     dco_count,   // to the VIO
  output logic [31:0]     ext_count    // to the VIO
);
  logic [1:0] dco_rs, ext_rs;
  logic [KW-1:0] n_used;

  always_ff @(posedge dco_clk or posedge dco_rst) begin
    if (dco_rst) dco_rs <= 2'b11;
    else         dco_rs <= {dco_rs[0], 1'b0};
  end
  always_ff @(posedge ext_clk or posedge ext_rst) begin
    if (ext_rst) ext_rs <= 2'b11;
    else         ext_rs <= {ext_rs[0], 1'b0};
  end

  always_ff @(posedge dco_clk) begin
    if (dco_rs[1]) dco_count <= '0;
    else           dco_count <= dco_count + 32'd1;
  end
  always_ff @(posedge ext_clk) begin
    if (ext_rs[1]) ext_count <= '0;
    else           ext_count <= ext_count + 32'd1;
  end

  dco_encoder #(.NMAX(NMAX), .KDW(KDW)) u_enc (
    .clk(dco_clk), .rst(dco_rs[1]), .k, .k_dither, .sel(dco_sel), .n_used
  );
endmodule
