`timescale 1ns/1ps
// Control encoder of the digitally-controlled delay line (DCDL).
//
// The delay line is a chain of NMAX two-input multiplexer elements (four per
// CARRY4 primitive). Element i passes on the output of element i-1 when its
// select S(i) is 1 and takes the fanned-out input signal when S(i) is 0. To
// make the signal cross exactly n elements, the encoder selects the input
// at element NMAX-n and sets S(i)=1 for every element after it: a
// thermometer code with n-1 ones at the top. The delay is t0 + n*tpd.
// The control word is split into a coarse part k and a fine part k_dither:
// a first-order accumulator of KDW bits adds k_dither every clock cycle and
// crosses k+1 instead of k elements on each carry, so the mean number of
// crossed elements is k + k_dither / 2**KDW. n is limited to 1..NMAX.
// sel is registered and changes one clock after k / k_dither.
module dco_encoder #(
  parameter int NMAX = 64,   // 16 CARRY4 x 4 multiplexers
  parameter int KDW  = 4,
  localparam int KW  = $clog2(NMAX + 1)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [KW-1:0]   k,
  input  logic [KDW-1:0]  k_dither,
  output logic [NMAX-1:0] sel,
  output logic [KW-1:0]   n_used
);
  logic [KDW-1:0] acc;
  logic [KDW:0]   sum;
  logic [KW:0]    n_raw;
  logic [KW-1:0]  n;

  always_comb begin
    sum   = {1'b0, acc} + {1'b0, k_dither};
    n_raw = {1'b0, k} + (KW+1)'(sum[KDW]);
    if (n_raw == '0)                   n = KW'(1);
    else if (n_raw > (KW+1)'(NMAX))    n = KW'(NMAX);
    else                               n = n_raw[KW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc    <= '0;
      sel    <= '0;
      n_used <= KW'(1);
    end else begin
      acc    <= sum[KDW-1:0];
      n_used <= n;
      for (int i = 0; i < NMAX; i++)
        sel[i] <= (i > NMAX - int'(n));
    end
  end
endmodule
