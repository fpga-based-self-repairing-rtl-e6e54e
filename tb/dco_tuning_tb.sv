`timescale 1ns/1ps
// Tuning run of the ring oscillator through the calibration circuit, as it
// is done on a freshly placed design: the fixed delay of the loop depends on
// placement and is not known in advance, so the coarse setting k and then
// the dither setting k_dither are searched by comparing the DCO-counter
// with the EXT-counter (200 MHz reference) until the oscillator runs at
// 200 MHz.
// The ring model here has a fixed delay t0 = 1.34 ns instead of the
// 1.2 ns used elsewhere, which puts the ideal chain length at 34.4
// elements: no integer k hits 200 MHz, and dithering has to close the gap.
// Checks: the frequency falls monotonically as k grows (one more element
// per step), the coarse search picks k = 34, and the dither search brings
// the frequency within 0.05 % of 200 MHz, closer than either neighbouring k.
// Each measurement counts for 40 us (about 8,000 reference cycles).
module dco_tuning_tb;
  localparam int NMAX = 64;
  logic ext_clk = 0; always #2.5 ext_clk = ~ext_clk;
  logic dco_clk, dco_rst = 1, ext_rst = 1;
  logic [6:0] k = 40; logic [3:0] kd = 0;
  logic [NMAX-1:0] sel; logic [31:0] dcnt, ecnt;
  int checks = 0, failures = 0;
  dco_ring #(.NMAX(NMAX), .T0(1.34)) ring (.enable(1'b1), .sel, .clk_out(dco_clk));
  dco_calib #(.NMAX(NMAX), .KDW(4)) dut (.dco_clk, .ext_clk, .dco_rst, .ext_rst, .k, .k_dither(kd),
    .dco_sel(sel), .dco_count(dcnt), .ext_count(ecnt));
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  // frequency ratio DCO / reference over a 40 us window
  task automatic measure(output real ratio);
    int d0, e0;
    dco_rst = 1; ext_rst = 1; #50;
    dco_rst = 0; ext_rst = 0;
    #200;
    d0 = dcnt; e0 = ecnt;
    #40000;
    ratio = real'(dcnt - d0) / real'(ecnt - e0);
  endtask
  initial begin
    #10ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real r [NMAX+1];
    real best_r, r_lo, r_hi, e;
    int kbest, dbest;
    bit mono;
    // coarse sweep of k with the dither off
    kd = 0;
    mono = 1;
    for (int kk = 20; kk <= 48; kk++) begin
      k = 7'(kk);
      measure(r[kk]);
      if (kk > 20 && !(r[kk] < r[kk-1])) mono = 0;
    end
    check(mono, "frequency falls with every added element");
    // coarse choice: the longest chain that still reaches 200 MHz
    kbest = 20;
    for (int kk = 20; kk <= 48; kk++) if (r[kk] >= 1.0) kbest = kk;
    check(kbest == 34, $sformatf("coarse k = %0d", kbest));
    r_lo = r[kbest]; r_hi = r[kbest + 1];
    $display("k=%0d: %.2f MHz, k=%0d: %.2f MHz", kbest, 200.0 * r_lo, kbest + 1, 200.0 * r_hi);
    // fine search over k_dither
    k = 7'(kbest);
    best_r = r_lo; dbest = 0;
    for (int d = 1; d < 16; d++) begin
      real rd;
      kd = 4'(d);
      measure(rd);
      e = (rd > 1.0) ? rd - 1.0 : 1.0 - rd;
      if (e < ((best_r > 1.0) ? best_r - 1.0 : 1.0 - best_r)) begin best_r = rd; dbest = d; end
    end
    kd = 4'(dbest);
    $display("k=%0d k_dither=%0d: %.3f MHz", kbest, dbest, 200.0 * best_r);
    e = (best_r > 1.0) ? best_r - 1.0 : 1.0 - best_r;
    check(e < 0.0005, $sformatf("tuned within 0.05 %% of 200 MHz (%.4f %%)", 100.0 * e));
    check(e < (r_lo - 1.0) && e < (1.0 - r_hi), "dither closer than either integer k");
    check(dbest >= 5 && dbest <= 7, $sformatf("k_dither near 0.4 of a step (%0d/16)", dbest));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
