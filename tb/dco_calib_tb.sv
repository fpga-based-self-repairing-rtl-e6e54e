`timescale 1ns/1ps
// Testbench of the DCO calibration circuit, closed around the ring
// oscillator model: with k = 40 the DCO- and EXT-counters (200 MHz
// reference) advance at the same rate; with k = 20 the DCO runs at 250 MHz
// and the ratio is 1.25; the VIO resets clear both counters.
module dco_calib_tb;
  localparam int NMAX = 64;
  logic ext_clk = 0; always #2.5 ext_clk = ~ext_clk;
  logic dco_clk, dco_rst = 1, ext_rst = 1;
  logic [6:0] k = 40; logic [3:0] kd = 0;
  logic [NMAX-1:0] sel; logic [31:0] dcnt, ecnt;
  int checks = 0, failures = 0;
  dco_ring #(.NMAX(NMAX)) ring (.enable(1'b1), .sel, .clk_out(dco_clk));
  dco_calib #(.NMAX(NMAX), .KDW(4)) dut (.dco_clk, .ext_clk, .dco_rst, .ext_rst, .k, .k_dither(kd),
    .dco_sel(sel), .dco_count(dcnt), .ext_count(ecnt));
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic measure(output real ratio);
    int d0, e0;
    dco_rst = 1; ext_rst = 1; #20;
    check(dcnt == 0 && ecnt == 0, "VIO reset clears both counters");
    dco_rst = 0; ext_rst = 0;
    #100;
    d0 = dcnt; e0 = ecnt;
    #4000;
    ratio = real'(dcnt - d0) / real'(ecnt - e0);
  endtask
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real r;
    #50;
    measure(r);
    check(r > 0.99 && r < 1.01, $sformatf("k=40: 200 MHz, ratio %f", r));
    k = 20; #100;
    measure(r);
    check(r > 1.24 && r < 1.26, $sformatf("k=20: 250 MHz, ratio %f", r));
    k = 40; kd = 8; #100;
    measure(r);
    check(r > 0.985 && r < 0.998, $sformatf("k=40.5: ratio %f", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
