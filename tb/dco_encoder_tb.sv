`timescale 1ns/1ps
// Testbench of the delay-line control encoder: thermometer code for every k
// without dithering, clamping of k = 0, and the mean number of crossed
// elements k + k_dither/16 over 16-cycle windows with dithering.
module dco_encoder_tb;
  localparam int NMAX = 64;
  logic clk = 0; always #5 clk = ~clk;
  logic rst = 1; logic [6:0] k = 0; logic [3:0] kd = 0;
  logic [NMAX-1:0] sel; logic [6:0] n_used;
  int checks = 0, failures = 0;
  dco_encoder #(.NMAX(NMAX), .KDW(4)) dut (.clk, .rst, .k, .k_dither(kd), .sel, .n_used);
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  function automatic logic [NMAX-1:0] therm(int n);
    logic [NMAX-1:0] v; v = '0;
    for (int i = 0; i < NMAX; i++) v[i] = (i > NMAX - n);
    return v;
  endfunction
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int kk = 1; kk <= NMAX; kk++) begin
      k = 7'(kk); repeat (2) @(posedge clk); #1;
      check(sel == therm(kk) && $countones(sel) == kk - 1 && n_used == 7'(kk), $sformatf("thermometer code for k=%0d", kk));
    end
    k = 0; repeat (2) @(posedge clk); #1;
    check(n_used == 1 && sel == '0, "k=0 clamped to one element");
    for (int d = 0; d < 16; d++) begin
      int sum;
      k = 30; kd = 4'(d); repeat (40) @(posedge clk);
      sum = 0;
      for (int c = 0; c < 16; c++) begin @(posedge clk); #1; sum += int'(n_used); end
      check(sum == 16 * 30 + d, $sformatf("dither %0d: mean n = %0d/16", d, sum));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
