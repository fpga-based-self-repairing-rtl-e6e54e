`timescale 1ns/1ps
// Testbench of the ring-oscillator model: the period must be twice
// (T_FB + T0 + n*TPD) for several n, 5 ns (200 MHz) at n = 40, and the
// output must stop when disabled.
module dco_ring_tb;
  localparam int NMAX = 64;
  logic en = 0; logic [NMAX-1:0] sel = '0; logic clk_out;
  int checks = 0, failures = 0;
  dco_ring #(.NMAX(NMAX)) dut (.enable(en), .sel, .clk_out);
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int ns [4] = '{1, 20, 40, 64};
    #20;
    checks++; if (clk_out !== 1'b0) begin failures++; $display("FAIL: runs while disabled"); end
    en = 1;
    foreach (ns[j]) begin
      realtime t0, t1, exp_p;
      sel = '0;
      for (int i = 0; i < NMAX; i++) sel[i] = (i > NMAX - ns[j]);
      repeat (3) @(posedge clk_out);
      t0 = $realtime;
      repeat (10) @(posedge clk_out);
      t1 = $realtime;
      exp_p = 2.0 * (0.3 + 1.2 + ns[j] * 0.025);
      checks++;
      if ((t1 - t0) / 10.0 < exp_p - 0.002 || (t1 - t0) / 10.0 > exp_p + 0.002) begin
        failures++; $display("FAIL: n=%0d period %f expected %f", ns[j], (t1 - t0) / 10.0, exp_p);
      end
      if (ns[j] == 40) begin
        checks++;
        if ((t1 - t0) / 10.0 < 4.998 || (t1 - t0) / 10.0 > 5.002) begin failures++; $display("FAIL: not 200 MHz"); end
      end
    end
    en = 0; #30;
    checks++; if (clk_out !== 1'b0) begin failures++; $display("FAIL: does not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
