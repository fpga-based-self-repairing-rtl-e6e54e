`timescale 1ns/1ps
// Testbench of the output voters: random ICAP and IO values, one copy at a
// time corrupted; the voted outputs must equal the correct values and the
// disagreement flags must show which group was corrupted.
module c3_out_voter_tb;
  import c3_pkg::*;
  int checks = 0, failures = 0;
  logic csib_c [3], rdwrb_c [3], uv_c [3];
  logic [31:0] i_c [3];
  logic [3:0] fl_c [3];
  upset_t up_c [3];
  logic csib, rdwrb, uv, idis, iodis; logic [31:0] icap_i; logic [3:0] fl; upset_t up;
  c3_out_voter dut (.icap_csib_c(csib_c), .icap_rdwrb_c(rdwrb_c), .icap_i_c(i_c), .flags_c(fl_c),
    .upset_valid_c(uv_c), .upset_c(up_c), .icap_csib(csib), .icap_rdwrb(rdwrb), .icap_i,
    .flags(fl), .upset_valid(uv), .upset(up), .icap_disagree(idis), .io_disagree(iodis));
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 300; t++) begin
      logic gcs, grw, guv; logic [31:0] gi; logic [3:0] gfl; upset_t gup; int bad, grp;
      gcs = 1'($urandom); grw = 1'($urandom); guv = 1'($urandom); gi = $urandom; gfl = 4'($urandom);
      gup = {$urandom, $urandom, $urandom};
      for (int c = 0; c < 3; c++) begin
        csib_c[c] = gcs; rdwrb_c[c] = grw; i_c[c] = gi; fl_c[c] = gfl; uv_c[c] = guv; up_c[c] = gup;
      end
      bad = $urandom % 4; grp = $urandom % 2;
      if (bad < 3) begin
        if (grp == 0) begin i_c[bad] = ~gi; csib_c[bad] = ~gcs; end
        else begin up_c[bad] = ~gup; fl_c[bad] = ~gfl; end
      end
      #1;
      checks++;
      if (csib != gcs || rdwrb != grw || icap_i != gi || fl != gfl || uv != guv || up != gup) begin
        failures++; $display("FAIL: voted value at trial %0d", t);
      end
      checks++;
      if (idis != (bad < 3 && grp == 0) || iodis != (bad < 3 && grp == 1)) begin
        failures++; $display("FAIL: disagreement flags at trial %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
