`timescale 1ns/1ps
// Output voters of the C3 scrubber.
//
// The ICAP configuration port exists only once in the device, so the
// signals the three cores drive towards it (chip select, read/write, data)
// are majority voted here before reaching the primitive. The same is done
// for everything the cores report through their IO ports: upset reports,
// the command handshake and the status flags. Each group also has a
// disagreement flag (any copy outvoted), useful for monitoring.
// Combinational, no latency.
module c3_out_voter
  import c3_pkg::upset_t;
(
  input  logic        icap_csib_c  [3],
  input  logic        icap_rdwrb_c [3],
  input  logic [31:0] icap_i_c     [3],
  input  logic [3:0]  flags_c      [3],   // {cmd_ready, halted, running, scan_done}
  input  logic        upset_valid_c[3],
  input  upset_t      upset_c      [3],
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i,
  output logic [3:0]  flags,
  output logic        upset_valid,
  output upset_t      upset,
  output logic        icap_disagree,
  output logic        io_disagree
);
  localparam int IW = 34;
  localparam int OW = 4 + 1 + $bits(upset_t);

  logic [IW-1:0] icap_v;
  logic [OW-1:0] io_v;
  logic [2:0]    icap_m, io_m;

  tmr_voter #(.WIDTH(IW)) u_icap (
    .a({icap_csib_c[0], icap_rdwrb_c[0], icap_i_c[0]}),
    .b({icap_csib_c[1], icap_rdwrb_c[1], icap_i_c[1]}),
    .c({icap_csib_c[2], icap_rdwrb_c[2], icap_i_c[2]}),
    .y(icap_v), .mism(icap_m)
  );

  tmr_voter #(.WIDTH(OW)) u_io (
    .a({flags_c[0], upset_valid_c[0], upset_c[0]}),
    .b({flags_c[1], upset_valid_c[1], upset_c[1]}),
    .c({flags_c[2], upset_valid_c[2], upset_c[2]}),
    .y(io_v), .mism(io_m)
  );

  assign {icap_csib, icap_rdwrb, icap_i} = icap_v;
  assign {flags, upset_valid, upset}     = io_v;
  assign icap_disagree = |icap_m;
  assign io_disagree   = |io_m;
endmodule
