`timescale 1ns/1ps
// Scrubbing controller of one C3 core.
//
// The frames used by the protected circuit exist in three copies in the
// configuration memory; unused frames must stay all-zero. A frame list in
// Data RAM (from LIST_BASE, four bytes per entry, least significant byte
// first) holds nred triplets of redundant frame addresses followed by nempty
// empty-frame addresses. One scan visits every list position in turn:
//   * triplet: read the three copies through ICAP into Data RAM areas 0..2,
//     vote them byte by byte into the vote area, report every wrong bit,
//     then write the voted frame back over each copy that had errors;
//   * empty frame: read it into area 0, report every set bit and, if there
//     were any, write an all-zero frame over it.
// If one copy of a frame holds more than HALT_THR wrong bits the controller
// halts (this is a failing ICAP, not an upset) and stays halted until a
// reset from outside. Host commands are accepted only in the IDLE state
// between two list positions, so a command never interrupts a frame.
// After rstscans complete scans the controller raises reset_req and waits
// for the core reset; settings live in the scratchpad, so after the reset it
// reloads them and resumes scanning.
//
// In the original system this function is software on an 8-bit soft
// processor; here it is a hardware state machine with the same data layout.
// The ICAP transaction used here is: command word, frame address, then
// FRAME_WORDS data words, one word per request, each read word appearing on
// icap_o one cycle after the request. Data RAM and scratchpad have a one
// cycle read latency. upset_valid pulses once per reported bit.
//
// Besides the one-step toggle (O), the step-by-step commands F (select a
// frame), R (read it into Data RAM area 0), T (flip one bit there) and W
// (write area 0 back to the selected frame) are provided, without the text
// printouts of the original. Area 0 is also the scan's buffer, so the host
// pauses the scan before using them.
module c3_scrub_engine
  import c3_pkg::cmd_op_e, c3_pkg::upset_t, c3_pkg::ICAP_CMD_READ, c3_pkg::ICAP_CMD_WRITE,
         c3_pkg::SP_NRED, c3_pkg::SP_NEMPTY, c3_pkg::SP_RSTSCAN, c3_pkg::SP_FLAGS,
         c3_pkg::CMD_SET_NRED, c3_pkg::CMD_SET_NEMPTY, c3_pkg::CMD_SET_RSTSCANS, c3_pkg::CMD_SET_LIST,
         c3_pkg::CMD_TOGGLE, c3_pkg::CMD_VOTE, c3_pkg::CMD_STOP, c3_pkg::CMD_PAUSE, c3_pkg::CMD_CONTINUE,
         c3_pkg::CMD_SET_FAR, c3_pkg::CMD_READ, c3_pkg::CMD_FLIP, c3_pkg::CMD_WRITE;
#(
  parameter int FRAME_WORDS = c3_pkg::FRAME_WORDS,
  parameter int HALT_THR    = c3_pkg::HALT_THRESHOLD,
  parameter int LIST_BASE   = c3_pkg::LIST_BASE
) (
  input  logic        clk,
  input  logic        rst,
  // host commands
  input  logic        cmd_valid,
  input  cmd_op_e     cmd_op,
  input  logic [31:0] cmd_arg,
  input  logic [15:0] cmd_idx,
  output logic        cmd_ready,
  // ICAP
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i,
  input  logic [31:0] icap_o,
  // Data RAM port A
  output logic [11:0] dram_addr,
  output logic        dram_we,
  output logic [7:0]  dram_din,
  input  logic [7:0]  dram_dout,
  // scratchpad port A
  output logic [6:0]  spad_addr,
  output logic        spad_we,
  output logic [7:0]  spad_din,
  input  logic [7:0]  spad_dout,
  // status and reports
  input  logic [31:0] unixtime,
  output logic        upset_valid,
  output upset_t      upset,
  output logic        halted,
  output logic        running,
  output logic        scan_done,
  output logic        reset_req
);
  localparam int FB   = FRAME_WORDS * 4;   // bytes per frame
  localparam int VOTE = 3 * FB;            // vote area base

  typedef enum logic [4:0] {
    S_CFG_ISSUE, S_CFG_CAP, S_IDLE, S_SPAD_WR, S_LIST_WR,
    S_JOB, S_FAR_ISSUE, S_FAR_CAP, S_AFTER_FAR, S_AFTER_READ,
    S_RD_CMD, S_RD_FAR, S_RD_REQ, S_RD_CAP, S_RD_WB,
    S_V_ISSUE, S_V_CAP, S_V_EVAL, S_V_REPORT, S_V_DONE,
    S_WB, S_WB_NEXT,
    S_WR_CMD, S_WR_FAR, S_WR_ISSUE, S_WR_CAP, S_WR_WORD,
    S_TGL_ISSUE, S_TGL_CAP, S_JOB_DONE, S_HALT, S_WAIT_RST
  } state_e;

  state_e      st, ret;
  logic [7:0]  nred, nempty, rstscans, scans;
  logic [9:0]  ptr;                 // list position of the current job
  logic        empty_mode, tgl_mode, zero_src;
  logic [1:0]  cp;                  // copy being handled
  logic [1:0]  bidx;
  logic [6:0]  widx;
  logic [8:0]  vidx;
  logic [4:0]  ridx;
  logic [31:0] far_r [3];
  logic [31:0] sel_far;   // frame selected by F
  logic        tgl_only;  // T: flip in Data RAM without writing the frame
  logic [31:0] wfar, wbuf;
  logic [11:0] src_base;
  logic [7:0]  vb [3];
  logic [7:0]  dv [3];
  logic [7:0]  vy;
  logic [11:0] errc [3];
  logic [11:0] tgl_byte;
  logic [2:0]  tgl_bit;
  logic [3:0]  spad_wa;
  logic [7:0]  spad_wd;
  logic [15:0] list_idx;
  logic [31:0] list_val;

  // combinational view of the vote of the byte just read
  logic [7:0] y_c;
  logic [7:0] d_c [3];
  always_comb begin
    y_c = empty_mode ? 8'h00 : ((vb[0] & vb[1]) | (vb[1] & vb[2]) | (vb[0] & vb[2]));
    for (int i = 0; i < 3; i++) d_c[i] = (empty_mode && i != 0) ? 8'h00 : (vb[i] ^ y_c);
  end

  function automatic logic [11:0] popc8(input logic [7:0] v);
    logic [11:0] n;
    n = '0;
    for (int i = 0; i < 8; i++) n = n + 12'(v[i]);
    return n;
  endfunction

  function automatic logic [11:0] area(input logic [1:0] c);
    return 12'(int'(c) * FB);
  endfunction

  // list entry of the current job, copy cp
  logic [9:0] lidx;
  always_comb begin
    if (ptr < 10'(nred)) lidx = 10'(ptr * 3 + 10'(cp));
    else                 lidx = 10'(ptr + 10'(nred) * 2);  // 3*nred + (ptr - nred)
  end

  // ---------------- outputs driven from the state ----------------
  always_comb begin
    icap_csib  = 1'b1;
    icap_rdwrb = 1'b0;
    icap_i     = '0;
    dram_addr  = '0;
    dram_we    = 1'b0;
    dram_din   = '0;
    spad_addr  = '0;
    spad_we    = 1'b0;
    spad_din   = '0;
    cmd_ready  = (st == S_IDLE);
    unique case (st)
      S_CFG_ISSUE: spad_addr = 7'(ridx);
      S_SPAD_WR: begin spad_addr = 7'(spad_wa); spad_we = 1'b1; spad_din = spad_wd; end
      S_LIST_WR: begin
        dram_addr = 12'(LIST_BASE + int'(list_idx) * 4 + int'(bidx));
        dram_we   = 1'b1;
        dram_din  = list_val[8*bidx +: 8];
      end
      S_FAR_ISSUE: dram_addr = 12'(LIST_BASE + int'(lidx) * 4 + int'(bidx));
      S_RD_CMD: begin icap_csib = 1'b0; icap_i = ICAP_CMD_READ; end
      S_RD_FAR: begin icap_csib = 1'b0; icap_i = far_r[cp]; end
      S_RD_REQ: begin icap_csib = 1'b0; icap_rdwrb = 1'b1; end
      S_RD_WB: begin
        dram_addr = area(cp) + 12'(widx) * 12'd4 + 12'(bidx);
        dram_we   = 1'b1;
        dram_din  = wbuf[8*bidx +: 8];
      end
      S_V_ISSUE: dram_addr = area(cp) + 12'(vidx);
      S_V_EVAL: begin
        dram_addr = 12'(VOTE) + 12'(vidx);
        dram_we   = 1'b1;
        dram_din  = y_c;
      end
      S_WR_CMD:   begin icap_csib = 1'b0; icap_i = ICAP_CMD_WRITE; end
      S_WR_FAR:   begin icap_csib = 1'b0; icap_i = wfar; end
      S_WR_ISSUE: dram_addr = src_base + 12'(widx) * 12'd4 + 12'(bidx);
      S_WR_WORD:  begin icap_csib = 1'b0; icap_i = wbuf; end
      S_TGL_ISSUE: dram_addr = tgl_byte;
      S_TGL_CAP: begin
        dram_addr = tgl_byte;
        dram_we   = 1'b1;
        dram_din  = dram_dout ^ (8'h01 << tgl_bit);
      end
      default: ;
    endcase
  end

  assign halted    = (st == S_HALT);
  assign reset_req = (st == S_WAIT_RST);

  // ---------------- state machine ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= S_CFG_ISSUE;
      ret         <= S_IDLE;
      nred        <= '0;
      nempty      <= '0;
      rstscans    <= '0;
      scans       <= '0;
      running     <= 1'b0;
      ptr         <= '0;
      empty_mode  <= 1'b0;
      tgl_mode    <= 1'b0;
      tgl_only    <= 1'b0;
      sel_far     <= '0;
      zero_src    <= 1'b0;
      cp          <= '0;
      bidx        <= '0;
      widx        <= '0;
      vidx        <= '0;
      ridx        <= '0;
      upset_valid <= 1'b0;
      upset       <= '0;
      scan_done   <= 1'b0;
      wbuf        <= '0;
      wfar        <= '0;
      src_base    <= '0;
      tgl_byte    <= '0;
      tgl_bit     <= '0;
      spad_wa     <= '0;
      spad_wd     <= '0;
      list_idx    <= '0;
      list_val    <= '0;
      for (int i = 0; i < 3; i++) begin
        far_r[i] <= '0;
        vb[i]    <= '0;
        dv[i]    <= '0;
        errc[i]  <= '0;
      end
      vy <= '0;
    end else begin
      upset_valid <= 1'b0;
      scan_done   <= 1'b0;
      unique case (st)
        // reload the settings kept in the scratchpad
        S_CFG_ISSUE: st <= S_CFG_CAP;
        S_CFG_CAP: begin
          unique case (ridx)
            5'(SP_NRED):    nred     <= spad_dout;
            5'(SP_NEMPTY):  nempty   <= spad_dout;
            5'(SP_RSTSCAN): rstscans <= spad_dout;
            default:        running  <= spad_dout[0];
          endcase
          if (ridx == 5'(SP_FLAGS)) begin
            ridx <= '0;
            st   <= S_IDLE;
          end else begin
            ridx <= ridx + 1'b1;
            st   <= S_CFG_ISSUE;
          end
        end

        S_IDLE: begin
          if (cmd_valid) begin
            unique case (cmd_op)
              CMD_SET_NRED: begin
                nred <= cmd_arg[7:0]; ptr <= '0;
                spad_wa <= 4'(SP_NRED); spad_wd <= cmd_arg[7:0]; st <= S_SPAD_WR;
              end
              CMD_SET_NEMPTY: begin
                nempty <= cmd_arg[7:0]; ptr <= '0;
                spad_wa <= 4'(SP_NEMPTY); spad_wd <= cmd_arg[7:0]; st <= S_SPAD_WR;
              end
              CMD_SET_RSTSCANS: begin
                rstscans <= cmd_arg[7:0]; scans <= '0;
                spad_wa <= 4'(SP_RSTSCAN); spad_wd <= cmd_arg[7:0]; st <= S_SPAD_WR;
              end
              CMD_SET_LIST: begin
                list_idx <= cmd_idx; list_val <= cmd_arg; bidx <= '0; st <= S_LIST_WR;
              end
              CMD_TOGGLE: begin
                far_r[0] <= cmd_arg;
                tgl_byte <= 12'(cmd_idx[11:5]) * 12'd4 + 12'(cmd_idx[4:3]);
                tgl_bit  <= cmd_idx[2:0];
                tgl_mode <= 1'b1;
                cp       <= '0;
                ret      <= S_TGL_ISSUE;
                st       <= S_RD_CMD;
              end
              CMD_SET_FAR: sel_far <= cmd_arg;
              CMD_READ: begin
                far_r[0] <= sel_far;
                tgl_mode <= 1'b1;
                cp       <= '0;
                ret      <= S_JOB_DONE;
                st       <= S_RD_CMD;
              end
              CMD_FLIP: begin
                tgl_byte <= 12'(cmd_idx[11:5]) * 12'd4 + 12'(cmd_idx[4:3]);
                tgl_bit  <= cmd_idx[2:0];
                tgl_mode <= 1'b1;
                tgl_only <= 1'b1;
                st       <= S_TGL_ISSUE;
              end
              CMD_WRITE: begin
                wfar     <= sel_far;
                zero_src <= 1'b0;
                src_base <= '0;
                tgl_mode <= 1'b1;
                ret      <= S_JOB_DONE;
                st       <= S_WR_CMD;
              end
              CMD_VOTE, CMD_CONTINUE: begin
                if (cmd_op == CMD_VOTE) ptr <= '0;
                running <= 1'b1;
                spad_wa <= 4'(SP_FLAGS); spad_wd <= 8'h01; st <= S_SPAD_WR;
              end
              CMD_STOP, CMD_PAUSE: begin
                if (cmd_op == CMD_STOP) ptr <= '0;
                running <= 1'b0;
                spad_wa <= 4'(SP_FLAGS); spad_wd <= 8'h00; st <= S_SPAD_WR;
              end
              default: ;
            endcase
          end else if (running && (nred != 0 || nempty != 0)) begin
            st <= S_JOB;
          end
        end

        S_SPAD_WR: st <= S_IDLE;
        S_LIST_WR: begin
          bidx <= bidx + 1'b1;
          if (bidx == 2'd3) st <= S_IDLE;
        end

        // one list position: a triplet or an empty frame
        S_JOB: begin
          empty_mode <= (ptr >= 10'(nred));
          cp         <= '0;
          bidx       <= '0;
          st         <= S_FAR_ISSUE;
        end
        S_FAR_ISSUE: st <= S_FAR_CAP;
        S_FAR_CAP: begin
          far_r[cp][8*bidx +: 8] <= dram_dout;
          bidx <= bidx + 1'b1;
          st   <= (bidx == 2'd3) ? S_AFTER_FAR : S_FAR_ISSUE;
        end
        S_AFTER_FAR: begin ret <= S_AFTER_READ; st <= S_RD_CMD; end
        S_AFTER_READ: begin
          if (empty_mode || cp == 2'd2) begin
            cp   <= '0;
            vidx <= '0;
            for (int i = 0; i < 3; i++) errc[i] <= '0;
            st   <= S_V_ISSUE;
          end else begin
            cp   <= cp + 1'b1;
            bidx <= '0;
            st   <= S_FAR_ISSUE;
          end
        end

        // frame read: ICAP -> Data RAM area cp
        S_RD_CMD: st <= S_RD_FAR;
        S_RD_FAR: begin widx <= '0; st <= S_RD_REQ; end
        S_RD_REQ: st <= S_RD_CAP;
        S_RD_CAP: begin wbuf <= icap_o; bidx <= '0; st <= S_RD_WB; end
        S_RD_WB: begin
          bidx <= bidx + 1'b1;
          if (bidx == 2'd3) begin
            if (widx == 7'(FRAME_WORDS - 1)) st <= ret;
            else begin widx <= widx + 1'b1; st <= S_RD_REQ; end
          end
        end

        // vote the copies byte by byte
        S_V_ISSUE: st <= S_V_CAP;
        S_V_CAP: begin
          vb[cp] <= dram_dout;
          if (empty_mode || cp == 2'd2) st <= S_V_EVAL;
          else begin cp <= cp + 1'b1; st <= S_V_ISSUE; end
        end
        S_V_EVAL: begin
          vy <= y_c;
          for (int i = 0; i < 3; i++) begin
            dv[i]   <= d_c[i];
            errc[i] <= errc[i] + popc8(d_c[i]);
          end
          ridx <= '0;
          st   <= (d_c[0] != 0 || d_c[1] != 0 || d_c[2] != 0) ? S_V_REPORT : S_V_DONE;
        end
        S_V_REPORT: begin
          if (dv[ridx[4:3]][ridx[2:0]]) begin
            upset_valid     <= 1'b1;
            upset.frame_addr      <= far_r[ridx[4:3]];
            upset.word      <= 7'(vidx >> 2);
            upset.bitpos    <= {vidx[1:0], ridx[2:0]};
            upset.polarity  <= ~vy[ridx[2:0]];
            upset.time_s    <= unixtime;
          end
          if (ridx == 5'd23) st <= S_V_DONE;
          else ridx <= ridx + 1'b1;
        end
        S_V_DONE: begin
          if (vidx == 9'(FB - 1)) begin
            if (errc[0] > 12'(HALT_THR) || errc[1] > 12'(HALT_THR) || errc[2] > 12'(HALT_THR)) begin
              running <= 1'b0;
              st      <= S_HALT;
            end else begin
              cp <= '0;
              st <= S_WB;
            end
          end else begin
            vidx <= vidx + 1'b1;
            cp   <= '0;
            st   <= S_V_ISSUE;
          end
        end

        // write back every copy that had errors
        S_WB: begin
          if (errc[cp] != 0) begin
            wfar     <= far_r[cp];
            zero_src <= empty_mode;
            src_base <= 12'(VOTE);
            ret      <= S_WB_NEXT;
            st       <= S_WR_CMD;
          end else begin
            st <= S_WB_NEXT;
          end
        end
        S_WB_NEXT: begin
          if (empty_mode || cp == 2'd2) st <= S_JOB_DONE;
          else begin cp <= cp + 1'b1; st <= S_WB; end
        end

        // frame write: Data RAM (or zeros) -> ICAP
        S_WR_CMD: st <= S_WR_FAR;
        S_WR_FAR: begin widx <= '0; bidx <= '0; st <= S_WR_ISSUE; end
        S_WR_ISSUE: st <= S_WR_CAP;
        S_WR_CAP: begin
          wbuf[8*bidx +: 8] <= zero_src ? 8'h00 : dram_dout;
          bidx <= bidx + 1'b1;
          st   <= (bidx == 2'd3) ? S_WR_WORD : S_WR_ISSUE;
        end
        S_WR_WORD: begin
          if (widx == 7'(FRAME_WORDS - 1)) st <= ret;
          else begin widx <= widx + 1'b1; bidx <= '0; st <= S_WR_ISSUE; end
        end

        // fault injection: flip one bit of the frame held in area 0
        S_TGL_ISSUE: st <= S_TGL_CAP;
        S_TGL_CAP: begin
          tgl_only <= 1'b0;
          wfar     <= far_r[0];
          zero_src <= 1'b0;
          src_base <= '0;
          ret      <= S_JOB_DONE;
          st       <= tgl_only ? S_JOB_DONE : S_WR_CMD;
        end

        S_JOB_DONE: begin
          if (tgl_mode) begin
            tgl_mode <= 1'b0;
            st       <= S_IDLE;
          end else if (ptr + 1'b1 >= 10'(nred) + 10'(nempty)) begin
            ptr       <= '0;
            scan_done <= 1'b1;
            if (rstscans != 0 && scans + 1'b1 == rstscans) begin
              scans <= '0;
              st    <= S_WAIT_RST;
            end else begin
              scans <= scans + 1'b1;
              st    <= S_IDLE;
            end
          end else begin
            ptr <= ptr + 1'b1;
            st  <= S_IDLE;
          end
        end

        S_HALT:     st <= S_HALT;      // needs reconfiguration / external reset
        S_WAIT_RST: st <= S_WAIT_RST;  // core reset comes from the reset controller
        default:    st <= S_IDLE;
      endcase
    end
  end

  // The frame list must fit between LIST_BASE and the end of the Data RAM.
  localparam int LIST_ENTRIES = (4096 - LIST_BASE) / 4;
  a_list_fits: assert property (@(posedge clk) disable iff (rst)
    (st == S_JOB) |-> (3 * int'(nred) + int'(nempty) <= LIST_ENTRIES))
    else $error("frame list longer than %0d entries", LIST_ENTRIES);
endmodule
