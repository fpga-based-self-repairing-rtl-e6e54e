`timescale 1ns/1ps
// Behavioural model of the ICAP port together with a small configuration
// memory of NFRAMES frames (frame address = index), for testbenches only.
// Transaction: with csib low and rdwrb low, the first word is a command
// (1 = read frame, 2 = write frame), the second the frame address; a write
// then takes FRAME_WORDS words. A read returns one word on o per cycle in
// which csib is low and rdwrb high, registered (valid the cycle after).
// writes[f] counts completed frame writes of frame f. rst returns the
// transaction state to idle (the port is not sampled while rst is high).
module icap_cfg_model #(
  parameter int FRAME_WORDS = 101,
  parameter int NFRAMES     = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        csib,
  input  logic        rdwrb,
  input  logic [31:0] i,
  output logic [31:0] o
);
  typedef enum logic [1:0] {M_IDLE, M_ADDR, M_READ, M_WRITE} mst_e;
  logic [31:0] mem    [NFRAMES][FRAME_WORDS];
  int          writes [NFRAMES];
  mst_e        st = M_IDLE;
  logic [31:0] cmd, far;
  int          ptr;

  initial begin
    o = '0;
    for (int f = 0; f < NFRAMES; f++) begin
      writes[f] = 0;
      for (int w = 0; w < FRAME_WORDS; w++) mem[f][w] = '0;
    end
  end

  always @(posedge clk) begin
    if (rst) begin
      st = M_IDLE;
    end else if (!csib && !rdwrb) begin
      case (st)
        M_IDLE: begin cmd = i; st = M_ADDR; end
        M_ADDR: begin
          far = i; ptr = 0;
          st  = (cmd == 32'd1) ? M_READ : (cmd == 32'd2) ? M_WRITE : M_IDLE;
        end
        M_WRITE: begin
          if (far < NFRAMES) mem[far][ptr] = i;
          ptr++;
          if (ptr == FRAME_WORDS) begin
            if (far < NFRAMES) writes[far]++;
            st = M_IDLE;
          end
        end
        default: ;
      endcase
    end else if (!csib && rdwrb && st == M_READ) begin
      o <= (far < NFRAMES) ? mem[far][ptr] : 32'hFFFF_FFFF;
      ptr++;
      if (ptr == FRAME_WORDS) st = M_IDLE;
    end
  end
endmodule
