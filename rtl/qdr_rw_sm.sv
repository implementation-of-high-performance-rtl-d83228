`timescale 1ns/1ps
// Read/write state machine of the QDR II controller.
//
// It watches the user interface FIFOs and turns waiting requests into memory
// commands for the physical interface, one command word per clock cycle. The
// memory takes four-word bursts, and each burst occupies the shared address
// bus for one cycle and the write data bus for two, so the machine works in
// two-cycle slots:
//   slot cycle 0  a read (R# low, read address on SA) and a write (W# low)
//                 may both be issued; the second data half of the previous
//                 write (words 3 and 4) is driven;
//   slot cycle 1  the write address is on SA and words 1 and 2 are driven.
// A read and a write therefore both proceed every two cycles, which is the
// concurrent operation the memory's separate read and write ports allow.
// A write is started when its address and its first data half are in the
// FIFOs (the user interface guarantees the second half one cycle later). Nothing is issued before cal_done. The slot scheme is this design's
// reading of the burst-of-four command protocol.
module qdr_rw_sm
  import qdr_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               cal_done,
  // user interface FIFOs
  output logic               wa_rd,
  input  logic [ADDR_W-1:0]  wa_addr,
  input  logic               wa_empty,
  output logic               wd_rd,
  input  wr_half_t           wd_data,
  input  logic [$clog2(DEPTH):0] wd_count,
  output logic               ra_rd,
  input  logic [ADDR_W-1:0]  ra_addr,
  input  logic               ra_empty,
  // to the physical interface
  output phy_cmd_t           cmd
);
  typedef enum logic [1:0] {W_IDLE, W_HALF1, W_HALF2} wstate_t;

  logic slot;                  // 0: command cycle, 1: write address cycle
  wstate_t wst;                // progress of the write in flight
  logic [ADDR_W-1:0] waddr_q;
  logic do_read, do_write;
  logic [$clog2(DEPTH):0] need;

  // the first data half must be there; the user interface always pushes the
  // second half on the following cycle, in time for slot cycle 0 after it.
  // A write in its second-half cycle still holds one entry of the FIFO.
  assign need     = (wst == W_HALF2) ? 2 : 1;
  assign do_read  = cal_done && !slot && !ra_empty;
  assign do_write = cal_done && !slot && !wa_empty && (wd_count >= need);

  assign ra_rd = do_read;
  assign wa_rd = do_write;
  assign wd_rd = (wst != W_IDLE);

  always_comb begin
    cmd           = '0;
    cmd.r_n       = !do_read;
    cmd.w_n       = !do_write;
    cmd.bw_rise_n = '1;
    cmd.bw_fall_n = '1;
    cmd.sa        = do_read ? ra_addr : '0;
    if (wst == W_HALF1) cmd.sa = waddr_q;
    if (wst != W_IDLE) begin
      cmd.d_rise    = wd_data.dwl;
      cmd.d_fall    = wd_data.dwh;
      cmd.bw_rise_n = wd_data.bwl_n;
      cmd.bw_fall_n = wd_data.bwh_n;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || !cal_done) begin
      slot    <= 1'b0;
      wst     <= W_IDLE;
      waddr_q <= '0;
    end else begin
      slot <= !slot;
      unique case (wst)
        W_IDLE:  if (do_write) wst <= W_HALF1;
        W_HALF1: wst <= W_HALF2;
        W_HALF2: wst <= do_write ? W_HALF1 : W_IDLE;
        default: wst <= W_IDLE;
      endcase
      if (do_write) waddr_q <= wa_addr;
    end
  end

  // a write address cycle always falls on slot cycle 1
  a_slot: assert property (@(posedge clk) disable iff (rst) (wst == W_HALF1) |-> slot);
endmodule
