`timescale 1ns/1ps
// User interface of the QDR II controller: the request and data FIFOs.
//
// All user signals are single data rate and synchronous to clk (the user
// clock). Write: user_ad_w_n low pushes user_ad_wr into the write address
// FIFO. user_d_w_n low pushes {user_bwh_n, user_bwl_n, user_dwh, user_dwl}
// (words 1 and 2 of the burst) into the write data FIFO, and the next cycle's
// values (words 3 and 4) are pushed automatically, so burst data arrives on
// two consecutive cycles without a break. user_wr_full is high when either
// write FIFO could not take one more burst. user_wr_empty is high when no
// write address is waiting. Read: user_r_n low pushes user_ad_rd into the
// read address FIFO; user_rd_full stops the user. Read data coming back from
// the physical interface (two 72-bit halves per burst) is kept in the read
// data FIFO and handed out with user_qr_valid high, one half per cycle,
// low word on user_qrl and high word on user_qrh. The controller side pops
// the request FIFOs through first-word-fall-through ports.
// Signal names and the two-cycle data burst follow the user interface timing
// diagrams; FIFO depths (one 512-deep block-RAM FIFO each) are this design's.
// DEPTH must be at least 4.
module qdr_user_if
  import qdr_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic               clk,
  input  logic               rst,
  // user write port
  input  logic               user_ad_w_n,
  input  logic [ADDR_W-1:0]  user_ad_wr,
  input  logic               user_d_w_n,
  input  logic [DATA_W-1:0]  user_dwl,
  input  logic [DATA_W-1:0]  user_dwh,
  input  logic [BW_W-1:0]    user_bwl_n,
  input  logic [BW_W-1:0]    user_bwh_n,
  output logic               user_wr_full,
  output logic               user_wr_empty,
  // user read port
  input  logic               user_r_n,
  input  logic [ADDR_W-1:0]  user_ad_rd,
  output logic               user_rd_full,
  output logic               user_qr_valid,
  output logic [DATA_W-1:0]  user_qrl,
  output logic [DATA_W-1:0]  user_qrh,
  // controller side
  input  logic               wa_rd,
  output logic [ADDR_W-1:0]  wa_addr,
  output logic               wa_empty,
  input  logic               wd_rd,
  output wr_half_t           wd_data,
  output logic [$clog2(DEPTH):0] wd_count,
  input  logic               ra_rd,
  output logic [ADDR_W-1:0]  ra_addr,
  output logic               ra_empty,
  input  logic               rd_valid,
  input  logic [UDATA_W-1:0] rd_data
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;

  logic wa_full, wd_full, ra_full, rdf_full, rdf_empty;
  logic d_second;           // second half of a write burst is due this cycle
  logic wd_push;
  wr_half_t wd_in;
  
  logic [UDATA_W-1:0] rdf_data;

  always_ff @(posedge clk) begin
    if (rst) d_second <= 1'b0;
    else     d_second <= !user_d_w_n;
  end

  assign wd_push = !user_d_w_n || d_second;
  assign wd_in   = '{bwh_n: user_bwh_n, bwl_n: user_bwl_n, dwh: user_dwh, dwl: user_dwl};

  sync_fifo #(.WIDTH(ADDR_W), .DEPTH(DEPTH)) u_wr_addr (
    .clk, .rst, .wr_en(!user_ad_w_n), .wr_data(user_ad_wr),
    .rd_en(wa_rd), .rd_data(wa_addr), .full(wa_full), .empty(wa_empty),
    .count()
  );

  sync_fifo #(.WIDTH($bits(wr_half_t)), .DEPTH(DEPTH)) u_wr_data (
    .clk, .rst, .wr_en(wd_push), .wr_data(wd_in),
    .rd_en(wd_rd), .rd_data(wd_data), .full(wd_full), .empty(),
    .count(wd_count)
  );

  sync_fifo #(.WIDTH(ADDR_W), .DEPTH(DEPTH)) u_rd_addr (
    .clk, .rst, .wr_en(!user_r_n), .wr_data(user_ad_rd),
    .rd_en(ra_rd), .rd_data(ra_addr), .full(ra_full), .empty(ra_empty),
    .count()
  );

  sync_fifo #(.WIDTH(UDATA_W), .DEPTH(DEPTH)) u_rd_data (
    .clk, .rst, .wr_en(rd_valid), .wr_data(rd_data),
    .rd_en(!rdf_empty), .rd_data(rdf_data), .full(rdf_full), .empty(rdf_empty),
    .count()
  );

  // room for one more burst: one address and two data halves (one of which
  // may still be on its way from the previous request)
  assign user_wr_full  = wa_full || wd_full || (wd_count > CW'(DEPTH - 4));
  assign user_wr_empty = wa_empty;
  // the read data FIFO is written at most once and drained once per cycle,
  // so it never holds more than one entry: only addresses can back up
  assign user_rd_full  = ra_full;

  assign user_qr_valid = !rdf_empty;
  assign user_qrl      = rdf_data[DATA_W-1:0];
  assign user_qrh      = rdf_data[UDATA_W-1:DATA_W];

  a_rdata_room: assert property (@(posedge clk) disable iff (rst) rd_valid |-> !rdf_full);
  a_burst_pair: assert property (@(posedge clk) disable iff (rst)
                                 !user_d_w_n |=> user_d_w_n);
endmodule
