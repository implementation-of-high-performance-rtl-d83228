`timescale 1ns/1ps
// QDR II SRAM interface system: a UART-fed store-and-read-back path through
// a QDR II memory controller.
//
// Characters arriving on uart_rx are collected by the UART, packed eight at a
// time into 72-bit words by the receive FIFO, and written to the QDR II
// memory in four-word bursts at burst addresses 0, 1, 2, ... up to last_add
// by the user write state machine. The user read state machine follows the
// write pointer one burst behind: whenever a new burst is ready to be
// written it reads the previous one in the same controller slot, and once
// the writer is done it reads the rest. The returned words are unpacked by the transmit FIFO and sent out on
// uart_tx. The whole character stream thus comes back on uart_tx after
// passing through the external memory, which exercises every part of the
// controller: calibration, concurrent reads and writes, and the full and
// empty handshakes. Once the burst at last_add has been written and read,
// both state machines rest until reset (wr_done, rd_done).
//
// Clocks: clk0 is the system clock of all logic; clk270 is clk0 delayed by
// three quarters of a period and only times the memory output pins. The
// QDR II pins connect straight to a CY7C1315BV18-type 512K x 36 burst-of-4
// device (C/C# and DOFF# are driven high; the echo clocks CQ/CQ# are not
// used). baud_div sets the UART bit rate to f(clk0) / (16 * baud_div).
// The block structure (UART, receive and transmit FIFOs, FSM, address
// counter, controller, memory) and the 9/72/36/17-bit bus widths follow the
// system block diagram; the read-back policy and last_add are this design's.
module qdr_uart_system
  import qdr_pkg::*;
#(
  parameter int unsigned MIG_DEPTH  = 512,
  parameter int unsigned WORD_DEPTH = 16,
  parameter int unsigned UART_DEPTH = 16,
  parameter int unsigned MAX_LAT    = 16,
  parameter int unsigned INIT_WAIT  = 16
) (
  input  logic               clk0,
  input  logic               clk270,
  input  logic               rst,
  input  logic [15:0]        baud_div,
  input  logic [ADDR_W-1:0]  last_add,
  input  logic               uart_rx,
  output logic               uart_tx,
  output logic               rx_err,
  output logic               cal_done,
  output logic               wr_done,
  output logic               rd_done,
  // QDR II memory pins
  output logic               qdr_k,
  output logic               qdr_k_n,
  output logic               qdr_c,
  output logic               qdr_c_n,
  output logic               qdr_dll_off_n,
  output logic [ADDR_W-1:0]  qdr_sa,
  output logic               qdr_r_n,
  output logic               qdr_w_n,
  output logic [DATA_W-1:0]  qdr_d,
  output logic [BW_W-1:0]    qdr_bw_n,
  input  logic [DATA_W-1:0]  qdr_q
);
  // UART <-> packing FIFOs
  logic [CHAR_W-1:0] rx_char, tx_char;
  logic rx_rdy, tx_rdy, rxf_full, txf_empty, move_rx, move_tx;
  // receive FIFO <-> write FSM
  logic [UDATA_W-1:0] rxf_data;
  logic [$clog2(WORD_DEPTH):0] rxf_count, txf_free;
  logic rxf_rd_en, rxf_burst_rdy, txf_full;
  // address counters
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic wr_inc, wr_last, rd_inc;
  // controller user interface
  logic user_ad_w_n, user_d_w_n, user_wr_full, user_wr_empty;
  logic user_r_n, user_rd_full, user_qr_valid;
  logic [ADDR_W-1:0] user_ad_wr, user_ad_rd;
  logic [DATA_W-1:0] user_dwl, user_dwh, user_qrl, user_qrh;
  logic [BW_W-1:0] user_bwl_n, user_bwh_n;

  uart #(.DATA_BITS(CHAR_W), .FIFO_DEPTH(UART_DEPTH)) u_uart (
    .clk(clk0), .rst, .baud_div,
    .sin(uart_rx), .rx_rd(move_rx), .dout(rx_char), .rx_rdy, .rx_err,
    .din(tx_char), .tx_wr(move_tx), .tx_rdy, .sout(uart_tx)
  );

  assign move_rx = rx_rdy && !rxf_full;
  assign move_tx = tx_rdy && !txf_empty;

  fifo_rx #(.DEPTH(WORD_DEPTH)) u_fifo_rx (
    .clk(clk0), .rst, .wr_en(move_rx), .wr_data(rx_char), .full(rxf_full),
    .rd_en(rxf_rd_en), .rd_data(rxf_data), .empty(),
    .burst_rdy(rxf_burst_rdy), .count(rxf_count)
  );

  fifo_tx #(.DEPTH(WORD_DEPTH)) u_fifo_tx (
    .clk(clk0), .rst, .wr_en(user_qr_valid), .wr_data({user_qrh, user_qrl}),
    .full(txf_full), .free(txf_free),
    .rd_en(move_tx), .rd_data(tx_char), .empty(txf_empty)
  );

  addr_counter u_wr_cnt (
    .clk(clk0), .rst, .clr(1'b0), .inc(wr_inc), .last_addr(last_add),
    .addr(wr_addr), .at_last(wr_last), .done(wr_done)
  );

  addr_counter u_rd_cnt (
    .clk(clk0), .rst, .clr(1'b0), .inc(rd_inc), .last_addr(last_add),
    .addr(rd_addr), .at_last(), .done(rd_done)
  );

  user_wr_fsm #(.RXF_DEPTH(WORD_DEPTH)) u_wr_fsm (
    .clk(clk0), .rst, .cal_done,
    .rxf_data, .rxf_count, .rxf_rd_en,
    .addr(wr_addr), .at_last(wr_last), .done(wr_done), .addr_inc(wr_inc),
    .user_wr_full, .user_wr_empty, .user_rd_full,
    .user_ad_w_n, .user_ad_wr, .user_d_w_n, .user_dwl, .user_dwh,
    .user_bwl_n, .user_bwh_n
  );

  user_rd_fsm #(.TXF_DEPTH(WORD_DEPTH)) u_rd_fsm (
    .clk(clk0), .rst, .cal_done,
    .rd_addr, .rd_done, .rd_addr_inc(rd_inc),
    .user_fifo_full(rxf_burst_rdy), .wr_ptr(wr_addr), .wr_done,
    .user_wr_empty, .user_rd_full, .user_qr_valid,
    .user_r_n, .user_ad_rd, .txf_free
  );

  qdr_mig #(.DEPTH(MIG_DEPTH), .MAX_LAT(MAX_LAT), .INIT_WAIT(INIT_WAIT)) u_mig (
    .clk0, .clk270, .rst, .cal_done,
    .user_ad_w_n, .user_ad_wr, .user_d_w_n, .user_dwl, .user_dwh,
    .user_bwl_n, .user_bwh_n, .user_wr_full, .user_wr_empty,
    .user_r_n, .user_ad_rd, .user_rd_full, .user_qr_valid, .user_qrl, .user_qrh,
    .qdr_k, .qdr_k_n, .qdr_c, .qdr_c_n, .qdr_dll_off_n,
    .qdr_sa, .qdr_r_n, .qdr_w_n, .qdr_d, .qdr_bw_n, .qdr_q
  );

  a_txf_room: assert property (@(posedge clk0) disable iff (rst) user_qr_valid |-> !txf_full);
endmodule
