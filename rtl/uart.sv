`timescale 1ns/1ps
// UART: baud generator, receiver with receive FIFO, transmitter with
// transmit FIFO.
//
// Receive side: the receive controller samples sin at sixteen times the bit
// rate and writes each good character into the receive FIFO. dout shows the
// oldest character while rx_rdy is high; rx_rd pops it. rx_err pulses for one
// cycle when a character arrives with a low stop bit (it is dropped) or finds
// the receive FIFO full (it is lost).
// Transmit side: din is written into the transmit FIFO while tx_wr is high
// and tx_rdy (FIFO not full) is high; the transmit controller reads the FIFO
// whenever it is idle and sends the character on sout.
// The split into baud generator, two controllers and two FIFOs and the names
// DIN, DOUT, SIN, SOUT, RX_Err, RX_Rdy, TX_Rdy and BAUD follow the block
// diagram; the read and write strobes rx_rd and tx_wr, the FIFO depth and the
// 9-bit character (the width of the data path to the packing FIFO) are this
// design's choices.
module uart #(
  parameter int unsigned DATA_BITS = 9,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned DIV_W = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [DIV_W-1:0]     baud_div,
  // receiver
  input  logic                 sin,
  input  logic                 rx_rd,
  output logic [DATA_BITS-1:0] dout,
  output logic                 rx_rdy,
  output logic                 rx_err,
  // transmitter
  input  logic [DATA_BITS-1:0] din,
  input  logic                 tx_wr,
  output logic                 tx_rdy,
  output logic                 sout
);
  logic tick16;
  logic [DATA_BITS-1:0] rx_data, tx_data;
  logic rx_valid, rx_ferr, rx_full, rx_empty;
  logic tx_full, tx_empty, tx_busy, tx_start;

  uart_baud_gen #(.DIV_W(DIV_W)) u_baud (
    .clk, .rst, .baud_div, .tick16
  );

  uart_rx #(.DATA_BITS(DATA_BITS)) u_rx_ctrl (
    .clk, .rst, .tick16, .sin,
    .data(rx_data), .valid(rx_valid), .frame_err(rx_ferr)
  );

  sync_fifo #(.WIDTH(DATA_BITS), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst,
    .wr_en(rx_valid && !rx_ferr && !rx_full), .wr_data(rx_data),
    .rd_en(rx_rd && !rx_empty), .rd_data(dout),
    .full(rx_full), .empty(rx_empty), .count()
  );

  assign rx_rdy = !rx_empty;
  assign rx_err = rx_valid && (rx_ferr || rx_full);

  sync_fifo #(.WIDTH(DATA_BITS), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst,
    .wr_en(tx_wr && !tx_full), .wr_data(din),
    .rd_en(tx_start), .rd_data(tx_data),
    .full(tx_full), .empty(tx_empty), .count()
  );

  assign tx_rdy   = !tx_full;
  assign tx_start = !tx_busy && !tx_empty;

  uart_tx #(.DATA_BITS(DATA_BITS)) u_tx_ctrl (
    .clk, .rst, .tick16, .start(tx_start), .data(tx_data),
    .sout, .busy(tx_busy)
  );
endmodule
