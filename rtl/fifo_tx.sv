`timescale 1ns/1ps
// Transmit FIFO: unpacks 72-bit memory words into UART characters.
//
// Words written with wr_en (the read-data valid strobe of the memory
// controller) enter a word FIFO; it must not be written when full, and the
// writer can use free (number of empty word slots) to reserve room before it
// asks the memory for data. The character side sees the next 9-bit character
// on rd_data while empty is low and pops it with rd_en; characters leave
// low bits first, eight per word, so a word goes out in the order fifo_rx
// packed it. Widths follow the block diagram; order and depth are this
// design's choices.
module fifo_tx
  import qdr_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               wr_en,
  input  logic [UDATA_W-1:0] wr_data,
  output logic               full,
  output logic [$clog2(DEPTH):0] free,
  input  logic               rd_en,
  output logic [CHAR_W-1:0]  rd_data,
  output logic               empty
);
  logic [UDATA_W-1:0] word;
  logic [$clog2(CHARS_PER_WORD)-1:0] nchar;
  logic wempty, pop;
  logic [$clog2(DEPTH):0] count;

  sync_fifo #(.WIDTH(UDATA_W), .DEPTH(DEPTH)) u_words (
    .clk, .rst,
    .wr_en, .wr_data,
    .rd_en(pop), .rd_data(word),
    .full, .empty(wempty), .count
  );

  assign free    = ($clog2(DEPTH)+1)'(DEPTH) - count;
  assign empty   = wempty;
  assign rd_data = word[nchar*CHAR_W +: CHAR_W];
  assign pop     = rd_en && !wempty && (nchar == $bits(nchar)'(CHARS_PER_WORD - 1));

  always_ff @(posedge clk) begin
    if (rst) nchar <= '0;
    else if (rd_en && !wempty) nchar <= nchar + 1'b1;
  end
endmodule
