`timescale 1ns/1ps
// Receive FIFO: packs UART characters into 72-bit memory words.
//
// Characters written with wr_en (the UART's new-data strobe) are shifted into
// a packing register, first character in the low bits. When eight 9-bit
// characters (72 bits) are collected the word is pushed into a word FIFO.
// The memory-side reader sees the oldest word on rd_data (first word fall
// through) and pops it with rd_en. full is high when the packer cannot take
// another character; burst_rdy is high when at least two words, one
// four-word memory burst, are waiting; count is the number of words waiting. The 9-bit input and 72-bit output
// widths follow the block diagram; the packing order, depth and burst_rdy
// threshold are this design's choices.
module fifo_rx
  import qdr_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               wr_en,
  input  logic [CHAR_W-1:0]  wr_data,
  output logic               full,
  input  logic               rd_en,
  output logic [UDATA_W-1:0] rd_data,
  output logic               empty,
  output logic               burst_rdy,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned PW = UDATA_W - CHAR_W;   // seven characters
  logic [PW-1:0] pack;
  logic [$clog2(CHARS_PER_WORD)-1:0] nchar;
  logic push, wfull;

  // the last character of a word can only be taken when the word FIFO has room
  assign full = wfull && (nchar == $bits(nchar)'(CHARS_PER_WORD - 1));
  assign push = wr_en && !full && (nchar == $bits(nchar)'(CHARS_PER_WORD - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      pack  <= '0;
      nchar <= '0;
    end else if (wr_en && !full) begin
      pack  <= {wr_data, pack[PW-1:CHAR_W]};
      nchar <= nchar + 1'b1;
    end
  end

  sync_fifo #(.WIDTH(UDATA_W), .DEPTH(DEPTH)) u_words (
    .clk, .rst,
    .wr_en(push), .wr_data({wr_data, pack}),
    .rd_en, .rd_data,
    .full(wfull), .empty, .count
  );

  assign burst_rdy = (count >= 2);
endmodule
