`timescale 1ns/1ps
// Synchronous first-word-fall-through FIFO.
//
// A memory array with read and write pointers one bit wider than the
// address, so full and empty are told apart by the extra bit. The word at the
// head is visible on rd_data whenever empty is low; rd_en pops it. A write
// while full and a read while empty are ignored (and flagged by assertions).
// wr_en and rd_en may both be high in one cycle. count gives the fill level.
//
// The interface FIFOs of the memory controller play the part of block-RAM
// FIFO primitives; the default 512 deep matches one such primitive used
// 36 bits wide. The depth is this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 512   // must be a power of two
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;
  logic do_wr, do_rd;

  assign count = wptr - rptr;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (wptr == rptr);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) wr_en |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) rd_en |-> !empty);
endmodule
