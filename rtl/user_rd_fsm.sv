`timescale 1ns/1ps
// User read state machine: reads back written bursts and routes their data
// to the transmit FIFO.
//
// States BUSY, WAIT, READ1, READ2 and READ_FINISH.
//   BUSY         after reset; left for WAIT once calibration is done and the
//                controller's read address FIFO is not full. Rests here for
//                good once the burst at last_addr has been read.
//   WAIT         waits for the trigger: the receive FIFO holds a whole burst
//                (user_fifo_full, the same event that starts the write FSM),
//                or all writes are done. The read is then issued in the same
//                cycle as the writer's request, so the controller executes
//                the read of an older burst and the write of the new one
//                concurrently.
//   READ1        user_r_n low with the burst address on user_ad_rd; the read
//                address counter steps.
//   READ2        gap cycle (the controller takes one read per two cycles).
//                Next: READ1 while older written bursts are still unread,
//                READ_FINISH once the read address has caught up with the
//                write pointer.
//   READ_FINISH  waits for the next trigger as in WAIT; BUSY once the last
//                address was read.
// A burst counts as written when the write pointer has passed it and the
// controller's write FIFO is empty (user_wr_empty), so a read never
// overtakes its own write. The reader thus trails the writer by one burst
// while data streams in, and reads the rest once the writer is done.
// Room in the transmit FIFO is reserved per request: pend counts the 72-bit
// halves requested but not yet returned, and a read is only issued when the
// FIFO has at least pend + 2 free words, because returned data cannot be
// held back; lacking room the machine waits in WAIT.
// The state names, the read strobe, the FIFO-full trigger and the compare of
// the read address with the write pointer follow the state diagram of the
// user read FSM and the read timing diagram; the one-burst lag and the
// credit scheme are this design's.
module user_rd_fsm
  import qdr_pkg::*;
#(
  parameter int unsigned TXF_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               cal_done,
  // read address counter
  input  logic [ADDR_W-1:0]  rd_addr,
  input  logic               rd_done,
  output logic               rd_addr_inc,
  // receive FIFO holds a whole burst
  input  logic               user_fifo_full,
  // write address counter (write pointer)
  input  logic [ADDR_W-1:0]  wr_ptr,
  input  logic               wr_done,
  // controller
  input  logic               user_wr_empty,
  input  logic               user_rd_full,
  input  logic               user_qr_valid,
  output logic               user_r_n,
  output logic [ADDR_W-1:0]  user_ad_rd,
  // transmit FIFO
  input  logic [$clog2(TXF_DEPTH):0] txf_free
);
  typedef enum logic [2:0] {BUSY, WAIT, READ1, READ2, READ_FINISH} rstate_t;
  rstate_t state, nstate;

  localparam int unsigned PW = $clog2(TXF_DEPTH) + 2;
  logic [PW-1:0] pend;
  logic avail, room, go;

  assign avail = !rd_done && user_wr_empty && ((rd_addr != wr_ptr) || wr_done);
  assign room  = !user_rd_full && (PW'(txf_free) >= pend + PW'(2));
  assign go    = avail && room && (user_fifo_full || wr_done);

  always_comb begin
    nstate = state;
    unique case (state)
      BUSY:        if (cal_done && !rd_done && !user_rd_full) nstate = WAIT;
      WAIT:        if (rd_done) nstate = BUSY;
                   else if (go) nstate = READ1;
      READ1:       nstate = READ2;
      READ2: begin
        if (rd_done)            nstate = BUSY;
        else if (avail && room) nstate = READ1;
        else if (!avail)        nstate = READ_FINISH;
        else                    nstate = WAIT;
      end
      READ_FINISH: begin
        if (rd_done) nstate = BUSY;
        else if (go) nstate = READ1;
      end
      default: nstate = BUSY;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= BUSY;
      pend  <= '0;
    end else begin
      state <= nstate;
      pend  <= pend + ((state == READ1) ? PW'(2) : PW'(0)) - PW'(user_qr_valid);
    end
  end

  assign user_r_n    = (state != READ1);
  assign user_ad_rd  = rd_addr;
  assign rd_addr_inc = (state == READ1);
endmodule
