`timescale 1ns/1ps
// User write state machine: moves packed UART data from the receive FIFO
// into the memory, one four-word burst per two cycles.
//
// States BUSY, WAIT, WRITE1, WRITE2 and USER_WR_STOP.
//   BUSY          after reset; left for WAIT once calibration is done and
//                 neither user request FIFO of the controller is full. The
//                 machine also rests here for good once the burst at
//                 last_addr has been written.
//   WAIT          waits until the receive FIFO holds a whole burst (two
//                 72-bit words) and the controller's write FIFO is not full.
//   WRITE1        user_ad_w_n and user_d_w_n low: the burst address
//                 user_ad_wr and words 1-2 (USER_DWL/USER_DWH) are handed
//                 to the controller; the receive FIFO is popped.
//   WRITE2        words 3-4 are handed over, the FIFO is popped again and
//                 the address counter steps. Next: WRITE1 if another burst
//                 is waiting, USER_WR_STOP if the controller's write FIFO is
//                 full or the last address was written, else WAIT.
//   USER_WR_STOP  waits for the controller's write FIFO to drain
//                 (user_wr_empty), then carries on, or goes to BUSY once the
//                 last address was written.
// The state names, the request/data strobes and the exit conditions follow
// the state diagram of the user write FSM and the write timing diagram.
// Departures: the receive FIFO is also popped in WRITE1 (the diagram shows
// its read enable low there) because each 72-bit FIFO word is one half of a
// burst; "FIFO full" is read as "a whole burst is waiting"; the diagram's
// receive-FIFO-not-full condition for leaving BUSY is dropped, since a full
// receive FIFO could then never be emptied; WAIT also checks user_wr_full,
// which the diagram does not show there. Byte-write enables are all
// active.
module user_wr_fsm
  import qdr_pkg::*;
#(
  parameter int unsigned RXF_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               cal_done,
  // receive FIFO
  input  logic [UDATA_W-1:0] rxf_data,
  input  logic [$clog2(RXF_DEPTH):0] rxf_count,
  output logic               rxf_rd_en,
  // address counter
  input  logic [ADDR_W-1:0]  addr,
  input  logic               at_last,
  input  logic               done,
  output logic               addr_inc,
  // controller user write port
  input  logic               user_wr_full,
  input  logic               user_wr_empty,
  input  logic               user_rd_full,
  output logic               user_ad_w_n,
  output logic [ADDR_W-1:0]  user_ad_wr,
  output logic               user_d_w_n,
  output logic [DATA_W-1:0]  user_dwl,
  output logic [DATA_W-1:0]  user_dwh,
  output logic [BW_W-1:0]    user_bwl_n,
  output logic [BW_W-1:0]    user_bwh_n
);
  typedef enum logic [2:0] {BUSY, WAIT, WRITE1, WRITE2, USER_WR_STOP} wstate_t;
  wstate_t state, nstate;

  logic burst_waiting, next_burst_waiting;
  assign burst_waiting      = (rxf_count >= 2);
  assign next_burst_waiting = (rxf_count >= 3);   // one word leaves in WRITE2

  always_comb begin
    nstate = state;
    unique case (state)
      BUSY:   if (cal_done && !done && !user_wr_full && !user_rd_full) nstate = WAIT;
      WAIT:   if (burst_waiting && !user_wr_full) nstate = WRITE1;
      WRITE1: nstate = WRITE2;
      WRITE2: begin
        if (at_last || user_wr_full) nstate = USER_WR_STOP;
        else if (next_burst_waiting) nstate = WRITE1;
        else                         nstate = WAIT;
      end
      USER_WR_STOP: begin
        if (done)               nstate = BUSY;
        else if (user_wr_empty) nstate = burst_waiting ? WRITE1 : WAIT;
      end
      default: nstate = BUSY;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= BUSY;
    else     state <= nstate;
  end

  assign user_ad_w_n = (state != WRITE1);
  assign user_d_w_n  = (state != WRITE1);
  assign user_ad_wr  = addr;
  assign user_dwl    = rxf_data[DATA_W-1:0];
  assign user_dwh    = rxf_data[UDATA_W-1:DATA_W];
  assign user_bwl_n  = '0;
  assign user_bwh_n  = '0;
  assign rxf_rd_en   = (state == WRITE1) || (state == WRITE2);
  assign addr_inc    = (state == WRITE2);

  a_pop_nonempty: assert property (@(posedge clk) disable iff (rst)
                                   (state == WRITE1) |-> (rxf_count >= 2));
endmodule
