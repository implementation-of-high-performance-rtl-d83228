`timescale 1ns/1ps
// Test of user_rd_fsm with an address counter and emulated surroundings:
// a writer that advances wr_ptr, a controller that returns two halves per
// read six cycles later, and a slow transmit FIFO. Checks: no request before
// cal_done; addresses run 0, 1, 2, ... and never reach the write pointer
// until the writer is done; no request decided while the write FIFO was
// not empty;
// requests at least two cycles apart; a request only when the transmit FIFO
// has room for all outstanding data plus this burst (it never overflows);
// every burst up to last_addr is read once and the machine rests in BUSY.
module tb_user_rd_fsm;
  import qdr_pkg::*;
  localparam int unsigned D = 4;
  localparam int unsigned LAST = 9;
  logic clk = 0, rst = 1, cal_done = 0;
  logic [ADDR_W-1:0] rd_addr, wr_ptr = '0, user_ad_rd;
  logic rd_done, rd_addr_inc, user_fifo_full = 0, wr_done = 0;
  logic user_wr_empty = 1, user_rd_full = 0, user_qr_valid = 0, user_r_n;
  logic [$clog2(D):0] txf_free;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  addr_counter u_cnt (.clk, .rst, .clr(1'b0), .inc(rd_addr_inc), .last_addr(ADDR_W'(LAST)),
                      .addr(rd_addr), .at_last(), .done(rd_done));
  user_rd_fsm #(.TXF_DEPTH(D)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  int free = D, pend = 0, nreq = 0, cyc = 0, last_req = -10, n_finish = 0, n_noroom = 0;
  int ret_at [$];
  assign txf_free = ($clog2(D)+1)'(free);
  logic wr_empty_q = 1;
  always @(posedge clk) wr_empty_q <= user_wr_empty;

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (!user_r_n) begin
      chk(cal_done, "request before cal_done");
      chk(user_ad_rd == ADDR_W'(nreq), $sformatf("address %0d expected %0d", user_ad_rd, nreq));
      chk(wr_done || user_ad_rd != wr_ptr, "read of an unwritten burst");
      chk(wr_empty_q, "read decided while writes were pending");
      chk(cyc - last_req >= 2, "requests too close");
      chk(free >= pend + 2, "no room reserved");
      last_req = cyc;
      nreq++;
      pend += 2;
      ret_at.push_back(cyc + 6);
      ret_at.push_back(cyc + 7);
    end
    if (dut.state.name() == "READ_FINISH" && !rd_done) n_finish++;
    if (dut.state.name() == "WAIT" && !rd_done && wr_ptr != rd_addr && free < pend + 2) n_noroom++;
    if (user_qr_valid) begin
      chk(free > 0, "transmit FIFO overflow");
      free--; pend--;
    end
    #1;
    user_qr_valid = (ret_at.size() > 0 && ret_at[0] == cyc + 1);
    if (user_qr_valid) void'(ret_at.pop_front());
    // slow consumer
    if (free < D && $urandom_range(0, 15) == 0) free++;
  end

  // writer emulation: a new burst becomes ready, the reader is triggered
  task automatic write_burst();
    user_fifo_full = 1;
    @(negedge clk);
    user_fifo_full = 0; user_wr_empty = 0;
    @(negedge clk);
    if (wr_ptr == ADDR_W'(LAST)) wr_done = 1; else wr_ptr++;
    repeat (2) @(negedge clk);
    user_wr_empty = 1;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) write_burst();
    repeat (10) @(negedge clk);
    chk(nreq == 0, "read before calibration");
    cal_done = 1;
    for (int i = 2; i <= LAST; i++) begin
      repeat ($urandom_range(5, 60)) @(negedge clk);
      write_burst();
    end
    wait (rd_done);
    repeat (40) @(negedge clk);
    chk(nreq == LAST + 1, $sformatf("reads %0d expected %0d", nreq, LAST + 1));
    chk(dut.state.name() == "BUSY", "not resting in BUSY");
    chk(n_finish > 0, "READ_FINISH never used");
    chk(n_noroom > 0, "never waited for transmit room");
    $display("reads %0d, READ_FINISH cycles %0d, no-room cycles %0d", nreq, n_finish, n_noroom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
