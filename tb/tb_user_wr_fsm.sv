`timescale 1ns/1ps
// Test of user_wr_fsm with an address counter and an emulated receive FIFO.
// Checks: no request before cal_done; each burst request has user_ad_w_n and
// user_d_w_n low for one cycle with the next burst address and the FIFO head
// on USER_DWL/USER_DWH, then the following FIFO word on the next cycle; the
// words reach the controller in FIFO order; bursts follow each other every
// two cycles when data waits; no request while user_wr_full holds the
// machine in USER_WR_STOP until user_wr_empty; writing stops after last_addr.
module tb_user_wr_fsm;
  import qdr_pkg::*;
  localparam int unsigned D = 16;
  localparam int unsigned LAST = 11;
  logic clk = 0, rst = 1, cal_done = 0;
  logic [UDATA_W-1:0] rxf_data;
  logic [$clog2(D):0] rxf_count;
  logic rxf_rd_en, at_last, done, addr_inc;
  logic [ADDR_W-1:0] addr, user_ad_wr;
  logic user_wr_full = 0, user_wr_empty = 1, user_rd_full = 0;
  logic user_ad_w_n, user_d_w_n;
  logic [DATA_W-1:0] user_dwl, user_dwh;
  logic [BW_W-1:0] user_bwl_n, user_bwh_n;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  addr_counter u_cnt (.clk, .rst, .clr(1'b0), .inc(addr_inc), .last_addr(ADDR_W'(LAST)),
                      .addr, .at_last, .done);
  user_wr_fsm #(.RXF_DEPTH(D)) dut (.*);

  logic [UDATA_W-1:0] q [$];
  assign rxf_count = ($clog2(D)+1)'(q.size());
  assign rxf_data  = q.size() ? q[0] : '0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  logic [UDATA_W-1:0] sent [$];
  int nburst = 0, last_req = -100, cyc = 0, n_b2b = 0, n_stop = 0;
  bit second = 0, p_pop;
  logic [UDATA_W-1:0] exp_word;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (!cal_done) chk(user_ad_w_n && user_d_w_n, "request before cal_done");
    if (second) begin
      chk(user_d_w_n && user_ad_w_n, "strobes held for two cycles");
      chk({user_dwh, user_dwl} == exp_word, "words 3-4");
      chk(rxf_rd_en, "second word not popped");
      void'(sent.pop_front());
      second = 0;
    end else if (!user_ad_w_n) begin
      chk(!user_d_w_n, "data strobe with address strobe");
      chk(user_ad_wr == ADDR_W'(nburst), $sformatf("address %0d expected %0d", user_ad_wr, nburst));
      chk(sent.size() >= 2 && {user_dwh, user_dwl} == sent[0], "words 1-2");
      chk(rxf_rd_en, "first word not popped");
      chk(user_bwl_n == 0 && user_bwh_n == 0, "byte enables");
      chk(!blocked, "request before the write FIFO was empty");
      if (sent.size() >= 2) exp_word = sent[1];
      void'(sent.pop_front());
      if (cyc - last_req == 2) n_b2b++;
      last_req = cyc;
      nburst++;
      second = 1;
    end else chk(!rxf_rd_en, "pop without request");
    if (dut.state.name() == "USER_WR_STOP" && !done) n_stop++;
    p_pop = rxf_rd_en;
    #1;
    if (p_pop) void'(q.pop_front());
  end
  // USER_WR_STOP with the write FIFO not yet empty blocks the next request
  logic blocked = 0;
  always @(posedge clk) blocked <= (dut.state.name() == "USER_WR_STOP") && !user_wr_empty;

  task automatic push_word();
    logic [UDATA_W-1:0] v;
    v = {$urandom, $urandom, $urandom};
    q.push_back(v);
    sent.push_back(v);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (8) push_word();
    repeat (10) @(negedge clk);
    chk(nburst == 0, "wrote before calibration");
    cal_done = 1;
    repeat (12) @(negedge clk);
    chk(nburst == 4, $sformatf("burst count %0d after 8 words", nburst));
    // full during a burst: writer must stop, and resume only after empty
    user_wr_empty = 0;
    repeat (6) push_word();
    wait (!user_ad_w_n);
    @(negedge clk);
    user_wr_full = 1;
    repeat (10) @(negedge clk);
    chk(nburst == 5, "wrote while full");
    user_wr_full = 0;
    repeat (5) @(negedge clk);
    chk(nburst == 5, "wrote before the write FIFO was empty");
    user_wr_empty = 1;
    repeat (10) @(negedge clk);
    chk(nburst == 7, $sformatf("burst count %0d after resume", nburst));
    // slow trickle, then more than needed
    repeat (40) begin
      if ($urandom_range(0, 2) == 0) push_word();
      @(negedge clk);
    end
    repeat (20) push_word();
    repeat (60) @(negedge clk);
    chk(nburst == LAST + 1, $sformatf("bursts %0d, expected %0d", nburst, LAST + 1));
    chk(done && dut.state.name() == "BUSY", "not resting in BUSY after last address");
    chk(n_b2b > 0, "no back-to-back bursts");
    chk(n_stop > 0, "USER_WR_STOP never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
