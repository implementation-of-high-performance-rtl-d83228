`timescale 1ns/1ps
// Test of qdr_rw_sm: request queues are emulated in the testbench. The
// command stream must issue nothing before cal_done; each write must show
// W# low, then its address with words 1-2 on the next cycle, then words 3-4;
// reads must carry their addresses in order with at least one idle cycle
// between R# commands; reads and writes must share command cycles when both
// are waiting, and a write must not start before its first data half exists.
module tb_qdr_rw_sm;
  import qdr_pkg::*;
  localparam int unsigned D = 16;
  logic clk = 0, rst = 1, cal_done = 0;
  logic wa_rd, wa_empty, wd_rd, ra_rd, ra_empty;
  logic [ADDR_W-1:0] wa_addr, ra_addr;
  wr_half_t wd_data;
  logic [$clog2(D):0] wd_count;
  phy_cmd_t cmd;
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  qdr_rw_sm #(.DEPTH(D)) dut (.*);

  logic [ADDR_W-1:0] waq [$], raq [$];
  wr_half_t wdq [$];
  assign wa_empty = (waq.size() == 0);
  assign ra_empty = (raq.size() == 0);
  assign wa_addr  = wa_empty ? '0 : waq[0];
  assign ra_addr  = ra_empty ? '0 : raq[0];
  assign wd_data  = (wdq.size() == 0) ? '0 : wdq[0];
  assign wd_count = ($clog2(D)+1)'(wdq.size());

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  // expected command stream, built from what was popped
  int wstage = 0;   // 1: address cycle due, 2: second half due
  logic [ADDR_W-1:0] cur_wa;
  int last_r = -10, cyc = 0, n_conc = 0, n_w = 0, n_r = 0;
  bit second_due = 0;
  logic p_wd, p_wa, p_ra;

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (!cal_done) chk(cmd.r_n && cmd.w_n, "command before cal_done");
    // check data and address of the write in flight
    if (wstage == 1) begin
      chk(cmd.sa == cur_wa, "write address cycle");
      chk(wdq.size() > 0 && cmd.d_rise == wdq[0].dwl && cmd.d_fall == wdq[0].dwh &&
          cmd.bw_rise_n == wdq[0].bwl_n && cmd.bw_fall_n == wdq[0].bwh_n && wd_rd, "words 1-2");
      wstage = 2;
    end else if (wstage == 2) begin
      chk(wdq.size() > 0 && cmd.d_rise == wdq[0].dwl && cmd.d_fall == wdq[0].dwh && wd_rd, "words 3-4");
      wstage = 0;
    end
    if (!cmd.r_n) begin
      chk(cyc - last_r >= 2, "reads closer than two cycles");
      last_r = cyc;
      chk(raq.size() > 0 && cmd.sa == raq[0], "read address");
      n_r++;
    end
    if (!cmd.w_n) begin
      chk(wstage == 0, "write while previous write in flight");
      chk(waq.size() > 0 && wdq.size() > 0, "write without address or data");
      cur_wa = waq[0];
      wstage = 1;
      n_w++;
    end
    if (!cmd.r_n && !cmd.w_n) n_conc++;
    chk(ra_rd == !cmd.r_n && wa_rd == !cmd.w_n, "pop strobes");
    p_wd = wd_rd; p_wa = wa_rd; p_ra = ra_rd;
    #1;  // update the emulated FIFOs after the design has sampled them
    if (p_wd) void'(wdq.pop_front());
    if (p_wa) void'(waq.pop_front());
    if (p_ra) void'(raq.pop_front());
    if (second_due) begin wdq.push_back(wr_half_t'({$urandom, $urandom, $urandom})); second_due = 0; end
  end

  task automatic push_write();
    @(negedge clk);
    waq.push_back(ADDR_W'($urandom));
    wdq.push_back(wr_half_t'({$urandom, $urandom, $urandom}));
    second_due = 1;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    push_write(); push_write();
    repeat (3) raq.push_back(ADDR_W'($urandom));
    repeat (10) @(negedge clk);
    chk(n_w == 0 && n_r == 0, "issued before calibration");
    cal_done = 1;
    repeat (400) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) raq.push_back(ADDR_W'($urandom));
      if ($urandom_range(0, 4) == 0 && !second_due) push_write();
    end
    repeat (40) @(negedge clk);
    chk(waq.size() == 0 && raq.size() == 0 && wdq.size() == 0, "queues not drained");
    chk(n_conc > 0, "no concurrent read and write");
    $display("writes %0d reads %0d concurrent %0d", n_w, n_r, n_conc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
