`timescale 1ns/1ps
// Test of addr_counter: stepping from 0 to last_addr, at_last and done,
// no movement after done, clr restarts.
module tb_addr_counter;
  import qdr_pkg::*;
  logic clk = 0, rst = 1, clr = 0, inc = 0, at_last, done;
  logic [ADDR_W-1:0] last_addr = ADDR_W'(9), addr;
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  addr_counter dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  initial begin
    int exp_addr = 0;
    bit exp_done = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      chk(addr == ADDR_W'(exp_addr), $sformatf("addr %0d exp %0d", addr, exp_addr));
      chk(done == exp_done, "done");
      chk(at_last == (exp_addr == int'(last_addr)), "at_last");
      inc = ($urandom_range(0, 1) == 0);
      clr = (cyc == 150);
      if (cyc == 150) last_addr = ADDR_W'(3);
      @(posedge clk); #1;
      if (clr) begin exp_addr = 0; exp_done = 0; end
      else if (inc && !exp_done) begin
        if (exp_addr == int'(last_addr)) exp_done = 1;
        else exp_addr++;
      end
    end
    chk(exp_done, "run never completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
