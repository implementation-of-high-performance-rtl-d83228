`timescale 1ns/1ps
// Self-checking test of sync_fifo: random pushes and pops against a queue
// reference, full/empty/count flags at every cycle, fill to full and drain.
module tb_sync_fifo;
  localparam int unsigned W = 12, D = 8;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_q [$];
  int n_full = 0;

  always #5 clk = !clk;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      chk(empty == (ref_q.size() == 0), "empty flag");
      chk(full == (ref_q.size() == D), "full flag");
      chk(count == ref_q.size(), "count");
      if (!empty) chk(rd_data == ref_q[0], "head data");
      if (full) n_full++;
      // phases: fill, drain, random
      if (cyc < 20)       begin wr_en = !full; rd_en = 0; end
      else if (cyc < 40)  begin wr_en = 0; rd_en = !empty; end
      else begin
        wr_en = !full && ($urandom_range(0, 2) != 0);
        rd_en = !empty && ($urandom_range(0, 2) != 0);
      end
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(ref_q.pop_front());
      if (wr_en) ref_q.push_back(wr_data);
    end
    chk(n_full > 0, "FIFO was never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
