`timescale 1ns/1ps
// Test of fifo_rx: random 9-bit characters are written, 72-bit words read
// must hold eight consecutive characters, first one in the low bits;
// burst_rdy and count must track the number of waiting words, and full must
// hold the writer off when the word FIFO is full.
module tb_fifo_rx;
  import qdr_pkg::*;
  localparam int unsigned D = 4;
  logic clk = 0, rst = 1, wr_en = 0, full, rd_en = 0, empty, burst_rdy;
  logic [CHAR_W-1:0] wr_data = '0;
  logic [UDATA_W-1:0] rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  int n_full = 0;
  always #5 clk = !clk;
  fifo_rx #(.DEPTH(D)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  logic [CHAR_W-1:0] chars [$];
  int nwords_in = 0, nwords_out = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      chk(count == nwords_in - nwords_out, "count");
      chk(burst_rdy == (count >= 2), "burst_rdy");
      chk(empty == (count == 0), "empty");
      if (full) n_full++;
      // slow reader during the first part so the FIFO fills up
      wr_en = !full && ($urandom_range(0, 3) != 0);
      rd_en = !empty && (cyc > 1500 ? ($urandom_range(0, 1) == 0) : ($urandom_range(0, 30) == 0));
      wr_data = CHAR_W'($urandom);
      if (rd_en) begin
        logic [UDATA_W-1:0] e;
        for (int i = 0; i < CHARS_PER_WORD; i++) e[i*CHAR_W +: CHAR_W] = chars[i];
        chk(rd_data == e, $sformatf("word %0d %h != %h", nwords_out, rd_data, e));
      end
      @(posedge clk); #1;
      if (rd_en) begin
        repeat (CHARS_PER_WORD) void'(chars.pop_front());
        nwords_out++;
      end
      if (wr_en) begin
        chars.push_back(wr_data);
        if (chars.size() % CHARS_PER_WORD == 0) nwords_in++;
      end
    end
    chk(n_full > 0, "never full");
    chk(nwords_out > 100, "too few words");
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
