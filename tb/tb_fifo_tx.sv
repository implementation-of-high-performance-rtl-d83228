`timescale 1ns/1ps
// Test of fifo_tx: random 72-bit words are written, the characters read out
// must be the eight 9-bit slices of each word, low slice first; free must
// equal the number of empty word slots.
module tb_fifo_tx;
  import qdr_pkg::*;
  localparam int unsigned D = 4;
  logic clk = 0, rst = 1, wr_en = 0, full, rd_en = 0, empty;
  logic [UDATA_W-1:0] wr_data = '0;
  logic [CHAR_W-1:0] rd_data;
  logic [$clog2(D):0] free;
  int checks = 0, failures = 0;
  int n_full = 0;
  always #5 clk = !clk;
  fifo_tx #(.DEPTH(D)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  logic [CHAR_W-1:0] chars [$];
  int words = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      chk(free == D - words, $sformatf("free %0d words %0d", free, words));
      chk(empty == (chars.size() == 0), "empty");
      if (full) n_full++;
      wr_en = !full && ($urandom_range(0, 5) == 0);
      rd_en = !empty && ($urandom_range(0, 2) == 0);
      wr_data = {$urandom, $urandom, $urandom};
      if (rd_en) chk(rd_data == chars[0], $sformatf("char %h != %h", rd_data, chars[0]));
      @(posedge clk); #1;
      if (rd_en) begin
        void'(chars.pop_front());
        if (chars.size() % CHARS_PER_WORD == 0) words--;
      end
      if (wr_en) begin
        for (int i = 0; i < CHARS_PER_WORD; i++) chars.push_back(wr_data[i*CHAR_W +: CHAR_W]);
        words++;
      end
    end
    chk(n_full > 0, "never full");
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
