`timescale 1ns/1ps
// Test of uart_tx: each character must appear on sout as start bit, nine
// data bits LSB first and a stop bit, each bit exactly 16 ticks long; busy
// must cover the frame.
module tb_uart_tx;
  localparam int unsigned TDIV = 2;
  localparam int unsigned BIT = 16 * TDIV;
  logic clk = 0, rst = 1, tick16, start = 0, sout, busy;
  logic [8:0] data = '0;
  int checks = 0, failures = 0;
  int tc = 0;
  always #5 clk = !clk;
  always @(posedge clk) tc <= (tc == TDIV - 1) ? 0 : tc + 1;
  assign tick16 = (tc == 0);
  realtime t_busy_fall;
  always @(negedge busy) t_busy_fall = $realtime;
  uart_tx #(.DATA_BITS(9)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    chk(sout == 1 && !busy, "idle line");
    for (int n = 0; n < 12; n++) begin
      logic [8:0] c;
      logic [10:0] frame;
      int t0, t1;
      c = 9'($urandom);
      @(negedge clk);
      data = c; start = 1;
      @(negedge clk);
      start = 0;
      data = '1;
      chk(busy, "busy after start");
      // measure the start bit length
      @(negedge sout); t0 = $time;
      // sample the middle of every bit
      #(BIT * 10 / 2);
      for (int b = 0; b < 11; b++) begin
        frame[b] = sout;
        #(BIT * 10);
      end
      chk(frame[0] == 0, "start bit");
      chk(frame[10] == 1, "stop bit");
      chk(frame[9:1] == c, $sformatf("data %h != %h", frame[9:1], c));
      t1 = int'(t_busy_fall);
      // busy ends after the stop bit: 11 bits from the start edge, within a tick
      chk(t1 - t0 >= BIT * 10 * 10 + BIT * 10 / 2 && t1 - t0 <= BIT * 10 * 11 + 30,
          $sformatf("frame length %0d", t1 - t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
