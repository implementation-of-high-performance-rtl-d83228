`timescale 1ns/1ps
// Test of uart_rx: random 9-bit characters at 16 ticks per bit, a
// character with a low stop bit (frame_err), and start pulses shorter and
// longer than half a bit (the short one must be ignored).
module tb_uart_rx;
  localparam int unsigned TDIV = 3;            // clocks per tick
  localparam int unsigned BIT = 16 * TDIV;     // clocks per bit
  logic clk = 0, rst = 1, tick16, sin = 1, valid, frame_err;
  logic [8:0] data;
  int checks = 0, failures = 0;
  int tc = 0;
  always #5 clk = !clk;
  always @(posedge clk) tc <= (tc == TDIV - 1) ? 0 : tc + 1;
  assign tick16 = (tc == 0);
  uart_rx #(.DATA_BITS(9)) dut (.*);

  logic [8:0] got [$];
  logic       got_err [$];
  always @(posedge clk) if (valid && !rst) begin got.push_back(data); got_err.push_back(frame_err); end

  task automatic send(input logic [8:0] c, input logic stop);
    sin = 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 9; i++) begin sin = c[i]; repeat (BIT) @(posedge clk); end
    sin = stop; repeat (BIT) @(posedge clk);
    sin = 1; repeat (BIT) @(posedge clk);
  endtask

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  initial begin
    logic [8:0] exp [$];
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (BIT) @(posedge clk);
    // glitch of a quarter bit: ignored
    sin = 0; repeat (BIT / 4) @(posedge clk); sin = 1;
    repeat (2 * BIT) @(posedge clk);
    chk(got.size() == 0, "short start pulse produced a character");
    for (int i = 0; i < 20; i++) begin
      logic [8:0] c;
      c = 9'($urandom);
      exp.push_back(c);
      send(c, 1'b1);
    end
    send(9'h155, 1'b0);       // framing error
    repeat (2 * BIT) @(posedge clk);
    chk(got.size() == 21, $sformatf("got %0d characters", got.size()));
    for (int i = 0; i < 20 && i < got.size(); i++) begin
      chk(got[i] == exp[i], $sformatf("char %0d %h != %h", i, got[i], exp[i]));
      chk(got_err[i] == 0, "unexpected frame error");
    end
    if (got.size() == 21) chk(got_err[20] == 1, "missing frame error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
