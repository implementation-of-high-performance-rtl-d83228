`timescale 1ns/1ps
// Test of the UART with its FIFOs: sout is looped back to sin, a batch of
// characters larger than one FIFO is written through din/tx_wr and must come
// back in order on dout/rx_rdy; tx_rdy must drop when the transmit FIFO is
// full. A separately driven frame with a low stop bit must raise rx_err.
module tb_uart;
  localparam int unsigned DIV = 2;
  localparam int unsigned BIT = 16 * DIV;
  logic clk = 0, rst = 1;
  logic sin, rx_rd, rx_rdy, rx_err, tx_wr = 0, tx_rdy, sout;
  logic [8:0] dout, din = '0;
  logic loop = 1, drv = 1;
  int checks = 0, failures = 0;
  int n_err = 0, n_txfull = 0;
  always #5 clk = !clk;
  assign sin = loop ? sout : drv;
  uart #(.DATA_BITS(9), .FIFO_DEPTH(4)) dut (
    .clk, .rst, .baud_div(16'(DIV)), .sin, .rx_rd, .dout, .rx_rdy, .rx_err,
    .din, .tx_wr, .tx_rdy, .sout
  );

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  logic [8:0] exp [$];
  always @(posedge clk) if (!rst) begin
    if (rx_err) n_err++;
    if (!tx_rdy) n_txfull++;
  end

  // reader: pops characters as they arrive and compares
  int nrx = 0;
  always @(posedge clk) if (!rst && rx_rdy && rx_rd) begin
    checks++;
    if (exp.size() == 0 || dout != exp[0]) begin
      failures++;
      $display("ERROR: rx %h expected %h", dout, exp.size() ? exp[0] : '0);
    end
    if (exp.size()) void'(exp.pop_front());
    nrx++;
  end
  assign rx_rd = rx_rdy;

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 12; i++) begin
      logic [8:0] c;
      c = 9'($urandom);
      @(negedge clk);
      while (!tx_rdy) @(negedge clk);
      din = c; tx_wr = 1;
      exp.push_back(c);
      @(negedge clk);
      tx_wr = 0;
    end
    wait (nrx == 12);
    chk(n_txfull > 0, "tx_rdy never dropped");
    chk(n_err == 0, "unexpected rx_err");
    // framing error on a driven line
    @(negedge clk);
    loop = 0; drv = 1;
    repeat (BIT) @(posedge clk);
    drv = 0; repeat (BIT * 10) @(posedge clk);   // start + 9 zero bits
    drv = 0; repeat (BIT) @(posedge clk);        // stop bit low
    drv = 1; repeat (BIT * 3) @(posedge clk);
    chk(n_err == 1, $sformatf("rx_err count %0d after bad frame", n_err));
    chk(!rx_rdy, "bad frame was stored");
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
