`timescale 1ns/1ps
// End-to-end test of the QDR II interface system: characters sent into the
// UART are stored in the QDR II memory model, read back and must come out of
// the UART unchanged and in order.
//
// Small FIFOs (controller FIFOs 4 deep, packing FIFOs 4 words) make the
// flow-control paths happen: the write FSM's USER_WR_STOP wait on a full
// controller write FIFO, the read FSM's wait for room in the transmit FIFO,
// and READ_FINISH when the reader catches up with the writer. The test also
// sends a too-short start pulse (must be ignored) and checks calibration,
// concurrent read and write commands on the memory pins and the final state.
// Each mechanism is counted; one that never happens is a failure.
module tb_qdr_uart_system;
  import qdr_pkg::*;
  localparam realtime TCK = 5ns;           // 200 MHz user clock
  localparam int unsigned BAUD_DIV = 2;    // 32 clocks per bit
  localparam int unsigned BIT_CLKS = 16 * BAUD_DIV;
  localparam int unsigned NBURST = 8;
  localparam int unsigned NCHARS = NBURST * 2 * CHARS_PER_WORD;

  logic clk0 = 0, clk270 = 0, rst = 1;
  logic uart_rx = 1, uart_tx, rx_err, cal_done, wr_done, rd_done;
  logic qdr_k, qdr_k_n, qdr_c, qdr_c_n, qdr_dll_off_n, qdr_r_n, qdr_w_n;
  logic [ADDR_W-1:0] qdr_sa;
  logic [DATA_W-1:0] qdr_d, qdr_q;
  logic [BW_W-1:0] qdr_bw_n;
  logic cq, cq_n;

  int checks = 0, failures = 0;

  always #(TCK/2) clk0 = !clk0;
  initial begin
    #(TCK*3/4);
    forever #(TCK/2) clk270 = !clk270;
  end

  qdr_uart_system #(.MIG_DEPTH(4), .WORD_DEPTH(4)) dut (
    .clk0, .clk270, .rst, .baud_div(16'(BAUD_DIV)), .last_add(ADDR_W'(NBURST - 1)),
    .uart_rx, .uart_tx, .rx_err, .cal_done, .wr_done, .rd_done,
    .qdr_k, .qdr_k_n, .qdr_c, .qdr_c_n, .qdr_dll_off_n,
    .qdr_sa, .qdr_r_n, .qdr_w_n, .qdr_d, .qdr_bw_n, .qdr_q
  );

  qdr2_sram_model mem (
    .k(qdr_k), .sa(qdr_sa), .r_n(qdr_r_n), .w_n(qdr_w_n), .d(qdr_d),
    .bw_n(qdr_bw_n), .q(qdr_q), .cq, .cq_n
  );

  // ---------------- stimulus ----------------
  logic [CHAR_W-1:0] sent [NCHARS];

  task automatic send_char(input logic [CHAR_W-1:0] c);
    uart_rx = 1'b0;
    repeat (BIT_CLKS) @(posedge clk0);
    for (int i = 0; i < CHAR_W; i++) begin
      uart_rx = c[i];
      repeat (BIT_CLKS) @(posedge clk0);
    end
    uart_rx = 1'b1;
    repeat (BIT_CLKS) @(posedge clk0);
  endtask

  int glitches = 0;
  initial begin
    for (int i = 0; i < NCHARS; i++) sent[i] = CHAR_W'($urandom);
    repeat (10) @(posedge clk0);
    rst = 0;
    // a start pulse shorter than half a bit: must not become a character
    repeat (20) @(posedge clk0);
    uart_rx = 1'b0;
    repeat (BIT_CLKS / 4) @(posedge clk0);
    uart_rx = 1'b1;
    glitches++;
    repeat (2 * BIT_CLKS) @(posedge clk0);
    for (int i = 0; i < NCHARS; i++) begin
      send_char(sent[i]);
      // pauses make the writer wait and the reader catch up
      if (i % 40 == 39) repeat (40 * BIT_CLKS) @(posedge clk0);
    end
  end

  // ---------------- UART receiver model on uart_tx ----------------
  int nrecv = 0;
  initial begin
    logic [CHAR_W-1:0] c;
    forever begin
      @(negedge uart_tx);
      repeat (BIT_CLKS / 2) @(posedge clk0);
      if (uart_tx !== 1'b0) continue;
      for (int i = 0; i < CHAR_W; i++) begin
        repeat (BIT_CLKS) @(posedge clk0);
        c[i] = uart_tx;
      end
      repeat (BIT_CLKS) @(posedge clk0);
      checks++;
      if (uart_tx !== 1'b1) begin
        failures++;
        $display("ERROR: stop bit low on char %0d", nrecv);
      end
      checks++;
      if (nrecv >= NCHARS || c !== sent[nrecv]) begin
        failures++;
        $display("ERROR: char %0d got %h expected %h", nrecv, c,
                 nrecv < NCHARS ? sent[nrecv] : '0);
      end
      nrecv++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_cal = 0, n_concurrent = 0, n_wr_stop = 0, n_rd_wait = 0, n_rd_finish = 0;
  int n_wr_wait = 0, n_rx_err = 0;
  string ws, ws_q = "", rs, rs_q = "";
  logic cal_q = 0;
  always @(posedge clk0) if (!rst) begin
    ws = dut.u_wr_fsm.state.name();
    rs = dut.u_rd_fsm.state.name();
    if (cal_done && !cal_q) n_cal++;
    if (ws == "USER_WR_STOP" && ws_q != "USER_WR_STOP" && !wr_done) n_wr_stop++;
    if (ws == "WAIT" && (ws_q == "WRITE2" || ws_q == "USER_WR_STOP")) n_wr_wait++;
    if (rs == "WAIT" && rs_q == "READ2") n_rd_wait++;
    if (rs == "READ_FINISH" && rs_q != "READ_FINISH") n_rd_finish++;
    if (rx_err) n_rx_err++;
    ws_q = ws;
    rs_q = rs;
    cal_q = cal_done;
  end
  always @(posedge qdr_k) if (!qdr_r_n && !qdr_w_n && cal_done) n_concurrent++;

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("ERROR: mechanism never happened: %s", what);
    end else $display("  %-36s %0d", what, n);
  endtask

  initial begin
    wait (rd_done && nrecv == NCHARS);
    repeat (4 * BIT_CLKS * 12) @(posedge clk0);   // nothing extra may arrive
    checks++;
    if (nrecv != NCHARS) begin
      failures++;
      $display("ERROR: received %0d chars, expected %0d", nrecv, NCHARS);
    end
    checks++;
    if (!wr_done || mem.writes != NBURST + 1 || mem.reads < NBURST) begin
      // calibration writes its pattern once
      failures++;
      $display("ERROR: wr_done=%0d writes=%0d reads=%0d", wr_done, mem.writes, mem.reads);
    end
    checks++;
    if (n_rx_err != 0) begin
      failures++;
      $display("ERROR: %0d receive errors", n_rx_err);
    end
    $display("mechanisms:");
    need("calibration completed", n_cal);
    need("spurious start pulse sent", glitches);
    need("read and write on the same K edge", n_concurrent);
    need("write FSM USER_WR_STOP (write FIFO full)", n_wr_stop);
    need("write FSM WAIT for receive data", n_wr_wait);
    $display("  read FSM waits for transmit room    %0d", n_rd_wait);
    need("read FSM READ_FINISH (caught up)", n_rd_finish);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCHARS * 12 * BIT_CLKS * 3 + 200000) @(posedge clk0);
    failures++;
    $display("ERROR: watchdog expired, %0d of %0d chars received", nrecv, NCHARS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
