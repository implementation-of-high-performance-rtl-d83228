`timescale 1ns/1ps
// Test of the QDR II controller (qdr_mig) against the QDR II SRAM model.
//
// After calibration, write bursts are requested with the user protocol
// (user_ad_w_n/user_d_w_n low with address and words 1-2, words 3-4 on the
// next cycle), some with byte lanes masked; read requests follow at one per
// cycle, faster than the controller's one per two cycles, so user_rd_full
// must rise. Reads and writes are mixed so that both are issued on the same
// K edge. Every read burst must return the expected four words (reference
// memory with byte masking) as two user_qr_valid cycles, in request order.
// The latency of an isolated read is checked against the pipeline depth.
// Writes queued during calibration fill the small write FIFO, so
// user_wr_full must rise and the writes must be held until cal_done.
module tb_qdr_mig;
  import qdr_pkg::*;
  localparam realtime TCK = 5ns;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned NB = 24;

  logic clk0 = 0, clk270 = 0, rst = 1, cal_done;
  logic user_ad_w_n = 1, user_d_w_n = 1, user_r_n = 1;
  logic [ADDR_W-1:0] user_ad_wr = '0, user_ad_rd = '0;
  logic [DATA_W-1:0] user_dwl = '0, user_dwh = '0, user_qrl, user_qrh;
  logic [BW_W-1:0] user_bwl_n = '0, user_bwh_n = '0;
  logic user_wr_full, user_wr_empty, user_rd_full, user_qr_valid;
  logic qdr_k, qdr_k_n, qdr_c, qdr_c_n, qdr_dll_off_n, qdr_r_n, qdr_w_n, cq, cq_n;
  logic [ADDR_W-1:0] qdr_sa;
  logic [DATA_W-1:0] qdr_d, qdr_q;
  logic [BW_W-1:0] qdr_bw_n;
  int checks = 0, failures = 0;

  always #(TCK/2) clk0 = !clk0;
  initial begin #(TCK*3/4); forever #(TCK/2) clk270 = !clk270; end

  qdr_mig #(.DEPTH(DEPTH)) dut (.*);
  qdr2_sram_model mem (.k(qdr_k), .sa(qdr_sa), .r_n(qdr_r_n), .w_n(qdr_w_n),
                       .d(qdr_d), .bw_n(qdr_bw_n), .q(qdr_q), .cq, .cq_n);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  // reference memory: 4 words per burst address
  logic [DATA_W-1:0] refm [logic [ADDR_W+1:0]];
  function automatic logic [DATA_W-1:0] rget(input logic [ADDR_W-1:0] a, input int w);
    return refm.exists({a, 2'(w)}) ? refm[{a, 2'(w)}] : '0;
  endfunction
  function automatic void rput(input logic [ADDR_W-1:0] a, input int w,
                               input logic [DATA_W-1:0] v, input logic [3:0] be_n);
    logic [DATA_W-1:0] o = rget(a, w);
    for (int b = 0; b < 4; b++) if (!be_n[b]) o[9*b +: 9] = v[9*b +: 9];
    refm[{a, 2'(w)}] = o;
  endfunction

  // expected read data, one entry per 72-bit half
  logic [UDATA_W-1:0] exp_q [$];

  task automatic do_write(input logic [ADDR_W-1:0] a, input bit mask);
    logic [DATA_W-1:0] w [4];
    logic [3:0] bn [4];
    for (int i = 0; i < 4; i++) begin
      w[i] = {$urandom, $urandom};
      bn[i] = mask ? 4'($urandom) : 4'b0;
      rput(a, i, w[i], bn[i]);
    end
    user_ad_w_n = 0; user_d_w_n = 0; user_ad_wr = a;
    user_dwl = w[0]; user_dwh = w[1]; user_bwl_n = bn[0]; user_bwh_n = bn[1];
    @(negedge clk0);
    user_ad_w_n = 1; user_d_w_n = 1; user_ad_wr = 'x;
    user_dwl = w[2]; user_dwh = w[3]; user_bwl_n = bn[2]; user_bwh_n = bn[3];
    @(negedge clk0);
  endtask

  task automatic do_read(input logic [ADDR_W-1:0] a);
    user_r_n = 0; user_ad_rd = a;
    exp_q.push_back({rget(a, 1), rget(a, 0)});
    exp_q.push_back({rget(a, 3), rget(a, 2)});
    @(negedge clk0);
    user_r_n = 1;
  endtask

  // returned data
  int nret = 0;
  always @(posedge clk0) if (!rst && user_qr_valid) begin
    checks++;
    if (exp_q.size() == 0 || {user_qrh, user_qrl} != exp_q[0]) begin
      failures++;
      $display("ERROR: read half %0d got %h expected %h", nret, {user_qrh, user_qrl},
               exp_q.size() ? exp_q[0] : '0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
    nret++;
  end

  int n_wr_full = 0, n_rd_full = 0, n_conc = 0;
  always @(posedge clk0) if (!rst) begin
    if (user_wr_full) n_wr_full++;
    if (user_rd_full) n_rd_full++;
  end
  always @(posedge qdr_k) if (cal_done && !qdr_r_n && !qdr_w_n) n_conc++;

  initial begin
    int t0, lat, npre = 0;
    repeat (5) @(negedge clk0);
    rst = 0;
    // 0: writes queued while calibrating are held until cal_done
    while (!user_wr_full && !cal_done) begin
      do_write(ADDR_W'(500 + npre), 1);
      npre++;
    end
    chk(!cal_done && npre > 0, "calibration ended before the write FIFO filled");
    wait (cal_done);
    $display("calibrated: latency %0d phase %0d", dut.rd_lat, dut.rd_phase);
    @(negedge clk0);
    // 1: a row of writes, some masked, pushed as fast as allowed
    for (int i = 0; i < NB; i++) begin
      while (user_wr_full) @(negedge clk0);
      do_write(ADDR_W'(i), i % 3 == 2);
    end
    wait (user_wr_empty);
    repeat (4) @(negedge clk0);
    // 2: isolated read, measure latency
    t0 = $time;
    do_read(ADDR_W'(0));
    wait (user_qr_valid);
    lat = int'(($time - t0) / TCK);
    $display("isolated read latency %0d cycles", lat);
    chk(lat >= 6 && lat <= 9, $sformatf("read latency %0d", lat));
    repeat (4) @(negedge clk0);
    // 3: reads every cycle (rd FIFO fills) mixed with new writes elsewhere
    fork
      for (int i = 0; i < NB; i++) begin
        while (user_rd_full) @(negedge clk0);
        do_read(ADDR_W'(i));
      end
      for (int i = 0; i < NB; i++) begin
        while (user_wr_full) @(negedge clk0);
        do_write(ADDR_W'(1000 + i), 0);
      end
    join
    wait (user_wr_empty);
    repeat (4) @(negedge clk0);
    // 4: read the new writes back and overwrite with masks in between
    for (int i = 0; i < NB; i++) begin
      while (user_rd_full) @(negedge clk0);
      do_read(ADDR_W'(1000 + i));
    end
    for (int i = 0; i < npre; i++) begin
      while (user_rd_full) @(negedge clk0);
      do_read(ADDR_W'(500 + i));
    end
    wait (exp_q.size() == 0);
    repeat (20) @(negedge clk0);
    chk(nret == 2 * (2 * NB + 1 + npre), $sformatf("returned halves %0d", nret));
    chk(n_wr_full > 0, "user_wr_full never rose");
    chk(n_rd_full > 0, "user_rd_full never rose");
    chk(n_conc > 0, "no read and write on the same K edge");
    $display("wr_full %0d rd_full %0d concurrent %0d", n_wr_full, n_rd_full, n_conc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk0);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
