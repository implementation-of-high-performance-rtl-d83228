`timescale 1ns/1ps
// Test of qdr_user_if: write bursts entered with the user protocol must
// appear on the controller side as one address and two data halves (words
// 1-2 then 3-4), read addresses in order, and returned read data must come
// out on user_qrl/user_qrh with user_qr_valid one cycle after rd_valid.
// Full and empty flags are checked with a small depth.
module tb_qdr_user_if;
  import qdr_pkg::*;
  localparam int unsigned D = 4;
  logic clk = 0, rst = 1;
  logic user_ad_w_n = 1, user_d_w_n = 1, user_r_n = 1;
  logic [ADDR_W-1:0] user_ad_wr = '0, user_ad_rd = '0, wa_addr, ra_addr;
  logic [DATA_W-1:0] user_dwl = '0, user_dwh = '0, user_qrl, user_qrh;
  logic [BW_W-1:0] user_bwl_n = '0, user_bwh_n = '0;
  logic user_wr_full, user_wr_empty, user_rd_full, user_qr_valid;
  logic wa_rd = 0, wa_empty, wd_rd = 0, ra_rd = 0, ra_empty, rd_valid = 0;
  wr_half_t wd_data;
  logic [$clog2(D):0] wd_count;
  logic [UDATA_W-1:0] rd_data = '0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  qdr_user_if #(.DEPTH(D)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  initial begin
    logic [ADDR_W-1:0] a [2];
    wr_half_t h [4];
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(user_wr_empty && !user_wr_full && !user_rd_full && !user_qr_valid, "reset flags");
    // two write bursts
    for (int b = 0; b < 2; b++) begin
      a[b] = ADDR_W'($urandom);
      for (int i = 0; i < 2; i++)
        h[2*b+i] = '{bwh_n: 4'($urandom), bwl_n: 4'($urandom),
                     dwh: {$urandom, $urandom}, dwl: {$urandom, $urandom}};
      user_ad_w_n = 0; user_d_w_n = 0; user_ad_wr = a[b];
      {user_bwh_n, user_bwl_n, user_dwh, user_dwl} = h[2*b];
      @(negedge clk);
      user_ad_w_n = 1; user_d_w_n = 1;
      {user_bwh_n, user_bwl_n, user_dwh, user_dwl} = h[2*b+1];
      @(negedge clk);
    end
    chk(!user_wr_empty, "write FIFO empty after writes");
    chk(wd_count == 4, $sformatf("wd_count %0d", wd_count));
    chk(user_wr_full, "user_wr_full with depth 4 and 4 halves");
    for (int b = 0; b < 2; b++) begin
      chk(wa_addr == a[b], "write address");
      wa_rd = 1;
      for (int i = 0; i < 2; i++) begin
        chk(wd_data == h[2*b+i], $sformatf("write half %0d", 2*b+i));
        wd_rd = 1;
        @(negedge clk);
        wa_rd = 0;
      end
      wd_rd = 0;
    end
    chk(user_wr_empty && wd_count == 0, "write FIFOs drained");
    // reads until full
    for (int i = 0; i < D; i++) begin
      chk(!user_rd_full, "rd full too early");
      user_r_n = 0; user_ad_rd = ADDR_W'(i * 7);
      @(negedge clk);
    end
    user_r_n = 1;
    chk(user_rd_full, "user_rd_full not set");
    for (int i = 0; i < D; i++) begin
      chk(!ra_empty && ra_addr == ADDR_W'(i * 7), "read address order");
      ra_rd = 1; @(negedge clk);
    end
    ra_rd = 0;
    chk(ra_empty, "read address FIFO empty");
    // read data return
    for (int i = 0; i < 4; i++) begin
      logic [UDATA_W-1:0] v;
      v = {$urandom, $urandom, $urandom};
      rd_valid = 1; rd_data = v;
      @(negedge clk);
      rd_valid = 0;
      chk(user_qr_valid && {user_qrh, user_qrl} == v, "read data out");
      @(negedge clk);
      chk(!user_qr_valid, "qr_valid held too long");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
