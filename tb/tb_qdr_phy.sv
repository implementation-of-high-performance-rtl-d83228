`timescale 1ns/1ps
// Test of qdr_phy. Commands are driven directly. Checks on the pins: a
// command of cycle c is seen by the memory at the rising K edge two cycles
// later; write words 1-4 are on D at the K, K#, K, K# edges after that
// (sampled at those edges); C, C#, DOFF# are high; K/K# follow clk0. Read
// side, with the SRAM model and latency 5 / phase 1 set: rd_valid is high
// for exactly two cycles, 5 and 6 cycles after the read command, carrying
// words {2,1} and {4,3} of the burst written before.
module tb_qdr_phy;
  import qdr_pkg::*;
  localparam realtime TCK = 5ns;
  logic clk0 = 0, clk270 = 0, rst = 1;
  phy_cmd_t cmd;
  logic [3:0] rd_lat = 4'd5;
  logic rd_phase = 1;
  logic [UDATA_W-1:0] p0, p1, rd_data;
  logic rd_valid, k, kn, c, cn, doff, r_n, w_n, cq, cqn;
  logic [ADDR_W-1:0] sa;
  logic [DATA_W-1:0] d, q;
  logic [BW_W-1:0] bw_n;
  int checks = 0, failures = 0;
  always #(TCK/2) clk0 = !clk0;
  initial begin #(TCK*3/4); forever #(TCK/2) clk270 = !clk270; end

  qdr_phy #(.MAX_LAT(16)) dut (
    .clk0, .clk270, .rst, .cmd, .rd_lat, .rd_phase,
    .cal_pair0(p0), .cal_pair1(p1), .rd_valid, .rd_data,
    .qdr_k(k), .qdr_k_n(kn), .qdr_c(c), .qdr_c_n(cn), .qdr_dll_off_n(doff),
    .qdr_sa(sa), .qdr_r_n(r_n), .qdr_w_n(w_n), .qdr_d(d), .qdr_bw_n(bw_n), .qdr_q(q)
  );
  qdr2_sram_model mem (.k, .sa, .r_n, .w_n, .d, .bw_n, .q, .cq, .cq_n(cqn));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  function automatic phy_cmd_t idle();
    phy_cmd_t x = '0;
    x.r_n = 1; x.w_n = 1; x.bw_rise_n = '1; x.bw_fall_n = '1;
    return x;
  endfunction

  logic [DATA_W-1:0] w [4];
  logic [ADDR_W-1:0] a;
  int cyc = 0;
  always @(posedge clk0) cyc++;

  // pin sampler: what the memory sees on each K / K# rising edge
  logic [DATA_W-1:0] seen_d [$];
  logic [ADDR_W-1:0] seen_sa_w [$];
  int seen_w_cyc = -1, seen_r_cyc = -1;
  always @(posedge k) begin
    if (!w_n) seen_w_cyc = cyc;
    if (!r_n) seen_r_cyc = cyc;
  end

  int v_cycles [$];
  always @(posedge clk0) if (!rst && rd_valid) begin
    v_cycles.push_back(cyc);
  end

  initial begin
    int c0, cr;
    cmd = idle();
    for (int i = 0; i < 4; i++) w[i] = {$urandom, $urandom};
    a = ADDR_W'($urandom);
    repeat (4) @(negedge clk0);
    rst = 0;
    repeat (2) @(negedge clk0);
    chk(c && cn && doff, "C, C#, DOFF# high");
    chk(k == clk0 && kn == !clk0, "K follows clk0");
    // write burst: W#, then address + words 1-2, then words 3-4
    c0 = cyc;
    cmd.w_n = 0;
    @(negedge clk0);
    cmd = idle(); cmd.sa = a; cmd.d_rise = w[0]; cmd.d_fall = w[1]; cmd.bw_rise_n = 0; cmd.bw_fall_n = 0;
    @(negedge clk0);
    cmd = idle(); cmd.d_rise = w[2]; cmd.d_fall = w[3]; cmd.bw_rise_n = 0; cmd.bw_fall_n = 0;
    // sample D at the four edges that latch it
    fork
      begin
        @(posedge k);                         // K edge of the address cycle
        chk(sa == a, "write address at K");
        chk(d == w[0] && bw_n == 0, "word 1 at K");
        @(negedge k); chk(d == w[1], "word 2 at K#");
        @(posedge k); chk(d == w[2], "word 3 at K");
        @(negedge k); chk(d == w[3], "word 4 at K#");
      end
    join_none
    @(negedge clk0);
    cmd = idle();
    repeat (4) @(negedge clk0);
    chk(seen_w_cyc == c0 + 2, $sformatf("W# seen at cycle %0d, command at %0d", seen_w_cyc, c0));
    // read it back
    cr = cyc;
    cmd.r_n = 0; cmd.sa = a;
    @(negedge clk0);
    cmd = idle();
    repeat (12) @(negedge clk0);
    chk(seen_r_cyc == cr + 2, "R# two cycles after the command");
    chk(v_cycles.size() == 2, $sformatf("rd_valid cycles %0d", v_cycles.size()));
    if (v_cycles.size() == 2)
      chk(v_cycles[0] == cr + 6 && v_cycles[1] == cr + 7,
          $sformatf("rd_valid at %0d,%0d for command at %0d", v_cycles[0], v_cycles[1], cr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data check at the valid cycles
  int nv = 0;
  always @(posedge clk0) if (!rst && rd_valid) begin
    checks++;
    if (rd_data != (nv == 0 ? {w[1], w[0]} : {w[3], w[2]})) begin
      failures++;
      $display("ERROR: read pair %0d = %h", nv, rd_data);
    end
    nv++;
  end

  initial begin
    repeat (2000) @(posedge clk0);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
