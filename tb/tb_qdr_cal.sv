`timescale 1ns/1ps
// Test of qdr_cal with the physical interface and the SRAM model, in three
// set-ups run side by side: memory output delay 0.45 ns and 3.0 ns, which
// move the returned words by one clock edge, and a memory that never
// answers. The first two must calibrate (latency 5, phase 1 and latency 5,
// phase 0, worked out from the pipeline: two cycles to the pins, 1.5 cycles
// of memory latency, capture registers) within a bounded number of cycles;
// the third must keep retrying and never raise cal_done.
module tb_qdr_cal;
  import qdr_pkg::*;
  localparam realtime TCK = 5ns;
  logic clk0 = 0, clk270 = 0, rst = 1;
  int checks = 0, failures = 0;
  always #(TCK/2) clk0 = !clk0;
  initial begin #(TCK*3/4); forever #(TCK/2) clk270 = !clk270; end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", msg); end
  endtask

  logic [2:0] done;
  logic [3:0] lat [3];
  logic [2:0] phase;
  int wr_cnt [3];

  for (genvar g = 0; g < 3; g++) begin : g_set
    phy_cmd_t cmd;
    logic [UDATA_W-1:0] p0, p1, rdd;
    logic rdv, k, kn, c, cn, doff, r_n, w_n, cq, cqn;
    logic [ADDR_W-1:0] sa;
    logic [DATA_W-1:0] d, q, qm;
    logic [BW_W-1:0] bw_n;
    qdr_cal #(.MAX_LAT(16), .INIT_WAIT(16)) u_cal (
      .clk(clk0), .rst, .cmd, .pair0(p0), .pair1(p1),
      .rd_lat(lat[g]), .rd_phase(phase[g]), .cal_done(done[g])
    );
    qdr_phy #(.MAX_LAT(16)) u_phy (
      .clk0, .clk270, .rst, .cmd, .rd_lat(lat[g]), .rd_phase(phase[g]),
      .cal_pair0(p0), .cal_pair1(p1), .rd_valid(rdv), .rd_data(rdd),
      .qdr_k(k), .qdr_k_n(kn), .qdr_c(c), .qdr_c_n(cn), .qdr_dll_off_n(doff),
      .qdr_sa(sa), .qdr_r_n(r_n), .qdr_w_n(w_n), .qdr_d(d), .qdr_bw_n(bw_n), .qdr_q(q)
    );
    qdr2_sram_model #(.TCO(g == 1 ? 3.0ns : 0.45ns)) u_mem (
      .k, .sa, .r_n, .w_n, .d, .bw_n, .q(qm), .cq, .cq_n(cqn)
    );
    assign q = (g == 2) ? '0 : qm;
    always @(posedge clk0) if (!rst && !w_n) wr_cnt[g]++;
  end

  initial begin
    int t;
    wr_cnt = '{0, 0, 0};
    repeat (4) @(negedge clk0);
    rst = 0;
    t = 0;
    while (!(done[0] && done[1]) && t < 500) begin @(negedge clk0); t++; end
    $display("calibrated after %0d cycles: (%0d,%0d) (%0d,%0d)", t, lat[0], phase[0], lat[1], phase[1]);
    chk(done[0] && done[1], "calibration did not finish");
    chk(lat[0] == 5 && phase[0] == 1, "set-up 0 latency/phase");
    chk(lat[1] == 5 && phase[1] == 0, "set-up 1 latency/phase");
    chk(t < 120, "calibration too slow");
    repeat (300) @(negedge clk0);
    chk(!done[2], "calibrated without a memory");
    chk(wr_cnt[2] > 3, "no retries without a memory");
    chk(wr_cnt[0] == 1 && wr_cnt[1] == 1, "training pattern written more than once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk0);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
