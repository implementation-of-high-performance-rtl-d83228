`timescale 1ns/1ps
// QDR II SRAM controller: user interface, read/write state machine, delay
// calibration state machine and physical interface.
//
// After reset the calibration machine owns the memory bus, writes and reads
// a training pattern and fixes the read latency and capture phase; then it
// raises cal_done and the read/write state machine takes over, serving the
// user's request FIFOs. The user side is single data rate on clk0 (see
// qdr_user_if for its protocol); the memory side is the QDR II pin set with
// double data rate write and read data (see qdr_phy). clk270 must be clk0
// delayed by three quarters of a period; both come from the clock generator.
// Read data reaches the user about ten cycles after the request (FIFO, two
// cycles to the memory pins, the memory's read latency and capture).
// The partition into these four parts follows the text; how they talk to
// each other is this design's choice.
module qdr_mig
  import qdr_pkg::*;
#(
  parameter int unsigned DEPTH   = 512,
  parameter int unsigned MAX_LAT = 16,
  parameter int unsigned INIT_WAIT = 16
) (
  input  logic               clk0,
  input  logic               clk270,
  input  logic               rst,
  output logic               cal_done,
  // user write port
  input  logic               user_ad_w_n,
  input  logic [ADDR_W-1:0]  user_ad_wr,
  input  logic               user_d_w_n,
  input  logic [DATA_W-1:0]  user_dwl,
  input  logic [DATA_W-1:0]  user_dwh,
  input  logic [BW_W-1:0]    user_bwl_n,
  input  logic [BW_W-1:0]    user_bwh_n,
  output logic               user_wr_full,
  output logic               user_wr_empty,
  // user read port
  input  logic               user_r_n,
  input  logic [ADDR_W-1:0]  user_ad_rd,
  output logic               user_rd_full,
  output logic               user_qr_valid,
  output logic [DATA_W-1:0]  user_qrl,
  output logic [DATA_W-1:0]  user_qrh,
  // memory pins
  output logic               qdr_k,
  output logic               qdr_k_n,
  output logic               qdr_c,
  output logic               qdr_c_n,
  output logic               qdr_dll_off_n,
  output logic [ADDR_W-1:0]  qdr_sa,
  output logic               qdr_r_n,
  output logic               qdr_w_n,
  output logic [DATA_W-1:0]  qdr_d,
  output logic [BW_W-1:0]    qdr_bw_n,
  input  logic [DATA_W-1:0]  qdr_q
);
  logic wa_rd, wa_empty, wd_rd, ra_rd, ra_empty;
  logic [ADDR_W-1:0] wa_addr, ra_addr;
  wr_half_t wd_data;
  logic [$clog2(DEPTH):0] wd_count;
  logic phy_rd_valid;
  logic [UDATA_W-1:0] phy_rd_data, pair0, pair1;
  phy_cmd_t rw_cmd, cal_cmd, cmd;
  logic [$clog2(MAX_LAT)-1:0] rd_lat;
  logic rd_phase;

  qdr_user_if #(.DEPTH(DEPTH)) u_user_if (
    .clk(clk0), .rst,
    .user_ad_w_n, .user_ad_wr, .user_d_w_n, .user_dwl, .user_dwh,
    .user_bwl_n, .user_bwh_n, .user_wr_full, .user_wr_empty,
    .user_r_n, .user_ad_rd, .user_rd_full, .user_qr_valid, .user_qrl, .user_qrh,
    .wa_rd, .wa_addr, .wa_empty, .wd_rd, .wd_data, .wd_count,
    .ra_rd, .ra_addr, .ra_empty,
    .rd_valid(phy_rd_valid && cal_done), .rd_data(phy_rd_data)
  );

  qdr_rw_sm #(.DEPTH(DEPTH)) u_rw_sm (
    .clk(clk0), .rst, .cal_done,
    .wa_rd, .wa_addr, .wa_empty, .wd_rd, .wd_data, .wd_count,
    .ra_rd, .ra_addr, .ra_empty, .cmd(rw_cmd)
  );

  qdr_cal #(.MAX_LAT(MAX_LAT), .INIT_WAIT(INIT_WAIT)) u_cal (
    .clk(clk0), .rst, .cmd(cal_cmd), .pair0, .pair1,
    .rd_lat, .rd_phase, .cal_done
  );

  assign cmd = cal_done ? rw_cmd : cal_cmd;

  qdr_phy #(.MAX_LAT(MAX_LAT)) u_phy (
    .clk0, .clk270, .rst, .cmd,
    .rd_lat, .rd_phase, .cal_pair0(pair0), .cal_pair1(pair1),
    .rd_valid(phy_rd_valid), .rd_data(phy_rd_data),
    .qdr_k, .qdr_k_n, .qdr_c, .qdr_c_n, .qdr_dll_off_n,
    .qdr_sa, .qdr_r_n, .qdr_w_n, .qdr_d, .qdr_bw_n, .qdr_q
  );
endmodule
