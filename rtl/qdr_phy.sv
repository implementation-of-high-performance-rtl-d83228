`timescale 1ns/1ps
// Physical interface to the QDR II SRAM.
//
// Output side: the command word from the read/write state machine is
// registered on clk0 and relaunched on clk270, a copy of clk0 delayed by
// three quarters of a period. Address and R#/W# are single data rate and
// change on the rising edge of clk270. The write data and byte-write enables
// are double data rate: a mux selected by clk270 drives the word for the
// rising K edge while clk270 is high and the word for the rising K# edge
// while it is low, so each word is centred on the K or K# edge that latches
// it. K and K# are forwarded copies of clk0. C and C# are held high (the
// memory then times its outputs from K), and DOFF# is held high (DLL on).
// A command presented in clk0 cycle c reaches the memory on the K edge that
// starts cycle c+2.
//
// Read side (direct clocking): Q is sampled by clk0 itself on both edges.
// Each rising edge of clk0 yields two candidate 72-bit pairs of consecutive
// words: phase 0 pairs the words sampled at the previous falling edge and
// this rising edge, phase 1 pairs the words sampled at the previous rising
// edge and the previous falling edge. rd_phase picks one, and a shift
// register of issued reads, tapped at rd_lat, marks the two cycles in which
// a read's two pairs are present (rd_valid). rd_lat and rd_phase come from
// the calibration state machine, which also sees both candidate pairs on
// cal_pair0/cal_pair1. The read strobe echo clocks CQ/CQ# are not used by
// this capture scheme.
//
// The clock-as-data muxes for DDR outputs and the clock forwarding stand for
// the output DDR registers of an FPGA I/O cell; the latency/phase selection
// stands for the per-bit input delay taps, which cannot be modelled in
// logic. Registering everything at the pads follows the text; the exact
// clocking is this design's choice.
module qdr_phy
  import qdr_pkg::*;
#(
  parameter int unsigned MAX_LAT = 16
) (
  input  logic               clk0,
  input  logic               clk270,
  input  logic               rst,
  // from the controller
  input  phy_cmd_t           cmd,
  // calibration settings and observation
  input  logic [$clog2(MAX_LAT)-1:0] rd_lat,
  input  logic               rd_phase,
  output logic [UDATA_W-1:0] cal_pair0,
  output logic [UDATA_W-1:0] cal_pair1,
  // read data to the user interface
  output logic               rd_valid,
  output logic [UDATA_W-1:0] rd_data,
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
  // ---------------- output path ----------------
  phy_cmd_t cmd_q;
  logic [DATA_W-1:0] d_r, d_f, d_f_pre;
  logic [BW_W-1:0]   bw_r, bw_f, bw_f_pre;

  always_ff @(posedge clk0) begin
    if (rst) begin
      cmd_q           <= '0;
      cmd_q.r_n       <= 1'b1;
      cmd_q.w_n       <= 1'b1;
      cmd_q.bw_rise_n <= '1;
      cmd_q.bw_fall_n <= '1;
    end else begin
      cmd_q <= cmd;
    end
  end

  always_ff @(posedge clk270) begin
    if (rst) begin
      qdr_sa   <= '0;
      qdr_r_n  <= 1'b1;
      qdr_w_n  <= 1'b1;
      d_r      <= '0;
      d_f_pre  <= '0;
      bw_r     <= '1;
      bw_f_pre <= '1;
    end else begin
      qdr_sa   <= cmd_q.sa;
      qdr_r_n  <= cmd_q.r_n;
      qdr_w_n  <= cmd_q.w_n;
      d_r      <= cmd_q.d_rise;
      d_f_pre  <= cmd_q.d_fall;
      bw_r     <= cmd_q.bw_rise_n;
      bw_f_pre <= cmd_q.bw_fall_n;
    end
  end

  always_ff @(negedge clk270) begin
    if (rst) begin
      d_f  <= '0;
      bw_f <= '1;
    end else begin
      d_f  <= d_f_pre;
      bw_f <= bw_f_pre;
    end
  end

  assign qdr_d         = clk270 ? d_r : d_f;
  assign qdr_bw_n      = clk270 ? bw_r : bw_f;
  assign qdr_k         = clk0;
  assign qdr_k_n       = !clk0;
  assign qdr_c         = 1'b1;
  assign qdr_c_n       = 1'b1;
  assign qdr_dll_off_n = 1'b1;

  // ---------------- read capture ----------------
  logic [DATA_W-1:0] q_p0, q_p1, q_n0, q_nq;

  always_ff @(negedge clk0) begin
    if (rst) q_n0 <= '0;
    else     q_n0 <= qdr_q;
  end

  always_ff @(posedge clk0) begin
    if (rst) begin
      q_p0 <= '0;
      q_p1 <= '0;
      q_nq <= '0;
    end else begin
      q_p0 <= qdr_q;
      q_p1 <= q_p0;
      q_nq <= q_n0;
    end
  end

  assign cal_pair0 = {q_p0, q_nq};   // {later word, earlier word}
  assign cal_pair1 = {q_nq, q_p1};
  assign rd_data   = rd_phase ? cal_pair1 : cal_pair0;

  // reads issued, one bit per cycle: rd_sr[k-1] is set k cycles after the
  // command cycle
  logic [MAX_LAT:0] rd_sr;

  always_ff @(posedge clk0) begin
    if (rst) rd_sr <= '0;
    else     rd_sr <= {rd_sr[MAX_LAT-1:0], !cmd.r_n};
  end

  logic [$clog2(MAX_LAT+1)-1:0] lat_ext;
  assign lat_ext  = {1'b0, rd_lat};
  assign rd_valid = (rd_lat != 0) &&
                    (rd_sr[lat_ext - 1'b1] || rd_sr[lat_ext]);
endmodule
