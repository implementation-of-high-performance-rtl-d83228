`timescale 1ns/1ps
// Read-capture calibration state machine.
//
// Before normal operation the read data returned by the memory has to be
// lined up with the user clock. After INIT_WAIT cycles (time for the memory's
// DLL to lock) the machine writes a four-word training pattern to address
// CAL_ADDR, then reads it back and counts cycles from the read command. In
// every cycle it compares both candidate word pairs offered by the physical
// interface with the first pattern pair {P1, P0}. The first hit gives the
// read latency (cycles) and the phase (which pair); the next cycle must then
// show the second pattern pair {P3, P2} in the same position. The read is
// repeated until VERIFY reads in a row agree, then rd_lat and rd_phase are
// frozen and cal_done goes high (and stays high until reset). A read that
// finds nothing within MAX_LAT cycles, or disagrees, starts over with a new
// write. While calibrating, cmd drives the physical interface; the
// controller takes over after cal_done.
// The text says only that this machine makes read data capture work for the
// direct-clocking method; the pattern, the latency search and the retry
// policy are this design's. Tuning of per-bit input delay taps, which
// centres the sampling point in analog time, has no logic equivalent here.
module qdr_cal
  import qdr_pkg::*;
#(
  parameter int unsigned MAX_LAT   = 16,
  parameter int unsigned INIT_WAIT = 16,
  parameter int unsigned VERIFY    = 3,
  parameter logic [ADDR_W-1:0] CAL_ADDR = '0
) (
  input  logic               clk,
  input  logic               rst,
  output phy_cmd_t           cmd,
  input  logic [UDATA_W-1:0] pair0,
  input  logic [UDATA_W-1:0] pair1,
  output logic [$clog2(MAX_LAT)-1:0] rd_lat,
  output logic               rd_phase,
  output logic               cal_done
);
  localparam logic [DATA_W-1:0] P0 = 36'hA5A5A5A5A;
  localparam logic [DATA_W-1:0] P1 = 36'h5A5A5A5A5;
  localparam logic [DATA_W-1:0] P2 = 36'hFF00FF00F;
  localparam logic [DATA_W-1:0] P3 = 36'h00FF00FF0;
  localparam int unsigned LW = $clog2(MAX_LAT);

  typedef enum logic [2:0] {C_INIT, C_WCMD, C_WHALF1, C_WHALF2, C_GAP,
                            C_RCMD, C_SEARCH, C_SECOND} cstate_t;
  cstate_t st;
  logic [$clog2(INIT_WAIT+1)-1:0] wait_cnt;
  logic [LW-1:0] cnt, lat_q;
  logic phase_q, have_prev;
  logic [$clog2(VERIFY+1)-1:0] agree;
  logic hit0, hit1;

  assign hit0 = (pair0 == {P1, P0});
  assign hit1 = (pair1 == {P1, P0});

  always_comb begin
    cmd           = '0;
    cmd.r_n       = 1'b1;
    cmd.w_n       = 1'b1;
    cmd.bw_rise_n = '1;
    cmd.bw_fall_n = '1;
    unique case (st)
      C_WCMD:   cmd.w_n = 1'b0;
      C_WHALF1: begin
        cmd.sa = CAL_ADDR;
        cmd.d_rise = P0; cmd.d_fall = P1;
        cmd.bw_rise_n = '0; cmd.bw_fall_n = '0;
      end
      C_WHALF2: begin
        cmd.d_rise = P2; cmd.d_fall = P3;
        cmd.bw_rise_n = '0; cmd.bw_fall_n = '0;
      end
      C_RCMD:   begin cmd.r_n = 1'b0; cmd.sa = CAL_ADDR; end
      default:  ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= C_INIT;
      wait_cnt  <= '0;
      cnt       <= '0;
      lat_q     <= '0;
      phase_q   <= 1'b0;
      have_prev <= 1'b0;
      agree     <= '0;
      rd_lat    <= '0;
      rd_phase  <= 1'b0;
      cal_done  <= 1'b0;
    end else if (!cal_done) begin
      unique case (st)
        C_INIT: begin
          if (wait_cnt == $bits(wait_cnt)'(INIT_WAIT)) st <= C_WCMD;
          else wait_cnt <= wait_cnt + 1'b1;
        end
        C_WCMD:   st <= C_WHALF1;
        C_WHALF1: st <= C_WHALF2;
        C_WHALF2: st <= C_GAP;
        C_GAP:    st <= C_RCMD;
        C_RCMD: begin
          st  <= C_SEARCH;
          cnt <= LW'(1);
        end
        C_SEARCH: begin
          if (hit0 || hit1) begin
            st      <= C_SECOND;
            lat_q   <= cnt;
            phase_q <= !hit0;
          end else if (cnt == LW'(MAX_LAT - 1)) begin
            st        <= C_WCMD;     // nothing came back: start over
            have_prev <= 1'b0;
            agree     <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        C_SECOND: begin
          if ((phase_q ? pair1 : pair0) == {P3, P2}) begin
            if (have_prev && lat_q == rd_lat && phase_q == rd_phase)
              agree <= agree + 1'b1;
            else
              agree <= $bits(agree)'(1);
            have_prev <= 1'b1;
            rd_lat    <= lat_q;
            rd_phase  <= phase_q;
            if (have_prev && lat_q == rd_lat && phase_q == rd_phase &&
                agree == $bits(agree)'(VERIFY - 1)) begin
              cal_done <= 1'b1;
              st       <= C_INIT;
            end else begin
              st <= C_RCMD;
            end
          end else begin
            st        <= C_WCMD;
            have_prev <= 1'b0;
            agree     <= '0;
          end
        end
        default: st <= C_INIT;
      endcase
    end
  end
endmodule
