`timescale 1ns/1ps
// Behavioural model of a 512K x 36 QDR II SRAM with four-word bursts
// (CY7C1315BV18 class), for simulation only.
//
// Separate read and write ports share the address bus SA. A read command
// (R# low at a rising edge of K) latches SA; the four words come out on Q
// 1.5 cycles later, one per K/K# edge (first word after the rising edge of
// K# in the next cycle), each TCO after its clock edge; CQ/CQ# echo K/K#.
// Read data is fetched from the array when each word is driven. A write
// command (W# low at a rising edge of K) takes its address from SA on the
// next rising edge of K, where the first word is latched from D; the other
// three follow on the next K#, K and K# edges. BW#[i] low writes bits
// [9i+8:9i] of a word. K# is taken as the inverse of K, C/C# and DOFF#
// are ignored. The array is sparse; unwritten words read as zero.
module qdr2_sram_model #(
  parameter int unsigned ADDR_W = 17,
  parameter int unsigned DATA_W = 36,
  parameter realtime     TCO    = 0.45ns
) (
  input  logic              k,
  input  logic [ADDR_W-1:0] sa,
  input  logic              r_n,
  input  logic              w_n,
  input  logic [DATA_W-1:0] d,
  input  logic [3:0]        bw_n,
  output logic [DATA_W-1:0] q,
  output logic              cq,
  output logic              cq_n
);
  logic [DATA_W-1:0] mem [logic [ADDR_W+1:0]];
  logic [ADDR_W-1:0] waddr;
  int unsigned wph;       // 0 idle, 1..4: next word of the write in flight
  bit wnew;               // write command seen, address due next rising edge
  longint unsigned edge_no;
  // reads in flight: word w of read i is due at edge rd_edge[i] + 3 + w
  longint unsigned rd_edge [$];
  logic [ADDR_W-1:0] rd_addr [$];
  int unsigned writes, reads;

  initial begin
    q = '0; cq = 1'b0; cq_n = 1'b1;
    wph = 0; wnew = 0; edge_no = 0; writes = 0; reads = 0;
  end

  function automatic void put(input logic [ADDR_W-1:0] a, input int unsigned w,
                              input logic [DATA_W-1:0] v, input logic [3:0] be_n);
    logic [DATA_W-1:0] old;
    logic [ADDR_W+1:0] idx;
    idx = {a, 2'(w)};
    old = mem.exists(idx) ? mem[idx] : '0;
    for (int b = 0; b < 4; b++)
      if (!be_n[b]) old[9*b +: 9] = v[9*b +: 9];
    mem[idx] = old;
  endfunction

  function automatic logic [DATA_W-1:0] get(input logic [ADDR_W-1:0] a, input int unsigned w);
    logic [ADDR_W+1:0] idx;
    idx = {a, 2'(w)};
    return mem.exists(idx) ? mem[idx] : '0;
  endfunction

  // drive the read word due at this edge, if any
  task automatic drive_q();
    logic [DATA_W-1:0] v;
    bit hit;
    hit = 0;
    v = '0;
    foreach (rd_edge[i]) begin
      if (edge_no >= rd_edge[i] + 3 && edge_no <= rd_edge[i] + 6) begin
        v = get(rd_addr[i], int'(edge_no - rd_edge[i] - 3));
        hit = 1;
      end
    end
    while (rd_edge.size() > 0 && edge_no >= rd_edge[0] + 6) begin
      void'(rd_edge.pop_front());
      void'(rd_addr.pop_front());
    end
    if (hit) begin
      #(TCO);
      q = v;
    end
  endtask

  always @(posedge k) begin
    edge_no++;
    if (wph == 3) begin
      put(waddr, 2, d, bw_n);
      wph = 4;
    end else if (wnew) begin
      waddr = sa;
      put(waddr, 0, d, bw_n);
      wph = 2;
      wnew = 0;
    end
    if (!w_n) begin
      wnew = 1;
      writes++;
    end
    if (!r_n) begin
      rd_edge.push_back(edge_no);
      rd_addr.push_back(sa);
      reads++;
    end
    fork
      begin #(TCO); cq = 1'b1; cq_n = 1'b0; end
    join_none
    drive_q();
  end

  always @(negedge k) begin
    edge_no++;
    if (wph == 2) begin
      put(waddr, 1, d, bw_n);
      wph = 3;
    end else if (wph == 4) begin
      put(waddr, 3, d, bw_n);
      wph = 0;
    end
    fork
      begin #(TCO); cq = 1'b0; cq_n = 1'b1; end
    join_none
    drive_q();
  end
endmodule
