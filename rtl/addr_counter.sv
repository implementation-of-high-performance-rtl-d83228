`timescale 1ns/1ps
// Burst address counter.
//
// Holds the memory burst address used by the user-side state machines. clr
// loads zero, inc steps to the next burst address (clr wins). at_last is high
// while the address equals last_addr, the final burst address of the run.
// done is set when the counter steps past last_addr, so a run of bursts from
// 0 to last_addr is complete once done is high; clr also clears done. The
// diagram names the counter and its 17-bit output; the compare and the done
// flag are this design's choices.
module addr_counter
  import qdr_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              clr,
  input  logic              inc,
  input  logic [ADDR_W-1:0] last_addr,
  output logic [ADDR_W-1:0] addr,
  output logic              at_last,
  output logic              done
);
  assign at_last = (addr == last_addr);

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      addr <= '0;
      done <= 1'b0;
    end else if (inc && !done) begin
      if (at_last) done <= 1'b1;
      else addr <= addr + 1'b1;
    end
  end
endmodule
