`timescale 1ns/1ps
// Baud generator: a one-cycle tick at sixteen times the bit rate.
//
// A down-counter reloads from the divisor input baud_div and pulses tick16
// when it reaches zero, so tick16 is high for one clock cycle in every
// baud_div cycles (baud_div = f_clk / (16 * bit rate)). A divisor of 0 or 1
// gives a tick on every cycle. The UART receiver and transmitter both run
// from this tick; the x16 relation follows the text, the divisor input is
// this design's choice.
module uart_baud_gen #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [DIV_W-1:0] baud_div,
  output logic             tick16
);
  logic [DIV_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      tick16 <= 1'b0;
    end else if (cnt <= 1) begin
      cnt    <= baud_div;
      tick16 <= 1'b1;
    end else begin
      cnt    <= cnt - 1'b1;
      tick16 <= 1'b0;
    end
  end
endmodule
