`timescale 1ns/1ps
// UART transmit controller.
//
// When idle and start is high, the controller loads data and sends a frame on
// sout: one start bit (low), DATA_BITS data bits LSB first and one stop bit
// (high), each sixteen tick16 periods long. busy is high from the cycle after
// start until the stop bit has been sent; start is ignored while busy. The
// frame format is this design's choice (the text names the transmitter only).
module uart_tx #(
  parameter int unsigned DATA_BITS = 9
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 tick16,
  input  logic                 start,
  input  logic [DATA_BITS-1:0] data,
  output logic                 sout,
  output logic                 busy
);
  // frame = {stop, data, start}, shifted out LSB first
  logic [DATA_BITS+1:0] shreg;
  logic [3:0] tcnt;
  logic [$clog2(DATA_BITS+3)-1:0] bcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '1;
      tcnt  <= '0;
      bcnt  <= '0;
      busy  <= 1'b0;
      sout  <= 1'b1;
    end else if (!busy) begin
      sout <= 1'b1;
      if (start) begin
        shreg <= {1'b1, data, 1'b0};
        busy  <= 1'b1;
        tcnt  <= '0;
        bcnt  <= '0;
      end
    end else if (tick16) begin
      sout <= shreg[0];
      tcnt <= tcnt + 1'b1;
      if (tcnt == 4'd15) begin
        shreg <= {1'b1, shreg[DATA_BITS+1:1]};
        if (bcnt == $bits(bcnt)'(DATA_BITS + 1)) busy <= 1'b0;
        else bcnt <= bcnt + 1'b1;
      end
    end
  end
endmodule
