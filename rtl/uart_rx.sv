`timescale 1ns/1ps
// UART receive controller with sixteen-times oversampling.
//
// The line is tested on every tick16. A low level starts a start-bit check;
// if the line is still low eight ticks later (half a bit time) the start bit
// is valid, otherwise the pulse is dropped as a glitch and the receiver goes
// back to idle. From that mid-bit point the line is sampled every sixteen
// ticks, once per data bit (LSB first) and once for the stop bit. After the
// stop bit the character is handed out on data with a one-cycle valid pulse;
// frame_err is set in the same cycle when the stop bit was low. The
// half-bit start check and the sampling once per bit time follow the text;
// LSB-first order, one stop bit and no parity are this design's choices.
module uart_rx #(
  parameter int unsigned DATA_BITS = 9
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 tick16,
  input  logic                 sin,
  output logic [DATA_BITS-1:0] data,
  output logic                 valid,
  output logic                 frame_err
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  state_t state;
  logic [3:0] tcnt;
  logic [$clog2(DATA_BITS+1)-1:0] bcnt;
  logic [DATA_BITS-1:0] shreg;
  logic sin_q, sin_qq;   // two-flop synchroniser for the asynchronous line

  always_ff @(posedge clk) begin
    if (rst) begin
      sin_q  <= 1'b1;
      sin_qq <= 1'b1;
    end else begin
      sin_q  <= sin;
      sin_qq <= sin_q;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      tcnt      <= '0;
      bcnt      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      if (tick16) begin
        unique case (state)
          IDLE: if (!sin_qq) begin
            state <= START;
            tcnt  <= 4'd1;
          end
          START: begin
            if (sin_qq) state <= IDLE;            // spurious pulse
            else if (tcnt == 4'd7) begin          // half a bit time low
              state <= DATA;
              tcnt  <= '0;
              bcnt  <= '0;
            end else tcnt <= tcnt + 1'b1;
          end
          DATA: begin
            tcnt <= tcnt + 1'b1;
            if (tcnt == 4'd15) begin
              shreg <= {sin_qq, shreg[DATA_BITS-1:1]};
              if (bcnt == $bits(bcnt)'(DATA_BITS - 1)) state <= STOP;
              else bcnt <= bcnt + 1'b1;
            end
          end
          STOP: begin
            tcnt <= tcnt + 1'b1;
            if (tcnt == 4'd15) begin
              data      <= shreg;
              valid     <= 1'b1;
              frame_err <= !sin_qq;
              state     <= IDLE;
            end
          end
        endcase
      end
    end
  end
endmodule
