`timescale 1ns/1ps
// Test of uart_baud_gen: tick16 must come exactly once every baud_div cycles
// for several divisors, and every cycle for divisor 1.
module tb_uart_baud_gen;
  logic clk = 0, rst = 1, tick16;
  logic [15:0] baud_div = 16'd5;
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  uart_baud_gen dut (.*);

  initial begin
    int last, gap, n;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 4; t++) begin
      int divs [4] = '{5, 1, 7, 13};
      rst = 1;
      baud_div = 16'(divs[t]);
      @(posedge clk); @(posedge clk);
      rst = 0;
      last = -1; n = 0;
      for (int c = 0; c < 200; c++) begin
        @(posedge clk); #1;
        if (tick16) begin
          if (last >= 0) begin
            gap = c - last;
            checks++;
            if (gap != divs[t]) begin
              failures++;
              $display("ERROR: div %0d gap %0d", divs[t], gap);
            end
          end
          last = c; n++;
        end
      end
      checks++;
      if (n < 200 / divs[t] - 1) begin failures++; $display("ERROR: too few ticks"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
