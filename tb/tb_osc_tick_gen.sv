// tb_osc_tick_gen: checks the phase-step enable at its default setting
// (100 MHz clock, 16 x 187.5 kHz = 3 MHz ticks): the number of ticks in
// 1,000,000 clocks must be exactly 30,000, every gap must be 33 or 34 clocks,
// ticks must be one clock wide and the first tick must come 34 clocks after
// reset (ceil(100/3)).
`timescale 1ns/1ps
module tb_osc_tick_gen;
  logic clk = 1'b0, rst_n = 1'b0, tick;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  osc_tick_gen dut (.clk, .rst_n, .tick);

  initial begin
    repeat (1_100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0, gap = 0, first = -1, bad_gap = 0, wide = 0;
    logic prev = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 1; c <= 1_000_000; c++) begin
      @(posedge clk);
      #1;
      gap++;
      if (tick) begin
        if (first < 0) first = c;
        else if (gap != 33 && gap != 34) bad_gap++;
        if (prev) wide++;
        n++;
        gap = 0;
      end
      prev = tick;
    end
    checks++; if (n != 30_000) begin failures++; $display("FAIL: %0d ticks", n); end
    checks++; if (bad_gap != 0) begin failures++; $display("FAIL: %0d bad gaps", bad_gap); end
    checks++; if (wide != 0) begin failures++; $display("FAIL: wide ticks"); end
    checks++; if (first != 34) begin failures++; $display("FAIL: first tick at %0d", first); end
    $display("ticks=%0d first=%0d", n, first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
