// tb_digital_oscillator: random-stimulus comparison of the 16-stage
// oscillator with a phase-position model. The model keeps a position
// 0..15 inside the period (output high for positions 0..7): a tick advances
// it, init sets it to 0 (bit 0) or 8 (bit 1), resync sets it to 1 (one
// interval after a rising edge), hold freezes it. rise must be high when the
// output is high and was low on the previous interval (cleared by init).
// Directed checks: a free-running period is 16 ticks with 8 high.
`timescale 1ns/1ps
module tb_digital_oscillator;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic tick = 0, hold = 0, init = 0, init_bit = 0, resync = 0, osc, rise;
  int checks = 0, failures = 0;

  digital_oscillator #(.STAGES(16)) dut (.clk, .rst_n, .tick, .hold, .init, .init_bit, .resync, .osc, .rise);

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pos;
  bit prev_out;
  task automatic cmp(input string w);
    checks++;
    if (osc !== (pos < 8) || rise !== ((pos < 8) && !prev_out)) begin
      failures++;
      $display("FAIL %s: pos=%0d osc=%b rise=%b prev=%b", w, pos, osc, rise, prev_out);
    end
  endtask

  initial begin
    int highs;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // reset state equals position 1 with a previous output 0
    pos = 1; prev_out = 0;
    @(posedge clk); #1;
    cmp("reset");
    // free running period
    highs = 0;
    for (int t = 0; t < 16; t++) begin
      tick = 1; @(posedge clk); #1; tick = 0;
      prev_out = (pos < 8); pos = (pos + 1) % 16;
      cmp("run");
      if (osc) highs++;
    end
    checks++; if (highs != 8 || pos != 1) begin failures++; $display("FAIL: duty %0d", highs); end
    // random stimulus
    for (int c = 0; c < 20000; c++) begin
      tick = ($urandom_range(0, 2) != 0);
      hold = ($urandom_range(0, 9) == 0);
      init = ($urandom_range(0, 15) == 0);
      init_bit = $urandom_range(0, 1);
      resync = ($urandom_range(0, 7) == 0);
      @(posedge clk); #1;
      if (tick && !hold) begin
        if (init) begin prev_out = 0; pos = init_bit ? 8 : 0; end
        else begin
          prev_out = (pos < 8);
          pos = resync ? 1 : (pos + 1) % 16;
        end
      end
      cmp("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
