// tb_phase_controller: the controller must request a resynchronisation
// exactly on a tick where the drive signal rises (high now, low on the
// previous tick interval) and the oscillator does not rise, never in hold or
// on a pattern load; a load makes a high drive on the next interval count
// as a rising edge. Checked against that rule with random stimulus, plus
// directed cases.
`timescale 1ns/1ps
module tb_phase_controller;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic tick = 0, hold = 0, init = 0, drive = 0, osc_rise = 0, resync;
  int checks = 0, failures = 0;

  phase_controller dut (.clk, .rst_n, .tick, .hold, .init, .drive, .osc_rise, .resync);

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit last_drive;   // drive seen on the last tick interval (low after a load)
  task automatic step(input bit t, h, i, d, r, input string w);
    bit exp_r;
    tick = t; hold = h; init = i; drive = d; osc_rise = r;
    #1;
    exp_r = t && !h && !i && d && !last_drive && !r;
    checks++;
    if (resync !== exp_r) begin failures++; $display("FAIL %s: resync=%b exp=%b", w, resync, exp_r); end
    @(posedge clk);
    #1;
    if (t && !h) last_drive = i ? 1'b0 : d;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    last_drive = 1;
    // directed: drive rises while oscillator does not -> resync
    step(1, 0, 0, 0, 0, "low");
    step(1, 0, 0, 1, 0, "rise");
    // drive rises together with the oscillator -> nothing
    step(1, 0, 0, 0, 0, "low2");
    step(1, 0, 0, 1, 1, "aligned");
    // rising edge seen after a load
    step(1, 0, 1, 0, 0, "load");
    step(1, 0, 0, 1, 0, "after load");
    // hold blocks requests
    step(1, 0, 0, 0, 0, "low3");
    step(1, 1, 0, 1, 0, "hold");
    for (int c = 0; c < 20000; c++)
      step($urandom_range(0, 2) != 0, $urandom_range(0, 9) == 0, $urandom_range(0, 15) == 0,
           $urandom_range(0, 1), $urandom_range(0, 3) == 0, "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
