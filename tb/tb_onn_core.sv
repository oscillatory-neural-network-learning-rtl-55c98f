// tb_onn_core: the 25-neuron network with integer Hebbian weights
// W_ij = sum_p x_i^p x_j^p (zero diagonal) for two stored patterns, ticks
// every second clock. Checks: a stored pattern is returned after exactly one
// period (16 ticks after the load tick), a pattern one or two bits away is
// corrected to the stored one and ends after two periods, done is a single
// clock pulse with busy falling with it, zero weights return the input, hold
// abandons a running inference without done, and all-negative coupling
// (which never settles) stops after MAX_PERIODS periods with timeout.
`timescale 1ns/1ps
module tb_onn_core;
  localparam int N = 25, WB = 5, ST = 16, MAXP = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic tick = 0, hold = 0, start = 0;
  logic [N-1:0] pin, pout;
  logic [N-1:0][N-1:0][WB-1:0] w;
  logic busy, done, timeout;
  logic [7:0] periods;
  int checks = 0, failures = 0;

  onn_core #(.N(N), .WB(WB), .STAGES(ST), .MAX_PERIODS(MAXP)) dut (.clk, .rst_n, .tick, .hold, .start,
    .pattern_in (pin), .weights (w), .busy, .done, .timeout, .pattern_out (pout), .periods);

  always @(posedge clk) tick <= ~tick;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic int pm(input logic b); return b ? -1 : 1; endfunction

  // run one inference; returns ticks from the load tick to done
  task automatic infer(input logic [N-1:0] p, output int nticks, output bit got_done);
    int guard = 0, donecnt = 0;
    pin = p;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    while (!(tick && dut.load)) begin @(posedge clk); #1; end
    nticks = 0;
    got_done = 0;
    while (guard < 20000) begin
      @(posedge clk); #1;
      guard++;
      if (tick) nticks++;
      if (done) begin
        got_done = 1;
        check(!busy, "busy falls with done");
        @(posedge clk); #1;
        check(!done, "done is one clock");
        break;
      end
    end
  endtask

  logic [N-1:0] pats [2];
  initial begin
    int nt;
    bit gd;
    logic [N-1:0] x;
    pats[0] = 25'h1C3A5F0;
    pats[1] = 25'h0F0F0F0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      w[i][j] = (i == j) ? '0 : WB'(pm(pats[0][i]) * pm(pats[0][j]) + pm(pats[1][i]) * pm(pats[1][j]));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    foreach (pats[k]) begin
      infer(pats[k], nt, gd);
      check(gd && pout == pats[k] && !timeout, "stored pattern recalled");
      check(periods == 1 && nt == ST, $sformatf("stored pattern: %0d periods, %0d ticks", periods, nt));
      for (int hd = 1; hd <= 2; hd++) begin
        x = pats[k];
        x[3 + 7 * hd] = ~x[3 + 7 * hd];
        if (hd == 2) x[5] = ~x[5];
        infer(x, nt, gd);
        check(gd && pout == pats[k] && !timeout, $sformatf("p%0d hd%0d corrected: %h", k, hd, pout));
        check(periods == 2 && nt == 2 * ST, $sformatf("corrected: %0d periods, %0d ticks", periods, nt));
      end
    end
    // hold abandons the run
    pin = pats[0] ^ 25'h1;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    repeat (20) @(posedge clk);
    #1 hold = 1;
    @(posedge clk); #1;
    check(!busy, "hold stops the inference");
    begin
      int d = 0;
      repeat (200) begin @(posedge clk); #1; if (done) d++; end
      check(d == 0, "no done after hold");
    end
    // start is ignored in hold
    start = 1; @(posedge clk); #1 start = 0;
    repeat (4) @(posedge clk); #1;
    check(!busy, "start ignored in hold");
    hold = 0;
    // zero weights keep the input
    w = '0;
    infer(25'h0ABCDEF, nt, gd);
    check(gd && pout == 25'h0ABCDEF && periods == 1, "zero weights keep input");
    // all negative coupling: period limit
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) w[i][j] = (i == j) ? '0 : '1;
    infer(25'h0, nt, gd);
    check(gd && timeout && periods == MAXP && nt == MAXP * ST, $sformatf("timeout after %0d periods", periods));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
