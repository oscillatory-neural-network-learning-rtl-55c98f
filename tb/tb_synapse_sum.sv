// tb_synapse_sum: random weights (signed 5-bit) and oscillator levels for a
// 25-input neuron; the sum must equal sum_j (osc_j ? W_ij : -W_ij) and the
// drive its sign, with the neuron's own level on a zero sum. Includes the
// extreme sums (all weights -16 or +15).
`timescale 1ns/1ps
module tb_synapse_sum;
  localparam int N = 25, WB = 5, SW = WB + $clog2(N) + 1;
  logic [N-1:0][WB-1:0] w;
  logic [N-1:0] o;
  logic own;
  logic signed [SW-1:0] sum;
  logic drive;
  int checks = 0, failures = 0;

  synapse_sum #(.N(N), .WB(WB)) dut (.weights_row (w), .osc_in (o), .own, .sum, .drive);

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic test();
    int s = 0;
    bit ed;
    for (int j = 0; j < N; j++) begin
      int v = int'($signed(w[j]));
      s += o[j] ? v : -v;
    end
    ed = (s > 0) ? 1'b1 : (s < 0) ? 1'b0 : own;
    #1;
    checks++;
    if (int'(sum) != s || drive !== ed) begin
      failures++;
      $display("FAIL: sum=%0d exp=%0d drive=%b exp=%b", sum, s, drive, ed);
    end
  endtask

  initial begin
    int zeros = 0;
    for (int c = 0; c < 5000; c++) begin
      for (int j = 0; j < N; j++) w[j] = WB'($urandom_range(0, (1 << WB) - 1));
      o = N'($urandom);
      own = $urandom_range(0, 1);
      if (c % 7 == 0) for (int j = 0; j < N; j++) w[j] = WB'($urandom_range(0, 2) - 1);
      test();
      if (sum == 0) zeros++;
    end
    for (int j = 0; j < N; j++) w[j] = 5'b10000;
    o = '1; own = 0; test();
    o = '0; test();
    for (int j = 0; j < N; j++) w[j] = 5'b01111;
    o = '1; test();
    w = '0; own = 1; test(); own = 0; test();
    checks++; if (zeros == 0) begin failures++; $display("FAIL: no zero sum case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
