// tb_weight_memory: 25 x 25 matrix of 5-bit weights, 6 per word, 105 words.
// Random packed writes are mirrored in a model matrix indexed by
// l = i*N + j = word*6 + field; the parallel matrix output and the packed
// read-back must match the model at every step; writes past the last word
// and the unused bits of the last word are ignored; clear zeroes everything
// and wins over a simultaneous write.
`timescale 1ns/1ps
module tb_weight_memory;
  localparam int N = 25, WB = 5, WPW = 6, WORDS = 105, AW = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic we = 0, clear = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [N-1:0][N-1:0][WB-1:0] weights;
  int checks = 0, failures = 0;
  logic [WB-1:0] model [N * N];

  weight_memory #(.N(N), .WB(WB)) dut (.clk, .rst_n, .we, .waddr, .wdata, .clear, .raddr, .rdata, .weights);

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all(input string s);
    int bad = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      if (weights[i][j] !== model[i * N + j]) bad++;
    checks++;
    if (bad) begin failures++; $display("FAIL %s: %0d weights differ", s, bad); end
  endtask

  task automatic compare_word(input int a);
    logic [31:0] e = '0;
    raddr = AW'(a); #1;
    for (int k = 0; k < WPW; k++) if (a * WPW + k < N * N) e[k*WB +: WB] = model[a * WPW + k];
    checks++;
    if (rdata !== e) begin failures++; $display("FAIL read word %0d: %h exp %h", a, rdata, e); end
  endtask

  initial begin
    foreach (model[l]) model[l] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    compare_all("after reset");
    // fill every word, then random rewrites
    for (int c = 0; c < WORDS + 400; c++) begin
      automatic int a = (c < WORDS) ? c : $urandom_range(0, 127);
      we = 1; waddr = AW'(a); wdata = $urandom;
      @(posedge clk); #1;
      we = 0;
      if (a < WORDS) for (int k = 0; k < WPW; k++) if (a * WPW + k < N * N) model[a * WPW + k] = wdata[k*WB +: WB];
      compare_all("write");
      compare_word($urandom_range(0, WORDS - 1));
    end
    compare_word(WORDS - 1);
    // clear wins over a write
    we = 1; clear = 1; waddr = 0; wdata = '1;
    @(posedge clk); #1;
    we = 0; clear = 0;
    foreach (model[l]) model[l] = '0;
    compare_all("clear");
    compare_word(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
