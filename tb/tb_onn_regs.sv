// tb_onn_regs: drives the register strobe port directly, with the weight
// memory and the network replaced by testbench signals, and checks the
// register map: WMODE holds the network and its falling edge sets
// weights-ready; START gives one start pulse (none in WMODE); CLEAR gives
// one clear pulse; ACK clears the flags; ADDR reads back and auto-increments
// on WDATA and PATTERN accesses; WDATA writes reach the weight port at ADDR
// only below the last word (105 for 25 x 25 five-bit weights) and reads
// return the memory word; PATTERN sets the input pattern and returns the
// output pattern; done, timeout and the period count appear in the status
// word and on irq_done.
`timescale 1ns/1ps
module tb_onn_regs;
  import onn_pkg::*;
  localparam int N = 25, WB = 5, WAW = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [1:0] wr_idx = 0, rd_idx = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic w_we, w_clear;
  logic [WAW-1:0] w_waddr, w_raddr;
  logic [31:0] w_wdata, w_rdata;
  logic onn_hold, onn_start, irq_done;
  logic [N-1:0] pattern_in, pattern_out = 0;
  logic onn_busy = 0, onn_done = 0, onn_timeout = 0;
  logic [7:0] onn_periods = 0;
  int checks = 0, failures = 0;
  int n_we = 0, n_start = 0, n_clear = 0;
  logic [WAW-1:0] last_waddr;
  logic [31:0] last_wdata;

  onn_regs #(.N(N), .WB(WB)) dut (.clk, .rst_n, .wr_en, .wr_idx, .wr_data, .rd_en, .rd_idx, .rd_data,
    .w_we, .w_waddr, .w_wdata, .w_clear, .w_raddr, .w_rdata,
    .onn_hold, .onn_start, .pattern_in, .onn_busy, .onn_done, .onn_timeout, .pattern_out,
    .onn_periods, .irq_done);

  assign w_rdata = {25'h0ABCDE, w_raddr};

  always @(posedge clk) begin
    if (w_we) begin n_we++; last_waddr <= w_waddr; last_wdata <= w_wdata; end
    if (onn_start) n_start++;
    if (w_clear) n_clear++;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic wr(input logic [1:0] i, input logic [31:0] d);
    wr_en = 1; wr_idx = i; wr_data = d;
    @(posedge clk); #1;
    wr_en = 0;
    @(posedge clk); #1;
  endtask

  task automatic rd(input logic [1:0] i, output logic [31:0] d);
    rd_idx = i; #1;
    d = rd_data;
    rd_en = 1;
    @(posedge clk); #1;
    rd_en = 0;
  endtask

  initial begin
    logic [31:0] d;
    int n0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    // weight-update mode
    wr(REG_CTRL, 32'h1 << CTRL_WMODE);
    rd(REG_CTRL, d);
    check(onn_hold && d[STAT_WMODE] && !d[STAT_WREADY], "WMODE holds the ONN");
    // START ignored in WMODE
    n0 = n_start;
    wr(REG_CTRL, (32'h1 << CTRL_WMODE) | (32'h1 << CTRL_START));
    check(n_start == n0, "START ignored in WMODE");
    // weight writes with auto-increment
    wr(REG_ADDR, 32'd103);
    rd(REG_ADDR, d);
    check(d == 103, "ADDR read back");
    n0 = n_we;
    wr(REG_WDATA, 32'h1111_1111);
    check(n_we == n0 + 1 && last_waddr == 103 && last_wdata == 32'h1111_1111, "WDATA write at ADDR");
    wr(REG_WDATA, 32'h2222_2222);
    check(n_we == n0 + 2 && last_waddr == 104, "ADDR auto-increments");
    wr(REG_WDATA, 32'h3333_3333);
    check(n_we == n0 + 2, "write past the last word ignored");
    rd(REG_ADDR, d);
    check(d == 106, "ADDR after three writes");
    // read-back increments too
    wr(REG_ADDR, 32'd7);
    rd(REG_WDATA, d);
    check(d == {25'h0ABCDE, 7'd7}, "WDATA read returns word 7");
    rd(REG_WDATA, d);
    check(d == {25'h0ABCDE, 7'd8}, "WDATA read auto-increments");
    // clear
    n0 = n_clear;
    wr(REG_CTRL, (32'h1 << CTRL_WMODE) | (32'h1 << CTRL_CLEAR));
    check(n_clear == n0 + 1, "CLEAR gives one pulse");
    // leave WMODE: weights-ready
    wr(REG_CTRL, 32'h0);
    rd(REG_CTRL, d);
    check(!onn_hold && d[STAT_WREADY] && irq_done, "weights-ready after WMODE ends");
    wr(REG_CTRL, 32'h1 << CTRL_ACK);
    rd(REG_CTRL, d);
    check(!d[STAT_WREADY] && !irq_done, "ACK clears weights-ready");
    // pattern and start
    wr(REG_ADDR, 32'd0);
    wr(REG_PATTERN, 32'h0155_AA33);
    check(pattern_in == 25'h155_AA33, "PATTERN write");
    n0 = n_start;
    wr(REG_CTRL, 32'h1 << CTRL_START);
    check(n_start == n0 + 1, "START gives one pulse");
    onn_busy = 1; #1;
    rd(REG_CTRL, d);
    check(d[STAT_BUSY] && !d[STAT_DONE], "busy status");
    onn_busy = 0; onn_done = 1; onn_timeout = 1; onn_periods = 8'd5; pattern_out = 25'h1234567;
    @(posedge clk); #1;
    onn_done = 0; onn_timeout = 0;
    rd(REG_CTRL, d);
    check(d[STAT_DONE] && d[STAT_TIMEOUT] && d[STAT_PERIODS +: 8] == 5 && irq_done, "done, timeout, periods");
    wr(REG_ADDR, 32'd0);
    rd(REG_PATTERN, d);
    check(d == 32'h0123_4567, "PATTERN read returns output");
    rd(REG_PATTERN, d);
    check(d == 32'h0, "pattern word 1 is empty for 25 neurons");
    wr(REG_CTRL, 32'h1 << CTRL_ACK);
    check(!irq_done, "ACK clears done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
