// tb_onn_pl_top: end-to-end test of the ONN programmable logic at its
// default size (25 neurons, 5-bit weights, 187.5 kHz oscillation, 100 MHz).
//
// The testbench plays the processor: it runs the Hebbian and Storkey rules in
// software on +1/-1 patterns (bit 0 = +1 = 0 degrees, bit 1 = -1 = 180
// degrees), rescales the weights to signed WB bits (divide by the largest
// magnitude, scale to 2^(WB-1)-1, round), writes them over AXI4-Lite while
// the network is in weight-update mode, and runs inferences from stored and
// corrupted patterns. Each result is compared with an independent model:
// synchronous Hopfield updates x_i <- sign(sum_j W_ij x_j) (keeping x_i on a
// zero sum) iterated to a fixed point, and with the stored pattern.
// Latency is checked against "two to three oscillation periods": a stored
// pattern must settle in one period, a one-step correction in two.
//
// Mechanisms counted (each must occur): weight-update hold, weights-ready
// flag, weight clear, weight read-back, converged inference, period-limit
// timeout, START ignored in update mode, partial write rejected with SLVERR,
// B and R channel back-pressure, Hebbian and Storkey learning.
`timescale 1ns/1ps
module tb_onn_pl_top;
  import onn_pkg::*;

  localparam int N      = 25;
  localparam int WB     = 5;
  localparam int WPW    = 32 / WB;
  localparam int WWORDS = (N * N + WPW - 1) / WPW;
  localparam int QMAX   = (1 << (WB - 1)) - 1;
  localparam real T_PERIOD_NS = 1.0e9 / 187_500.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        irq_done;

  onn_pl_top dut (
    .clk, .rst_n,
    .s_axi_awaddr (awaddr), .s_axi_awvalid (awvalid), .s_axi_awready (awready),
    .s_axi_wdata (wdata), .s_axi_wstrb (wstrb), .s_axi_wvalid (wvalid), .s_axi_wready (wready),
    .s_axi_bresp (bresp), .s_axi_bvalid (bvalid), .s_axi_bready (bready),
    .s_axi_araddr (araddr), .s_axi_arvalid (arvalid), .s_axi_arready (arready),
    .s_axi_rdata (rdata), .s_axi_rresp (rresp), .s_axi_rvalid (rvalid), .s_axi_rready (rready),
    .irq_done
  );

  int checks = 0, failures = 0;
  int n_hold = 0, n_wready = 0, n_clear = 0, n_readback = 0, n_conv = 0, n_timeout = 0,
      n_start_ignored = 0, n_slverr = 0, n_bstall = 0, n_rstall = 0, n_hebb = 0, n_stork = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (bvalid && !bready) n_bstall++;
    if (rvalid && !rready) n_rstall++;
  end

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_write(input logic [3:0] a, input logic [31:0] d, input logic [3:0] s,
                           output logic [1:0] resp);
    int dly = $urandom_range(0, 3);
    awaddr <= a; wdata <= d; wstrb <= s;
    awvalid <= 1'b1;
    if (dly == 0) wvalid <= 1'b1;
    fork
      begin
        do @(posedge clk); while (!awready);
        awvalid <= 1'b0;
      end
      begin
        repeat (dly) @(posedge clk);
        wvalid <= 1'b1;
        do @(posedge clk); while (!wready);
        wvalid <= 1'b0;
      end
    join
    repeat ($urandom_range(0, 2)) @(posedge clk);
    bready <= 1'b1;
    do @(posedge clk); while (!bvalid);
    resp = bresp;
    bready <= 1'b0;
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    logic [1:0] r;
    axi_write(a, d, 4'hF, r);
    check(r == 2'b00, "write response OKAY");
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    araddr <= a; arvalid <= 1'b1;
    do @(posedge clk); while (!arready);
    arvalid <= 1'b0;
    repeat ($urandom_range(0, 2)) @(posedge clk);
    rready <= 1'b1;
    do @(posedge clk); while (!rvalid);
    d = rdata;
    rready <= 1'b0;
  endtask

  // ---------------- processor model ----------------
  int  q [N][N];              // quantised weights as sent
  real wr_real [N][N];        // learning-rule weights before rescaling
  int  hebb_acc [N][N];

  function automatic int pm(input logic b);  // bit -> +1/-1
    return b ? -1 : 1;
  endfunction

  task automatic learn_clear();
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      wr_real[i][j] = 0.0; hebb_acc[i][j] = 0;
    end
  endtask

  // Hebbian, Eq. W_ij += x_i x_j / N, zero diagonal.
  task automatic learn_hebbian(input logic [N-1:0] p);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      if (i != j) wr_real[i][j] += real'(pm(p[i]) * pm(p[j])) / N;
    n_hebb++;
  endtask

  // Storkey, W_ij += (x_i x_j - x_i h_ji - h_ij x_j) / N with
  // h_ij = sum_k W_ik x_k, zero diagonal.
  task automatic learn_storkey(input logic [N-1:0] p);
    real h [N][N];
    real nw [N][N];
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      h[i][j] = 0.0;
      for (int k = 0; k < N; k++) h[i][j] += wr_real[i][k] * pm(p[k]);
    end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      nw[i][j] = (i == j) ? 0.0 : wr_real[i][j] +
        (real'(pm(p[i]) * pm(p[j])) - pm(p[i]) * h[j][i] - h[i][j] * pm(p[j])) / N;
    wr_real = nw;
    n_stork++;
  endtask

  task automatic rescale();
    real mx = 0.0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      if ((wr_real[i][j] < 0 ? -wr_real[i][j] : wr_real[i][j]) > mx)
        mx = (wr_real[i][j] < 0 ? -wr_real[i][j] : wr_real[i][j]);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      q[i][j] = (mx == 0.0) ? 0 : int'($rtoi(wr_real[i][j] / mx * QMAX + (wr_real[i][j] >= 0 ? 0.5 : -0.5)));
  endtask

  function automatic logic [31:0] pack_word(input int a);
    logic [31:0] w = '0;
    for (int k = 0; k < WPW; k++) begin
      int l = a * WPW + k;
      if (l < N * N) w[k*WB +: WB] = WB'(q[l / N][l % N]);
    end
    return w;
  endfunction

  task automatic send_weights();
    logic [31:0] st;
    wr(4'h0, 32'h1 << CTRL_WMODE);
    @(posedge clk);
    if (dut.onn_hold) n_hold++;
    check(dut.onn_hold == 1'b1, "ONN held in reset during weight update");
    // a START while in update mode must be ignored
    wr(4'h0, (32'h1 << CTRL_WMODE) | (32'h1 << CTRL_START));
    repeat (3) @(posedge clk);
    check(!dut.onn_busy, "START ignored in weight-update mode");
    if (!dut.onn_busy) n_start_ignored++;
    wr(4'h4, 32'd0);
    for (int a = 0; a < WWORDS; a++) wr(4'h8, pack_word(a));
    wr(4'h0, 32'h0);
    rd(4'h0, st);
    check(st[STAT_WREADY] && !st[STAT_WMODE] && irq_done, "weights-ready after update");
    if (st[STAT_WREADY]) n_wready++;
    wr(4'h0, 32'h1 << CTRL_ACK);
    // read back three words
    for (int t = 0; t < 3; t++) begin
      int a = $urandom_range(0, WWORDS - 1);
      logic [31:0] d;
      wr(4'h4, a);
      rd(4'h8, d);
      check(d == pack_word(a), $sformatf("weight read-back word %0d", a));
      n_readback++;
    end
  endtask

  // synchronous Hopfield reference, hold on zero field
  function automatic logic [N-1:0] hopfield(input logic [N-1:0] x0, output int steps, output bit fixed);
    logic [N-1:0] x = x0, nx;
    steps = 0; fixed = 0;
    for (int it = 0; it < 20; it++) begin
      for (int i = 0; i < N; i++) begin
        int h = 0;
        for (int j = 0; j < N; j++) h += q[i][j] * pm(x[j]);
        nx[i] = (h > 0) ? 1'b0 : (h < 0) ? 1'b1 : x[i];
      end
      if (nx == x) begin fixed = 1; return x; end
      x = nx; steps++;
    end
    return x;
  endfunction

  task automatic infer(input logic [N-1:0] pin, output logic [N-1:0] pout,
                       output bit tmo, output int per, output real t_ns);
    logic [31:0] st, d;
    realtime t0;
    wr(4'h4, 32'd0);
    wr(4'hC, 32'(pin));
    wr(4'h0, 32'h1 << CTRL_START);
    t0 = $realtime;
    while (!irq_done) @(posedge clk);
    t_ns = $realtime - t0;
    rd(4'h0, st);
    check(st[STAT_DONE] && !st[STAT_BUSY], "done status");
    tmo = st[STAT_TIMEOUT];
    per = int'(st[STAT_PERIODS +: 8]);
    wr(4'h4, 32'd0);
    rd(4'hC, d);
    pout = d[N-1:0];
    wr(4'h0, 32'h1 << CTRL_ACK);
  endtask

  function automatic logic [N-1:0] flip(input logic [N-1:0] p, input int nflip);
    logic [N-1:0] r = p;
    int cnt = 0;
    while (cnt < nflip) begin
      int b = $urandom_range(0, N - 1);
      if (r[b] == p[b]) begin r[b] = ~r[b]; cnt++; end
    end
    return r;
  endfunction

  task automatic recall_tests(input logic [N-1:0] pats [], input int hd_max, input string rule);
    logic [N-1:0] pin, pout, exp_o;
    bit tmo, fixed;
    int per, steps;
    real t_ns;
    foreach (pats[k]) begin
      for (int hd = 0; hd <= hd_max; hd++) begin
        pin = flip(pats[k], hd);
        exp_o = hopfield(pin, steps, fixed);
        infer(pin, pout, tmo, per, t_ns);
        $display("%s pattern %0d hd=%0d: out=%h exp=%h stored=%h periods=%0d model steps=%0d t=%0.1f us",
                 rule, k, hd, pout, exp_o, pats[k], per, steps, t_ns / 1000.0);
        if (!tmo) n_conv++;
        check(fixed && !tmo, $sformatf("%s p%0d hd%0d converged", rule, k, hd));
        check(pout == exp_o, $sformatf("%s p%0d hd%0d output matches model", rule, k, hd));
        check(pout == pats[k], $sformatf("%s p%0d hd%0d recalled stored pattern", rule, k, hd));
        if (hd == 0) check(per == 1, $sformatf("%s stored pattern settles in 1 period (got %0d)", rule, per));
        else check(per >= 2 && per <= steps + 2, $sformatf("%s hd%0d settles in 2..%0d periods (got %0d)", rule, hd, steps + 2, per));
        // time from START to done: the periods used, plus at most one tick
        // of load wait and a few clocks of register and AXI delay
        check(t_ns >= per * T_PERIOD_NS - 100.0 && t_ns <= per * T_PERIOD_NS + 1000.0,
              $sformatf("latency %0.1f ns for %0d periods", t_ns, per));
      end
    end
  endtask

  logic [N-1:0] pats [];
  logic [31:0]  st;
  logic [1:0]   resp;
  logic [N-1:0] pout;
  bit           tmo;
  int           per;
  real          t_ns;

  initial begin
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);

    // three orthogonal-ish random patterns
    pats = new[3];
    pats[0] = 25'h0AAAAAA ^ 25'h1F00000;
    pats[1] = 25'h0F0F0F0;
    pats[2] = 25'h13579BD;

    // ---- Hebbian, patterns learnt one at a time ----
    learn_clear();
    foreach (pats[k]) begin
      learn_hebbian(pats[k]);
      rescale();
      send_weights();
    end
    recall_tests(pats, 2, "hebbian");

    // ---- clear command: all weights zero, input passes unchanged ----
    wr(4'h0, (32'h1 << CTRL_WMODE) | (32'h1 << CTRL_CLEAR));
    wr(4'h0, 32'h0);
    wr(4'h0, 32'h1 << CTRL_ACK);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) q[i][j] = 0;
    begin
      logic [31:0] d;
      wr(4'h4, 32'd3);
      rd(4'h8, d);
      check(d == 32'd0, "weights cleared");
      if (d == 32'd0) n_clear++;
    end
    infer(25'h1234567, pout, tmo, per, t_ns);
    check(pout == 25'h1234567 && !tmo && per == 1, "zero weights keep the input");

    // ---- Storkey, incremental ----
    learn_clear();
    foreach (pats[k]) begin
      learn_storkey(pats[k]);
      rescale();
      send_weights();
    end
    recall_tests(pats, 2, "storkey");

    // ---- period limit: all-negative coupling never settles ----
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) q[i][j] = (i == j) ? 0 : -1;
    send_weights();
    infer(25'h0, pout, tmo, per, t_ns);
    $display("antiferro: tmo=%0d periods=%0d", tmo, per);
    check(tmo && per == 16, "non-settling network stops at the period limit");
    if (tmo) n_timeout++;

    // ---- partial write rejected ----
    axi_write(4'h4, 32'd7, 4'h3, resp);
    rd(4'h4, st);
    check(resp == 2'b10 && st != 32'd7, "partial write answered SLVERR and dropped");
    if (resp == 2'b10) n_slverr++;

    $display("mechanisms: hold=%0d wready=%0d clear=%0d readback=%0d converged=%0d timeout=%0d start_ignored=%0d slverr=%0d bstall=%0d rstall=%0d hebbian=%0d storkey=%0d",
             n_hold, n_wready, n_clear, n_readback, n_conv, n_timeout, n_start_ignored, n_slverr,
             n_bstall, n_rstall, n_hebb, n_stork);
    check(n_hold > 0, "hold seen");            check(n_wready > 0, "weights-ready seen");
    check(n_clear > 0, "clear seen");          check(n_readback > 0, "read-back seen");
    check(n_conv > 0, "convergence seen");     check(n_timeout > 0, "timeout seen");
    check(n_start_ignored > 0, "START ignored seen"); check(n_slverr > 0, "SLVERR seen");
    check(n_bstall > 0, "B back-pressure seen"); check(n_rstall > 0, "R back-pressure seen");
    check(n_hebb > 0, "Hebbian seen");         check(n_stork > 0, "Storkey seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
