// onn_capacity_run: one capacity experiment on onn_pl_top with N neurons
// and WB-bit weights (all other parameters at their defaults). Used by
// tb_onn_capacity, which runs it for 25 neurons at 5, 4 and 3 bits and for
// 35 neurons at 5 bits (two pattern words per transfer).
//
// For each learning rule (Hebbian, Storkey), each number of training
// patterns P (1 to 25 random patterns learnt one at a time) and each Hamming
// distance d (0 to 12 flipped bits, up to N/2), it runs TRIALS inferences
// from a training pattern with d random bits flipped. It counts how often
// the network returns exactly that training pattern. The success rates and
// the weight-transfer time are printed; they are measured, not checked.
// What is checked, independently of the network's own dynamics:
//   - every inference ends;
//   - a training pattern that is a fixed point of the quantised weights
//     (sign(W x) = x) is returned unchanged after one period;
//   - every settled output that did not hit the period limit is itself a
//     fixed point of the quantised weights;
//   - with P <= 2 the training patterns are recalled from d = 0.
`timescale 1ns/1ps
module onn_capacity_run #(
  parameter int N  = 25,
  parameter int WB = 5
) (
  output int  checks,
  output int  failures,
  output bit  finished
);
  import onn_pkg::*;

  localparam int PW     = (N + 31) / 32;
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

  onn_pl_top #(.N(N), .WB(WB)) dut (
    .clk, .rst_n,
    .s_axi_awaddr (awaddr), .s_axi_awvalid (awvalid), .s_axi_awready (awready),
    .s_axi_wdata (wdata), .s_axi_wstrb (wstrb), .s_axi_wvalid (wvalid), .s_axi_wready (wready),
    .s_axi_bresp (bresp), .s_axi_bvalid (bvalid), .s_axi_bready (bready),
    .s_axi_araddr (araddr), .s_axi_arvalid (arvalid), .s_axi_arready (arready),
    .s_axi_rdata (rdata), .s_axi_rresp (rresp), .s_axi_rvalid (rvalid), .s_axi_rready (rready),
    .irq_done
  );

  initial begin checks = 0; failures = 0; finished = 0; end
  int n_hold = 0, n_wready = 0, n_clear = 0, n_readback = 0, n_conv = 0, n_timeout = 0,
      n_start_ignored = 0, n_slverr = 0, n_bstall = 0, n_rstall = 0, n_hebb = 0, n_stork = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask


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
    logic [PW*32-1:0] pw = '0, po;
    pw[N-1:0] = pin;
    wr(4'h4, 32'd0);
    for (int k = 0; k < PW; k++) wr(4'hC, pw[k*32 +: 32]);
    wr(4'h0, 32'h1 << CTRL_START);
    t0 = $realtime;
    while (!irq_done) @(posedge clk);
    t_ns = $realtime - t0;
    rd(4'h0, st);
    check(st[STAT_DONE] && !st[STAT_BUSY], "done status");
    tmo = st[STAT_TIMEOUT];
    per = int'(st[STAT_PERIODS +: 8]);
    wr(4'h4, 32'd0);
    for (int k = 0; k < PW; k++) begin
      rd(4'hC, d);
      po[k*32 +: 32] = d;
    end
    pout = po[N-1:0];
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

  localparam int TRIALS = 10;
  localparam int PS_LIST [7] = '{1, 2, 3, 5, 8, 12, 25};
  localparam int HD_LIST [5] = '{0, 2, 4, 8, 12};

  function automatic bit is_fixed(input logic [N-1:0] x);
    int steps; bit fx;
    logic [N-1:0] y = hopfield(x, steps, fx);
    return fx && steps == 0;
  endfunction

  initial begin
    logic [N-1:0] pats [25];
    logic [N-1:0] pin, pout;
    bit tmo;
    int per;
    real t_ns;
    int ok_cnt [2][7][5];
    realtime t0, t_send;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    for (int rule = 0; rule < 2; rule++) begin
      for (int pi = 0; pi < 7; pi++) begin
        automatic int P = PS_LIST[pi];
        for (int h = 0; h < 5; h++) ok_cnt[rule][pi][h] = 0;
        for (int tr = 0; tr < TRIALS; tr++) begin
          learn_clear();
          for (int k = 0; k < P; k++) begin
            pats[k] = N'({$urandom, $urandom});
            if (rule == 0) learn_hebbian(pats[k]); else learn_storkey(pats[k]);
          end
          rescale();
          t0 = $realtime;
          send_weights();
          t_send = $realtime - t0;
          for (int h = 0; h < 5; h++) begin
            automatic int k = $urandom_range(0, P - 1);
            pin = flip(pats[k], HD_LIST[h]);
            infer(pin, pout, tmo, per, t_ns);
            if (pout == pats[k]) ok_cnt[rule][pi][h]++;
            if (!tmo) check(is_fixed(pout), $sformatf("settled output %h is a fixed point", pout));
            if (HD_LIST[h] == 0 && is_fixed(pin))
              check(pout == pin && per == 1 && !tmo, "stable training pattern returned in one period");
            if (HD_LIST[h] == 0 && P <= 2)
              check(pout == pin, $sformatf("P=%0d training pattern recalled", P));
          end
        end
      end
    end
    $display("N=%0d, %0d-bit weights: weight transfer %0d words, %0.1f us per update", N, WB, WWORDS, t_send / 1000.0);
    $display("N=%0d, %0d-bit weights: recall rate (%0d trials): rows P, columns d = 0 2 4 8 12", N, WB, TRIALS);
    for (int rule = 0; rule < 2; rule++) begin
      $display("%s", rule == 0 ? "hebbian" : "storkey");
      for (int pi = 0; pi < 7; pi++)
        $display("  P=%2d : %0d %0d %0d %0d %0d", PS_LIST[pi], ok_cnt[rule][pi][0], ok_cnt[rule][pi][1],
                 ok_cnt[rule][pi][2], ok_cnt[rule][pi][3], ok_cnt[rule][pi][4]);
    end
    finished = 1;
  end
endmodule
