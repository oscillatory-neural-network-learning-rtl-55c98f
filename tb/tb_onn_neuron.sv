// tb_onn_neuron: one neuron (index 0) of a 25-neuron network, its 24
// presynaptic oscillators replaced by ideal square waves of chosen phase.
// Expected behaviour, worked out from the coupling alone: the neuron ends
// at the phase of sign(sum_j W_0j s_j(t)). For binary phases this is 0
// degrees when the field sum_j W_0j x_j is positive and 180 degrees when
// negative; with every input at 3 steps (67.5 degrees) and positive
// weights it must lock to 3 steps. A neuron loaded with the right phase must
// never resynchronise, one loaded with the wrong phase exactly once within
// the first period. Hold must freeze the output.
`timescale 1ns/1ps
module tb_onn_neuron;
  localparam int N = 25, WB = 5, ST = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic tick = 0, hold = 0, init = 0, init_bit = 0;
  logic [N-1:0][WB-1:0] w;
  logic [N-1:0] oin;
  logic osc, resync;
  int checks = 0, failures = 0;
  int iv;            // tick interval since the load
  int ph [N];        // phase (in steps) of each ideal input wave

  onn_neuron #(.N(N), .WB(WB), .STAGES(ST)) dut (.clk, .rst_n, .tick, .hold, .init, .init_bit,
    .weights_row (w), .osc_in (oin), .osc, .resync);

  always_comb begin
    oin[0] = osc;
    for (int j = 1; j < N; j++) oin[j] = (((iv - ph[j]) % ST + ST) % ST) < ST / 2;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nres;
  task automatic do_tick();
    tick = 1;
    @(posedge clk); #1;
    if (resync === 1'b0) ; // sampled below
    tick = 0;
    iv++;
    @(posedge clk); #1;
  endtask

  always @(posedge clk) if (tick && resync) nres++;

  // load the neuron, run `periods` periods, then compare one more period
  // with the wave of phase exp_ph; returns the number of resyncs seen.
  task automatic run_case(input bit ib, input int exp_ph, input int max_res, input string w_);
    int bad = 0;
    init = 1; init_bit = ib;
    tick = 1; @(posedge clk); #1; tick = 0; init = 0;
    iv = 0; nres = 0;
    @(posedge clk); #1;
    for (int t = 0; t < 2 * ST; t++) do_tick();
    for (int t = 0; t < ST; t++) begin
      if (osc !== ((((iv - exp_ph) % ST + ST) % ST) < ST / 2)) bad++;
      do_tick();
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d intervals off phase %0d", w_, bad, exp_ph); end
    checks++;
    if (nres > max_res || (max_res > 0 && nres == 0)) begin
      failures++; $display("FAIL %s: %0d resyncs, limit %0d", w_, nres, max_res);
    end
  endtask

  initial begin
    int h, okb;
    for (int j = 0; j < N; j++) ph[j] = 0;
    w = '0;
    iv = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // random binary cases
    for (int trial = 0; trial < 40; trial++) begin
      do begin
        h = 0;
        for (int j = 1; j < N; j++) begin
          w[j] = WB'($urandom_range(0, 31));
          ph[j] = $urandom_range(0, 1) ? 8 : 0;
          h += int'($signed(w[j])) * (ph[j] == 0 ? 1 : -1);
        end
      end while (h == 0);
      w[0] = '0;
      okb = (h > 0) ? 0 : 1;   // bit of the expected phase
      run_case(okb[0], okb * 8, 0, "right phase");
      run_case(!okb[0], okb * 8, 1, "wrong phase");
    end
    // every input at 3 steps, positive weights: lock to 3 steps
    for (int j = 1; j < N; j++) begin ph[j] = 3; w[j] = 5'd2; end
    run_case(1'b0, 3, 2, "intermediate phase");
    // hold freezes the oscillator
    begin
      logic o0;
      int changes;
      o0 = osc;
      changes = 0;
      hold = 1;
      for (int t = 0; t < 20; t++) begin do_tick(); if (osc !== o0) changes++; end
      hold = 0;
      checks++; if (changes != 0) begin failures++; $display("FAIL: output moved in hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
