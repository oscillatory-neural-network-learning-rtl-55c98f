// onn_core: fully connected digital oscillatory neural network (ONN) with
// pattern load, settling detection and phase read-out.
//
// N neurons (onn_neuron) are coupled all-to-all through the weight matrix
// W[i][j]. An inference proceeds as follows:
//   1. start (a one-clock pulse, ignored while hold is high) is remembered
//      until the next tick. On that tick every oscillator is loaded with the
//      phase of its input bit (0 degrees for 0, 180 degrees for 1) and the
//      reference period restarts; the following tick interval is the first
//      of period 1.
//   2. The phases evolve: each neuron copies the phase of the sign of its
//      weighted input at every rising edge of that sign.
//   3. At the end of each oscillation period (STAGES ticks) the core checks
//      whether any neuron changed phase during the period. A period without
//      a change means the network has settled: done pulses, pattern_out is
//      valid. After MAX_PERIODS periods without settling the core stops as
//      well and raises timeout with done.
// Read-out: once per period, a quarter period after the reference rising
// edge, each output is compared with the reference: equal gives 0 (in
// phase), different gives 1 (anti-phase). The reference is an uncoupled
// wave made from the core's tick counter, so all N neurons carry data.
//
// Interface: tick (phase-step enable), hold (reset mode during weight
// update: oscillators frozen, a running inference is abandoned), start,
// pattern_in (sampled on the load tick), weights[i][j] (signed WB bits);
// busy, done (one clock), timeout (valid with done), pattern_out (held until
// the next inference ends), periods (periods used by the last inference).
// Timing: an inference ends at the end of the first period without a phase
// change, i.e. periods*STAGES ticks after the load tick: one period for a
// stored pattern, two when every correction happens within the first
// period, more when corrections trigger further ones.
//
// The all-to-all coupling, the 0/180 degree coding and the reference
// comparison follow the architecture this RTL implements; the settling test, the
// period limit and the read-out instant are this design's own choices.
module onn_core #(
  parameter int unsigned N           = 25,
  parameter int unsigned WB          = 5,
  parameter int unsigned STAGES      = 16,
  parameter int unsigned MAX_PERIODS = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         tick,
  input  logic                         hold,
  input  logic                         start,
  input  logic [N-1:0]                 pattern_in,
  input  logic [N-1:0][N-1:0][WB-1:0]  weights,
  output logic                         busy,
  output logic                         done,
  output logic                         timeout,
  output logic [N-1:0]                 pattern_out,
  output logic [7:0]                   periods
);
  localparam int unsigned CW     = $clog2(STAGES);
  localparam int unsigned SAMPLE = STAGES / 4;

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_RUN} state_e;
  state_e state;

  logic [CW-1:0] cnt;          // tick interval within the reference period
  logic [N-1:0]  osc, resync;
  logic [N-1:0]  sample;
  logic          changed;      // a phase changed in the current period
  logic          load;
  logic          ref_wave;
  logic          changed_now;

  initial begin
    assert (MAX_PERIODS >= 2 && MAX_PERIODS <= 255)
      else $error("onn_core: MAX_PERIODS out of range");
  end

  assign load        = tick && !hold && state == S_ARMED;
  assign ref_wave    = cnt < CW'(STAGES / 2);
  assign changed_now = changed || (|resync);

  for (genvar i = 0; i < N; i++) begin : g_neuron
    onn_neuron #(.N(N), .WB(WB), .STAGES(STAGES)) u_neuron (
      .clk, .rst_n, .tick, .hold,
      .init        (load),
      .init_bit    (pattern_in[i]),
      .weights_row (weights[i]),
      .osc_in      (osc),
      .osc         (osc[i]),
      .resync      (resync[i])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      changed     <= 1'b0;
      sample      <= '0;
      done        <= 1'b0;
      timeout     <= 1'b0;
      pattern_out <= '0;
      periods     <= '0;
    end else begin
      done <= 1'b0;
      if (hold) begin
        state <= S_IDLE;
      end else begin
        case (state)
          S_IDLE:  if (start) state <= S_ARMED;
          S_ARMED: if (tick) begin
            state   <= S_RUN;
            cnt     <= '0;
            changed <= 1'b0;
            periods <= '0;
          end
          S_RUN: if (tick) begin
            cnt <= cnt + CW'(1);
            if (cnt == CW'(SAMPLE)) sample <= osc ^ {N{ref_wave}};
            if (cnt == CW'(STAGES - 1)) begin
              periods <= periods + 8'd1;
              changed <= 1'b0;
              if (!changed_now || periods + 8'd1 == 8'(MAX_PERIODS)) begin
                state       <= S_IDLE;
                done        <= 1'b1;
                timeout     <= changed_now;
                pattern_out <= sample;
              end
            end else begin
              changed <= changed_now;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign busy = state != S_IDLE;
endmodule
