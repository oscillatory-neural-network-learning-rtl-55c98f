// osc_tick_gen: phase-step clock enable for the digital oscillators.
//
// A 16-stage oscillator advances one stage per tick, so one oscillation
// period takes STAGES ticks and the tick rate must be STAGES * OSC_HZ.
// The generator is a fractional accumulator: each clock it adds
// STAGES * OSC_HZ and, when the sum reaches CLK_HZ, it subtracts CLK_HZ and
// emits a one-clock `tick`. The average rate is exact even when CLK_HZ is not
// a multiple of the tick rate (100 MHz / 3 MHz gives 33 or 34 clocks between
// ticks).
//
// Interface: clk, synchronous active-low rst_n, output tick (one clock wide).
// Timing: the first tick comes ceil(CLK_HZ / (STAGES*OSC_HZ)) clocks after
// reset is released.
//
// The 187.5 kHz oscillation frequency and the 16 stages follow the architecture
// this RTL implements; the 100 MHz PL clock and the accumulator are this
// design's own choices.
module osc_tick_gen #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned OSC_HZ = 187_500,
  parameter int unsigned STAGES = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam longint unsigned STEP = longint'(STAGES) * longint'(OSC_HZ);
  localparam int unsigned AW = $clog2(longint'(CLK_HZ) + STEP + 1);

  logic [AW-1:0] acc;
  logic [AW:0]   next_sum;

  initial begin
    assert (STEP <= longint'(CLK_HZ))
      else $error("osc_tick_gen: tick rate above the clock rate");
  end

  always_comb next_sum = {1'b0, acc} + (AW+1)'(STEP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc  <= '0;
      tick <= 1'b0;
    end else if (next_sum >= (AW+1)'(CLK_HZ)) begin
      acc  <= AW'(next_sum - (AW+1)'(CLK_HZ));
      tick <= 1'b1;
    end else begin
      acc  <= AW'(next_sum);
      tick <= 1'b0;
    end
  end
endmodule
