// digital_oscillator: 16-stage phase-controlled digital oscillator.
//
// The oscillator is a circular shift register of STAGES flip-flops holding
// one period of a square wave: STAGES/2 ones followed by STAGES/2 zeros. On
// every tick it rotates by one stage and stage 0 is the output, so the output
// is a square wave of period STAGES ticks whose phase can take STAGES values,
// 360/STAGES = 22.5 degrees apart. Two binary phases are used for patterns:
// 0 degrees (bit 0, in phase with the reference) and 180 degrees (bit 1).
//
// Controls, all sampled on a tick:
//   init    - load the wave so that the next tick interval is the first of
//             the period: in phase (high for the next STAGES/2 intervals,
//             rising now) for init_bit = 0, anti-phase (low first) for 1.
//   resync  - restart the wave as if its rising edge were on this tick (used
//             by the phase controller to copy the phase of its input).
//   hold    - reset mode (weight update): the register is frozen.
// Priority: hold > init > resync > rotate.
//
// Outputs: osc (stage 0) and rise, high for the tick on which osc goes from
// 0 to 1 (a registered previous value is kept for this).
//
// The 16 stages and the 22.5 degree resolution follow the architecture
// this RTL implements; the shift-register realisation of the stages, the load
// controls and their priority are this design's own choice.
module digital_oscillator #(
  parameter int unsigned STAGES = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic hold,
  input  logic init,
  input  logic init_bit,
  input  logic resync,
  output logic osc,
  output logic rise
);
  localparam int unsigned HALF = STAGES / 2;

  // Stage k holds the output k ticks from now (rotate right each tick).
  // WAVE_RISEN: state one tick after a rising edge (HALF-1 ones left).
  localparam logic [STAGES-1:0] ONES       = {{HALF{1'b0}}, {HALF{1'b1}}};
  localparam logic [STAGES-1:0] WAVE_RISEN = (ONES >> 1) | (ONES << (STAGES - 1));
  localparam logic [STAGES-1:0] WAVE_INPH  = ONES;
  localparam logic [STAGES-1:0] WAVE_ANTI  = ~ONES;

  logic [STAGES-1:0] sr;
  logic              osc_q;   // output before the last tick

  initial begin
    assert (STAGES >= 4 && STAGES % 2 == 0)
      else $error("digital_oscillator: STAGES must be even and >= 4");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr    <= WAVE_RISEN;
      osc_q <= 1'b0;
    end else if (tick && !hold) begin
      osc_q <= init ? 1'b0 : sr[0];
      if (init)        sr <= init_bit ? WAVE_ANTI : WAVE_INPH;
      else if (resync) sr <= WAVE_RISEN;
      else             sr <= {sr[0], sr[STAGES-1:1]};
    end
  end

  assign osc  = sr[0];
  assign rise = sr[0] && !osc_q;
endmodule
