// phase_controller: phase control of one digital oscillator.
//
// The neuron's drive signal is the sign of its weighted synaptic sum, itself
// a square wave whose phase is the phase the couplings pull the neuron
// towards. The controller watches, tick by tick, for a rising edge of the
// drive signal. When the drive rises on a tick interval in which the
// oscillator itself did not rise, it requests `resync`, and the oscillator
// restarts its wave as if it had risen on that interval: the oscillator
// copies the phase of its input, to the 22.5 degree step. When both rise
// together the phases already agree and nothing happens.
//
// Interface: tick (phase-step enable), hold (reset mode: no request, history
// frozen), init (pattern load: the edge history is set to "drive low", so a drive
// that is high on the first interval of the new period counts as a rising
// edge there, where the reference and the in-phase oscillators rise too), drive,
// osc_rise from the oscillator, and resync, a combinational request that is
// valid while tick is high.
//
// Copying the phase on each rising edge is this design's own phase-control
// law; it makes a binary pattern settle in one or two oscillation periods.
module phase_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic hold,
  input  logic init,
  input  logic drive,
  input  logic osc_rise,
  output logic resync
);
  logic drive_q;   // drive signal on the previous tick interval

  always_ff @(posedge clk) begin
    if (!rst_n)                drive_q <= 1'b1;
    else if (tick && !hold)    drive_q <= init ? 1'b0 : drive;
  end

  assign resync = tick && !hold && !init && drive && !drive_q && !osc_rise;
endmodule
