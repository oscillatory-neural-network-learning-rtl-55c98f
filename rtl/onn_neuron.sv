// onn_neuron: one neuron of the digital oscillatory neural network.
//
// A neuron is a 16-stage phase-controlled digital oscillator (digital_oscillator)
// fed by its N signed-register synapses (synapse_sum) through a phase
// controller (phase_controller). The synapses weigh the waveforms of all
// oscillators, the sign of the sum is the drive signal, and the phase
// controller resynchronises the oscillator to the rising edges of that drive.
//
// Interface: tick, hold (reset mode), init/init_bit (load the 0 or 180 degree
// phase), weights_row[j] = W_ij, osc_in = every oscillator's output (this
// neuron's own included, so self-coupling W_ii is possible); outputs osc and
// resync, high on a tick on which the phase changed.
// Timing: the drive is combinational from the oscillator outputs; a phase
// change takes effect on the tick that detects it.
//
// A neuron made of a phase-controlled 16-stage oscillator and signed-register
// synapses follows the architecture this RTL implements; how the three parts
// interact (sign of the sum, copy-on-rising-edge) is this design's own.
module onn_neuron #(
  parameter int unsigned N      = 25,
  parameter int unsigned WB     = 5,
  parameter int unsigned STAGES = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,
  input  logic                 hold,
  input  logic                 init,
  input  logic                 init_bit,
  input  logic [N-1:0][WB-1:0] weights_row,
  input  logic [N-1:0]         osc_in,
  output logic                 osc,
  output logic                 resync
);
  logic drive, rise;

  synapse_sum #(.N(N), .WB(WB)) u_syn (
    .weights_row (weights_row),
    .osc_in      (osc_in),
    .own         (osc),
    .sum         (),
    .drive       (drive)
  );

  phase_controller u_pc (
    .clk, .rst_n, .tick, .hold, .init,
    .drive    (drive),
    .osc_rise (rise),
    .resync   (resync)
  );

  digital_oscillator #(.STAGES(STAGES)) u_osc (
    .clk, .rst_n, .tick, .hold, .init, .init_bit,
    .resync (resync),
    .osc    (osc),
    .rise   (rise)
  );
endmodule
