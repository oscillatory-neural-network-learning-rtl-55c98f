// synapse_sum: the N synapses of one neuron and their summation.
//
// Each synapse is a signed WB-bit weight W_ij. It passes +W_ij while the
// presynaptic oscillator j is high and -W_ij while it is low, so the sum
// S_i(t) = sum_j W_ij * s_j(t), with s_j = +1/-1, follows the oscillator
// waveforms. The drive output is the sign of that sum: 1 when S_i > 0, 0 when
// S_i < 0, and the neuron's own output when S_i = 0 (no net pull). For
// oscillators at 0 or 180 degrees the drive is the reference wave or its
// inverse according to the sign of the Hopfield local field sum_j W_ij x_j.
//
// Interface: weights_row[j] = W_ij (two's complement), osc_in[j] = output of
// oscillator j, own = this neuron's output; sum and drive are combinational.
//
// Signed-register synapses follow the architecture this RTL implements; the +/-W
// coupling, the sign decision and the zero-sum rule are this design's own.
module synapse_sum #(
  parameter int unsigned N  = 25,
  parameter int unsigned WB = 5,
  localparam int unsigned SW = WB + $clog2(N) + 1
) (
  input  logic [N-1:0][WB-1:0] weights_row,
  input  logic [N-1:0]         osc_in,
  input  logic                 own,
  output logic signed [SW-1:0] sum,
  output logic                 drive
);
  always_comb begin
    sum = '0;
    for (int j = 0; j < N; j++) begin
      if (osc_in[j]) sum = sum + SW'($signed(weights_row[j]));
      else           sum = sum - SW'($signed(weights_row[j]));
    end
  end

  always_comb begin
    if (sum > 0)      drive = 1'b1;
    else if (sum < 0) drive = 1'b0;
    else              drive = own;
  end
endmodule
