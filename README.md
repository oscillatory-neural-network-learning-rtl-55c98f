# Digital oscillatory neural network with re-programmable synapses

An oscillatory neural network (ONN) computes with the phases of coupled
oscillators. Each neuron oscillates at the same frequency. A binary value is
coded by the neuron's phase relative to a reference: 0 degrees means bit 0,
180 degrees means bit 1. The neurons are coupled all-to-all through signed
weights, and the phases settle into a minimum of the network's energy
`E = sum_ij W_ij x_i x_j`, the same energy as a Hopfield network. If the
weights store a set of patterns, the network works as an associative memory:
start it from a corrupted pattern and it settles on the nearest stored one.

This RTL is the programmable-logic half of a system that learns new patterns
while running. A processor runs the learning rule in software (Hebbian or
Storkey), rescales the weights to a few signed bits and writes them into the
network over AXI4-Lite. For an inference it writes a pattern, starts the
network and reads the settled result back. The logic holds:

| module | role |
|---|---|
| `onn_pl_top` | top level: AXI4-Lite slave port, `irq_done` |
| `axi_lite_slave` | AXI4-Lite protocol engine for four 32-bit registers |
| `onn_regs` | register map, commands, status flags |
| `weight_memory` | N x N signed WB-bit synapse registers, written in packed words |
| `osc_tick_gen` | phase-step enable, STAGES x 187.5 kHz from the 100 MHz clock |
| `onn_core` | N neurons, reference phase, settling detection, read-out |
| `onn_neuron` | one neuron: `synapse_sum` + `phase_controller` + `digital_oscillator` |
| `onn_pkg` | register indices, bit positions, word-count functions |

Default size: 25 neurons, 5-bit weights, 16 phase steps per period,
187.5 kHz oscillation, 100 MHz clock. This is the size at which the
architecture's capacity and latency were measured. The architecture was also
sized for 3- and 4-bit weights and for up to 35 neurons; here all of these
are parameters.

## How a neuron oscillates and couples

**Oscillator** (`digital_oscillator`). This is a 16-bit circular shift
register holding one period of a square wave: eight ones and eight zeros.
Each phase-step tick rotates it by one stage, and stage 0 is the output. One
period is therefore 16 ticks, and the phase can take 16 values 22.5 degrees
apart. At 187.5 kHz a tick is 333 ns, or 33 to 34 clocks at 100 MHz
(`osc_tick_gen` uses a fractional accumulator, so the average rate is exact).

**Synapses** (`synapse_sum`). Synapse `j` of neuron `i` is a signed register
`W_ij`. It contributes `+W_ij` while oscillator `j` is high and `-W_ij` while
it is low. The sum of those contributions is itself a waveform. Its sign is
the neuron's *drive*: 1 when the sum is positive, 0 when it is negative, and
the neuron's own output when the sum is exactly zero. With every oscillator at
0 or 180 degrees, the drive is the reference wave when the Hopfield local
field `h_i = sum_j W_ij x_j` is positive, and its inverse when `h_i` is
negative.

**Phase control** (`phase_controller`). This is the part to understand before
changing anything. On every tick interval the controller compares two events:
a rising edge of the drive, and a rising edge of the oscillator. If the drive
rises and the oscillator does not, it requests `resync`. The oscillator then
restarts its wave as if it had risen on that interval. In effect, the neuron
copies the phase of its weighted input, to the nearest 22.5 degree step. When
the two edges coincide, nothing happens. For binary phases this is a Hopfield
update `x_i <- sign(h_i)`. The updates are neither synchronous nor random:
a neuron flips at the instant its drive rises, which is the reference rising
edge (cnt 0) for `h_i > 0` and the falling edge (cnt 8) for `h_i < 0`. Other
neurons see the flip from the next tick on, so a correction made in the first
half of a period can trigger another one in the second half of the same
period. Inputs at intermediate phases lead to intermediate phases: if every
input sits at 67.5 degrees, the neuron locks at 67.5 degrees.

## An inference, tick by tick

1. START arrives from the register block and is held until the next tick.
2. On that tick (the *load tick*) every oscillator is loaded in phase (bit 0)
   or anti-phase (bit 1). The reference period counter restarts. The next
   interval is the first of period 1, where the reference and every
   in-phase neuron rise. The phase controllers' edge history is cleared, so
   a neuron whose drive is already high on that interval, while it starts
   low, gets corrected at once.
3. The phases evolve as described above.
4. At the end of every period (`cnt == 15`) the core asks whether any neuron
   was resynchronised during the period. If none was, the network has
   settled: `done` pulses and `pattern_out` is latched.
5. Each output bit is sampled a quarter period after the reference rising
   edge (cnt 4), as `osc XOR reference`.
6. If the network has not settled after `MAX_PERIODS` (16) periods, the
   core stops with `timeout`. An all-negative coupling, which flips the
   whole network every period, does this.

Latency: a stored pattern ends after exactly 1 period, i.e. 16 ticks or
5.33 us. A pattern that is corrected within the first period ends after 2
periods (10.7 us). Cascaded corrections take more periods. The system this
logic follows measured about 17 us (two to three periods) for the network's
computation alone. The settling rule here stops one period after the last
change, which can be earlier.

The reference is a separate, uncoupled wave (the core's period counter), so
all N neurons carry data. The alternative is to use one of the network's own
oscillators as the reference.

## Register map (AXI4-Lite, 32-bit, byte addresses)

| addr | name | write | read |
|---|---|---|---|
| 0x0 | CTRL / STATUS | bit0 START, bit1 WMODE (level), bit2 CLEAR, bit3 ACK | bit0 busy, bit1 done, bit2 timeout, bit3 wmode, bit4 weights-ready, [15:8] periods |
| 0x4 | ADDR | word pointer | pointer |
| 0x8 | WDATA | packed weights at ADDR, ADDR += 1 | packed weights at ADDR, ADDR += 1 |
| 0xC | PATTERN | input pattern word ADDR, ADDR += 1 | output pattern word ADDR, ADDR += 1 |

- **Weight packing.** `floor(32/WB)` weights fit in one word: 6 at 5 bits, 8
  at 4 bits, 10 at 3 bits. The order is row-major. Field `k` of word `a`
  (bits `[k*WB +: WB]`) is weight number `a*WPW + k = i*N + j`, i.e.
  `W[i][j]`. At the default size the matrix takes 105 words.
- **Full matrix stored.** All `N*N` weights are stored, the diagonal
  included, so the logic supports self-coupling and non-symmetric weights.
  The learning rules used with it write symmetric weights with a zero
  diagonal.
- **Weight update.**
  1. Write CTRL = WMODE. This holds the network in reset: the oscillators
     freeze, a running inference is dropped, and START is ignored.
  2. Set ADDR = 0 and write the words to WDATA (optionally also CLEAR, which
     zeroes every weight).
  3. Write CTRL = 0. The falling edge of WMODE sets *weights-ready* (status
     bit 4 and `irq_done`), telling the processor the update is over.
- **Inference.**
  1. Set ADDR = 0 and write PATTERN.
  2. Write CTRL = START.
  3. Wait for `irq_done` or status bit `done`.
  4. Set ADDR = 0 and read PATTERN.
  5. Write CTRL = ACK to clear the flags.
- **Rejected writes.** The AXI slave handles one transaction per direction at
  a time. It answers a write whose `wstrb` is not `4'hF` with SLVERR and
  drops it.

## Learning rules (processor software, modelled in the testbenches)

For a new pattern `x` (+1 for bit 0, -1 for bit 1) in a network of N neurons:

- Hebbian: `W_ij += x_i x_j / N`
- Storkey: `W_ij += (x_i x_j - x_i h_ji - h_ij x_j) / N`, with
  `h_ij = sum_k W_ik x_k`

Both keep the matrix symmetric with a zero diagonal, and both learn one
pattern at a time without forgetting the earlier ones. The real-valued
matrix is then rescaled to WB bits: divide by the largest magnitude,
multiply by `2^(WB-1)-1`, round. The testbenches use this rescaling; the
system being followed does not say which method it used.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/onn_pkg.sv tb/tb_onn_pl_top.sv \
          --top-module tb_onn_pl_top -Mdir obj -o sim && obj/sim
```

- **`tb_onn_pl_top`** (default parameters, about 0.3 ms simulated). The
  testbench acts as the processor. It learns three patterns one at a time,
  with Hebbian and then with Storkey, and recalls them from 0 to 2 flipped
  bits. Each result is compared with a synchronous Hopfield model of the
  quantised weights and with the stored pattern. It also checks the
  START-to-done time, the weight clear, weight read-back, the period-limit
  timeout, START being ignored during an update, SLVERR, and B/R
  back-pressure, and counts how often each of these happened.
- **`tb_onn_capacity`** (about 15 s of wall time). Runs the capacity
  experiment side by side on four builds through `tb/onn_capacity_run.sv`:
  25 neurons with 5-, 4- and 3-bit weights, and 35 neurons with 5-bit
  weights. The 35-neuron build is the largest reported for on-chip learning
  and needs two PATTERN words. Each build learns P = 1 to 25 random
  patterns and is tested from 0 to 12 flipped bits, with 10 trials per point
  and both rules. It prints the recall-rate table and the time of one whole
  weight-update sequence (105, 79, 63 or 205 words). It checks that every
  settled output is a fixed point of the quantised weights, and that a
  stable training pattern is returned in one period. Storkey keeps
  recalling at pattern counts where Hebbian fails. With 10 trials per point
  the tables are coarse; raise `TRIALS` for smoother curves.
- **Unit testbenches.** These cover each block: random-stimulus models for
  the oscillator, the phase controller, the synapse sum, the weight memory
  and the AXI slave; directed tests for the registers and the core; the
  exact tick count of `osc_tick_gen` over 10^6 clocks.

To change the size, set `N`, `WB`, `STAGES`, `OSC_HZ`, `CLK_HZ` and
`MAX_PERIODS` on `onn_pl_top`. `N` above 32 uses more than one PATTERN word.

## Where this design departs from, or goes beyond, what it follows

- **Followed.** The PS/PL split, AXI4-Lite with four 32-bit registers, the
  16-stage oscillators with 22.5 degree steps, the signed-register synapses
  (5 bits, with 3 and 4 as options), the 25-neuron size, the hold during
  weight update, the "update done" report and the weight-reset command.
- **Own choices.** The oscillator's internals, the coupling (sign of a ±W
  sum), the phase-control law (copy the input phase at its rising edges), the
  settling test, the period limit, the read-out instant, the register map,
  the packing order, the clock and the tick generator. The system followed
  gives only the function of these parts.
- **Oscillation frequency.** Two values appear for it: 187.5 kHz and
  97.7 kHz. The design uses 187.5 kHz. That value matches a network
  computation of two to three periods taking about 17 us. `OSC_HZ` changes
  it.
- **Settling time.** Because of the settling rule, an inference typically
  finishes in 1 to 2 periods rather than the measured 2 to 3.
- **Not included.** The processor, its learning software, its UART link to
  a test computer and its AXI interconnect are outside this RTL. The
  testbenches model the processor's behaviour.
- **Unused bits.** The lint reports some unused bits on purpose: the
  unused top bits of a packed weight word, address bits [1:0], and
  pattern-register bits above N.
