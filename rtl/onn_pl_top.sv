// onn_pl_top: programmable-logic half of the ONN on-chip learning system.
//
// A fully connected digital oscillatory neural network (ONN) whose weights
// can be rewritten at run time, attached as an AXI4-Lite slave to a
// processor. The processor runs the learning rule (Hebbian or Storkey) in
// software, rescales the weights to WB-bit signed values and writes them into
// the weight memory while the network is held in reset; for an inference it
// writes an input pattern, starts the network and reads back the settled
// output pattern.
//
// Blocks:
//   axi_lite_slave  AXI4-Lite protocol, four 32-bit registers
//   onn_regs        register map, commands, status and done flags
//   weight_memory   N x N signed WB-bit synapse registers
//   osc_tick_gen    phase-step enable, STAGES * OSC_HZ from CLK_HZ
//   onn_core        N coupled 16-stage oscillators, settling detection and
//                   read-out against a reference phase
//
// Interface: clk / rst_n (synchronous, active low), the AXI4-Lite slave port
// (4 address bits, 32 data bits) and irq_done, high while the inference-done
// or weights-ready flag is set.
// Timing: one oscillation period is STAGES ticks = 1/OSC_HZ (5.33 us at
// 187.5 kHz); an inference ends one period after the last phase change,
// typically two periods after the start for an input one update away from
// a stored pattern.
//
// The PS/PL split, the AXI4-Lite link with four 32-bit registers, the
// 16-stage oscillators, the 5-bit signed synapses, the 25-neuron size and the
// 187.5 kHz oscillation follow the architecture this RTL implements; the 100 MHz
// clock, the register map and the control details are this design's own.
module onn_pl_top
  import onn_pkg::*;
#(
  parameter int unsigned N           = 25,
  parameter int unsigned WB          = 5,
  parameter int unsigned STAGES      = 16,
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned OSC_HZ      = 187_500,
  parameter int unsigned MAX_PERIODS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [3:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic        irq_done
);
  localparam int unsigned WWORDS = weight_words(N, WB);
  localparam int unsigned WAW    = (WWORDS > 1) ? $clog2(WWORDS) : 1;

  logic        wr_en, rd_en;
  logic [1:0]  wr_idx, rd_idx;
  logic [31:0] wr_data, rd_data;

  logic           w_we, w_clear;
  logic [WAW-1:0] w_waddr, w_raddr;
  logic [31:0]    w_wdata, w_rdata;
  logic [N-1:0][N-1:0][WB-1:0] weights;

  logic         tick, onn_hold, onn_start, onn_busy, onn_done, onn_timeout;
  logic [N-1:0] pattern_in, pattern_out;
  logic [7:0]   onn_periods;

  axi_lite_slave #(.ADDR_W(4)) u_axi (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .wr_en, .wr_idx, .wr_data, .rd_en, .rd_idx, .rd_data
  );

  onn_regs #(.N(N), .WB(WB)) u_regs (
    .clk, .rst_n,
    .wr_en, .wr_idx, .wr_data, .rd_en, .rd_idx, .rd_data,
    .w_we, .w_waddr, .w_wdata, .w_clear, .w_raddr, .w_rdata,
    .onn_hold, .onn_start, .pattern_in,
    .onn_busy, .onn_done, .onn_timeout, .pattern_out, .onn_periods,
    .irq_done
  );

  weight_memory #(.N(N), .WB(WB)) u_wmem (
    .clk, .rst_n,
    .we (w_we), .waddr (w_waddr), .wdata (w_wdata), .clear (w_clear),
    .raddr (w_raddr), .rdata (w_rdata),
    .weights (weights)
  );

  osc_tick_gen #(.CLK_HZ(CLK_HZ), .OSC_HZ(OSC_HZ), .STAGES(STAGES)) u_tick (
    .clk, .rst_n, .tick
  );

  onn_core #(.N(N), .WB(WB), .STAGES(STAGES), .MAX_PERIODS(MAX_PERIODS)) u_core (
    .clk, .rst_n, .tick,
    .hold        (onn_hold),
    .start       (onn_start),
    .pattern_in  (pattern_in),
    .weights     (weights),
    .busy        (onn_busy),
    .done        (onn_done),
    .timeout     (onn_timeout),
    .pattern_out (pattern_out),
    .periods     (onn_periods)
  );
endmodule
