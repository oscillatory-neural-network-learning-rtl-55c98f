// onn_regs: register map and command decoder of the ONN programmable logic.
//
// Four 32-bit registers carry every command and datum between the processor
// and the network (byte address = 4 * index):
//   0x0 CTRL    write: bit0 START inference, bit1 WMODE (1 = weight update,
//               ONN held in reset), bit2 CLEAR all weights to zero, bit3 ACK
//               (clear the done and weights-ready flags). START, CLEAR and
//               ACK are pulses; WMODE is a level kept until rewritten.
//               read (status): bit0 busy, bit1 done, bit2 timeout, bit3
//               wmode, bit4 weights-ready, bits[15:8] periods of the last
//               inference.
//   0x4 ADDR    word pointer for WDATA and PATTERN, auto-incremented by each
//               access to either.
//   0x8 WDATA   write/read the packed weight word at ADDR.
//   0xC PATTERN write: input pattern word ADDR (bit i = neuron 32*ADDR+i);
//               read: output pattern word ADDR of the last inference.
// Weight update: the processor sets WMODE, which holds the ONN in reset,
// writes the weights (and CLEAR if wanted) and clears WMODE; the falling edge
// of WMODE sets weights-ready, which tells the processor the update is over.
// Inference: write the pattern, write START (ignored in WMODE), wait for
// done (status bit or irq_done), read PATTERN.
//
// Timing: register writes act on the clock after the strobe; reads are
// combinational from rd_idx and captured by the AXI slave.
//
// That the processor drives learning, inference and a weight reset command,
// and that the ONN is in reset while weights are written and reports the end
// of the update, follow the architecture this RTL implements; the register map is
// this design's own.
module onn_regs
  import onn_pkg::*;
#(
  parameter int unsigned N  = 25,
  parameter int unsigned WB = 5,
  localparam int unsigned WWORDS = weight_words(N, WB),
  localparam int unsigned WAW    = (WWORDS > 1) ? $clog2(WWORDS) : 1,
  localparam int unsigned PWORDS = pattern_words(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  // register port from the AXI slave
  input  logic            wr_en,
  input  logic [1:0]      wr_idx,
  input  logic [31:0]     wr_data,
  input  logic            rd_en,
  input  logic [1:0]      rd_idx,
  output logic [31:0]     rd_data,
  // weight memory
  output logic            w_we,
  output logic [WAW-1:0]  w_waddr,
  output logic [31:0]     w_wdata,
  output logic            w_clear,
  output logic [WAW-1:0]  w_raddr,
  input  logic [31:0]     w_rdata,
  // ONN core
  output logic            onn_hold,
  output logic            onn_start,
  output logic [N-1:0]    pattern_in,
  input  logic            onn_busy,
  input  logic            onn_done,
  input  logic            onn_timeout,
  input  logic [N-1:0]    pattern_out,
  input  logic [7:0]      onn_periods,
  output logic            irq_done
);
  logic [31:0] addr;
  logic        wmode, done_f, timeout_f, wready_f;
  logic [PWORDS*32-1:0] pin_words, pout_words;

  logic wr_ctrl, wr_addr, wr_wdata, wr_pat, rd_wdata, rd_pat;

  assign wr_ctrl  = wr_en && wr_idx == REG_CTRL;
  assign wr_addr  = wr_en && wr_idx == REG_ADDR;
  assign wr_wdata = wr_en && wr_idx == REG_WDATA;
  assign wr_pat   = wr_en && wr_idx == REG_PATTERN;
  assign rd_wdata = rd_en && rd_idx == REG_WDATA;
  assign rd_pat   = rd_en && rd_idx == REG_PATTERN;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr      <= '0;
      wmode     <= 1'b0;
      done_f    <= 1'b0;
      timeout_f <= 1'b0;
      wready_f  <= 1'b0;
      pin_words <= '0;
      onn_start <= 1'b0;
      w_clear   <= 1'b0;
    end else begin
      onn_start <= 1'b0;
      w_clear   <= 1'b0;
      if (wr_ctrl) begin
        wmode <= wr_data[CTRL_WMODE];
        if (wr_data[CTRL_WMODE] && !wmode) wready_f <= 1'b0;
        if (!wr_data[CTRL_WMODE] && wmode) wready_f <= 1'b1;
        if (wr_data[CTRL_CLEAR]) w_clear <= 1'b1;
        if (wr_data[CTRL_ACK]) begin
          done_f   <= 1'b0;
          wready_f <= 1'b0;
        end
        if (wr_data[CTRL_START] && !wr_data[CTRL_WMODE]) begin
          onn_start <= 1'b1;
          done_f    <= 1'b0;
        end
      end
      if (wr_addr) addr <= wr_data;
      else if (wr_wdata || wr_pat || rd_wdata || rd_pat) addr <= addr + 32'd1;
      if (wr_pat && addr < PWORDS) pin_words[addr[$clog2(PWORDS+1)-1:0]*32 +: 32] <= wr_data;
      if (onn_done) begin
        done_f    <= 1'b1;
        timeout_f <= onn_timeout;
      end
    end
  end

  // weight memory port
  assign w_we    = wr_wdata && addr < WWORDS;
  assign w_waddr = WAW'(addr);
  assign w_wdata = wr_data;
  assign w_raddr = WAW'(addr);

  assign onn_hold   = wmode;
  assign pattern_in = pin_words[N-1:0];
  assign irq_done   = done_f || wready_f;

  always_comb begin
    pout_words          = '0;
    pout_words[N-1:0]   = pattern_out;
  end

  always_comb begin
    rd_data = '0;
    case (rd_idx)
      REG_CTRL: begin
        rd_data[STAT_BUSY]         = onn_busy;
        rd_data[STAT_DONE]         = done_f;
        rd_data[STAT_TIMEOUT]      = timeout_f;
        rd_data[STAT_WMODE]        = wmode;
        rd_data[STAT_WREADY]       = wready_f;
        rd_data[STAT_PERIODS +: 8] = onn_periods;
      end
      REG_ADDR:    rd_data = addr;
      REG_WDATA:   rd_data = (addr < WWORDS) ? w_rdata : 32'd0;
      REG_PATTERN: rd_data = (addr < PWORDS) ? pout_words[addr[$clog2(PWORDS+1)-1:0]*32 +: 32] : 32'd0;
      default:     rd_data = '0;
    endcase
  end
endmodule
