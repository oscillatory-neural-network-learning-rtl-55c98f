// weight_memory: re-programmable synapse registers of the ONN.
//
// Holds the full N x N matrix of signed WB-bit weights as registers, so all
// N*N synapses are read in parallel by the network. Weights are transferred
// packed, WPW = floor(32/WB) per 32-bit word (6 at 5 bits, 8 at 4 bits, 10 at
// 3 bits), in row-major order: word a, field k (bits [k*WB +: WB]) holds
// weight number a*WPW + k = i*N + j, i.e. W[i][j]. Unused fields of the last
// word are ignored on write and read back as zero.
//
// Interface: we/waddr/wdata write one packed word; clear sets every weight to
// zero (it wins over a write in the same clock); raddr/rdata read one packed
// word back combinationally; weights[i][j] is the whole matrix.
// Timing: a write or clear takes effect on the next clock edge.
//
// Signed registers per synapse, the weight reset to zero and several weights
// per 32-bit word follow the architecture this RTL implements; the word layout is
// this design's own.
module weight_memory
  import onn_pkg::*;
#(
  parameter int unsigned N  = 25,
  parameter int unsigned WB = 5,
  localparam int unsigned WPW   = weights_per_word(WB),
  localparam int unsigned WORDS = weight_words(N, WB),
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        we,
  input  logic [AW-1:0]               waddr,
  input  logic [31:0]                 wdata,
  input  logic                        clear,
  input  logic [AW-1:0]               raddr,
  output logic [31:0]                 rdata,
  output logic [N-1:0][N-1:0][WB-1:0] weights
);
  logic [N*N-1:0][WB-1:0] mem;   // mem[i*N+j] = W[i][j]

  initial begin
    assert (WB >= 2 && WB <= 16) else $error("weight_memory: WB out of range");
  end

  for (genvar l = 0; l < N * N; l++) begin : g_w
    localparam int unsigned A = l / WPW;
    localparam int unsigned K = l % WPW;
    always_ff @(posedge clk) begin
      if (!rst_n || clear)                    mem[l] <= '0;
      else if (we && waddr == AW'(A))         mem[l] <= wdata[K*WB +: WB];
    end
  end

  always_comb begin
    rdata = '0;
    for (int k = 0; k < WPW; k++) begin
      if (int'(raddr) * WPW + k < N * N)
        rdata[k*WB +: WB] = mem[int'(raddr) * WPW + k];
    end
  end

  assign weights = mem;
endmodule
