// axi_lite_slave: AXI4-Lite slave front end for four 32-bit registers.
//
// Write path: the address (AW) and data (W) channels are accepted
// independently and in either order; once both are held the slave issues a
// one-clock register write strobe (wr_en, wr_idx = awaddr[3:2], wr_data) and
// raises the B response. Only whole-word writes (wstrb = 4'hF) reach the
// registers; a partial write is dropped and answered with SLVERR. No new
// address or data is accepted while a response waits for bready.
// Read path: when no read data is pending, arready is high; the AR handshake
// clock issues rd_en / rd_idx to the register block, whose combinational
// rd_data is captured into rdata, and rvalid stays high until rready.
// Registers with read side effects (auto-increment) use rd_en.
//
// Interface: standard AXI4-Lite slave signals with ADDR_W address bits and
// 32 data bits, plus the register strobe port.
// Timing: a write completes in two clocks after both AW and W are presented
// (accept, then strobe and response); a read returns data one clock after
// the AR handshake.
//
// The AXI4-Lite bus with four 32-bit registers follows the architecture
// this RTL implements; the one-transaction-at-a-time structure and the handling of
// partial writes are this design's own choices.
module axi_lite_slave #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // register port
  output logic              wr_en,
  output logic [1:0]        wr_idx,
  output logic [31:0]       wr_data,
  output logic              rd_en,
  output logic [1:0]        rd_idx,
  input  logic [31:0]       rd_data
);
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  logic              aw_have, w_have;
  logic [ADDR_W-1:0] aw_addr;
  logic [31:0]       w_data;
  logic [3:0]        w_strb;

  assign s_axi_awready = !aw_have && !s_axi_bvalid;
  assign s_axi_wready  = !w_have  && !s_axi_bvalid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_have      <= 1'b0;
      w_have       <= 1'b0;
      aw_addr      <= '0;
      w_data       <= '0;
      w_strb       <= '0;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= RESP_OKAY;
      wr_en        <= 1'b0;
      wr_idx       <= '0;
      wr_data      <= '0;
    end else begin
      wr_en <= 1'b0;
      if (s_axi_awvalid && s_axi_awready) begin
        aw_have <= 1'b1;
        aw_addr <= s_axi_awaddr;
      end
      if (s_axi_wvalid && s_axi_wready) begin
        w_have <= 1'b1;
        w_data <= s_axi_wdata;
        w_strb <= s_axi_wstrb;
      end
      if (aw_have && w_have) begin
        aw_have      <= 1'b0;
        w_have       <= 1'b0;
        wr_en        <= (w_strb == 4'hF);
        wr_idx       <= aw_addr[3:2];
        wr_data      <= w_data;
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= (w_strb == 4'hF) ? RESP_OKAY : RESP_SLVERR;
      end else if (s_axi_bvalid && s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end
  end

  assign s_axi_arready = !s_axi_rvalid;
  assign rd_en         = s_axi_arvalid && s_axi_arready;
  assign rd_idx        = s_axi_araddr[3:2];
  assign s_axi_rresp   = RESP_OKAY;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else if (rd_en) begin
      s_axi_rvalid <= 1'b1;
      s_axi_rdata  <= rd_data;
    end else if (s_axi_rvalid && s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

  // AXI4-Lite channel rules, checked on the master's side of each channel.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_awvalid && !s_axi_awready |=> s_axi_awvalid && $stable(s_axi_awaddr));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_wvalid && !s_axi_wready |=> s_axi_wvalid && $stable(s_axi_wdata));
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_arvalid && !s_axi_arready |=> s_axi_arvalid && $stable(s_axi_araddr));
  // and on the slave's side
  a_b_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid && $stable(s_axi_bresp));
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
endmodule
