// tb_axi_lite_slave: random AXI4-Lite traffic against the slave, with a
// four-word register model behind its strobe port. Each write presents AW
// and W in a random order and with random gaps and waits a random time
// before bready; it must produce exactly one wr_en with the right index and
// data and an OKAY response, or no wr_en and SLVERR for a partial strobe.
// Each read must give exactly one rd_en and return the model's word with
// rvalid one clock after the AR handshake. No address or data may be
// accepted while a write response is pending.
`timescale 1ns/1ps
module tb_axi_lite_slave;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [3:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] wstrb = 0;
  logic [1:0] bresp, rresp;
  logic wr_en, rd_en;
  logic [1:0] wr_idx, rd_idx;
  logic [31:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  logic [31:0] regs [4];
  int n_wr = 0, n_rd = 0, bad_accept = 0;

  axi_lite_slave #(.ADDR_W(4)) dut (.clk, .rst_n,
    .s_axi_awaddr (awaddr), .s_axi_awvalid (awvalid), .s_axi_awready (awready),
    .s_axi_wdata (wdata), .s_axi_wstrb (wstrb), .s_axi_wvalid (wvalid), .s_axi_wready (wready),
    .s_axi_bresp (bresp), .s_axi_bvalid (bvalid), .s_axi_bready (bready),
    .s_axi_araddr (araddr), .s_axi_arvalid (arvalid), .s_axi_arready (arready),
    .s_axi_rdata (rdata), .s_axi_rresp (rresp), .s_axi_rvalid (rvalid), .s_axi_rready (rready),
    .wr_en, .wr_idx, .wr_data, .rd_en, .rd_idx, .rd_data);

  assign rd_data = regs[rd_idx];
  always @(posedge clk) begin
    if (wr_en) begin regs[wr_idx] <= wr_data; n_wr++; end
    if (rd_en) n_rd++;
    if (bvalid && (awready || wready)) bad_accept++;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  logic [31:0] model [4];

  task automatic axi_write(input logic [3:0] a, input logic [31:0] d, input logic [3:0] s);
    int order = $urandom_range(0, 2);
    int n0 = n_wr;
    awaddr <= a; wdata <= d; wstrb <= s;
    fork
      begin
        if (order == 1) repeat ($urandom_range(1, 3)) @(posedge clk);
        awvalid <= 1;
        do @(posedge clk); while (!awready);
        awvalid <= 0;
      end
      begin
        if (order == 0) repeat ($urandom_range(1, 3)) @(posedge clk);
        wvalid <= 1;
        do @(posedge clk); while (!wready);
        wvalid <= 0;
      end
    join
    repeat ($urandom_range(0, 4)) @(posedge clk);
    bready <= 1;
    do @(posedge clk); while (!bvalid);
    bready <= 0;
    #1;
    if (s == 4'hF) begin
      check(bresp == 2'b00, "OKAY");
      model[a[3:2]] = d;
    end else check(bresp == 2'b10, "SLVERR on partial write");
    check(n_wr - n0 == (s == 4'hF ? 1 : 0), "one register strobe per write");
  endtask

  task automatic axi_read(input logic [3:0] a);
    int n0 = n_rd;
    araddr <= a; arvalid <= 1;
    do @(posedge clk); while (!arready);
    arvalid <= 0;
    #1;
    check(rvalid, "rvalid one clock after AR");
    @(posedge clk);
    repeat ($urandom_range(0, 3)) @(posedge clk);
    rready <= 1;
    do @(posedge clk); while (!rvalid);
    rready <= 0;
    #1;
    check(rdata == model[a[3:2]] && rresp == 2'b00, $sformatf("read reg %0d: %h exp %h", a[3:2], rdata, model[a[3:2]]));
    check(n_rd - n0 == 1, "one read strobe per read");
  endtask

  initial begin
    foreach (regs[i]) begin regs[i] = 0; model[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int c = 0; c < 2000; c++) begin
      if ($urandom_range(0, 1))
        axi_write({$urandom_range(0, 3), 2'b00}, $urandom, ($urandom_range(0, 5) == 0) ? 4'($urandom) : 4'hF);
      else
        axi_read({$urandom_range(0, 3), 2'b00});
    end
    check(bad_accept == 0, "nothing accepted while a response is pending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
