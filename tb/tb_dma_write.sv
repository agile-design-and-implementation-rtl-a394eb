// tb_dma_write: self-checking test of the strided write DMA against the memory model.
// Random beats are offered with random gaps; each must land at base + i*stride, nothing else may
// be written, and busy must fall after the last response.
module tb_dma_write;
  localparam int DW = 64;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [31:0] base = 0, stride = 0, count = 0;
  logic [31:0] awaddr; logic [7:0] awlen; logic [2:0] awsize; logic [1:0] awburst; logic awvalid, awready;
  logic [DW-1:0] wdata; logic [DW/8-1:0] wstrb; logic wlast, wvalid, wready; logic [1:0] bresp; logic bvalid, bready;
  logic in_valid = 0, in_ready; logic [DW-1:0] in_data = '0;
  logic [31:0] araddr = 0; logic [7:0] arlen = 0; logic arvalid = 0, arready, rlast, rvalid, rready = 0;
  logic [DW-1:0] rdata; logic [1:0] rresp;
  always #5 clk = ~clk;

  dma_write #(.DW(DW)) dut (.clk, .rst_n, .start, .base, .stride, .count, .busy,
    .m_awaddr(awaddr), .m_awlen(awlen), .m_awsize(awsize), .m_awburst(awburst), .m_awvalid(awvalid),
    .m_awready(awready), .m_wdata(wdata), .m_wstrb(wstrb), .m_wlast(wlast), .m_wvalid(wvalid),
    .m_wready(wready), .m_bresp(bresp), .m_bvalid(bvalid), .m_bready(bready),
    .in_valid, .in_ready, .in_data);
  axi_mem_model #(.DW(DW)) mem (.clk, .rst_n, .araddr, .arlen, .arvalid, .arready, .rdata, .rresp,
    .rlast, .rvalid, .rready, .awaddr, .awlen, .awvalid, .awready, .wdata, .wvalid, .wready,
    .bresp, .bvalid, .bready);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic xfer(input int b, input int st, input int n);
    logic [DW-1:0] d [];
    int w0;
    d = new[n]; w0 = mem.writes;
    @(negedge clk); base = b; stride = st; count = n; start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      d[i] = {$urandom, $urandom};
      @(negedge clk);
      while ($urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = d[i];
      @(posedge clk); while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    wait (!busy);
    for (int i = 0; i < n; i++) check(mem.mem[(b + i*st)/8] == d[i], $sformatf("beat %0d", i));
    check(mem.writes - w0 == n, "one write per beat");
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    xfer(32'h100, 8, 10);
    xfer(32'h1000, 32, 12);
    xfer(32'h4000, 24, 1);
    check(mem.wr_stalls > 0, "memory applied back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
