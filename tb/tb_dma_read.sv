// tb_dma_read: self-checking test of the burst-read DMA against the memory model.
// Transfers of several lengths and start addresses (one that crosses a 4 KB boundary, one longer
// than a burst) are read with random consumer back-pressure; every beat must come out in order
// with the memory's content, no burst may cross 4 KB or exceed 16 beats, and busy must fall.
module tb_dma_read;
  localparam int DW = 64;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [31:0] base = 0, beats = 0;
  logic [31:0] araddr; logic [7:0] arlen; logic [2:0] arsize; logic [1:0] arburst; logic arvalid, arready;
  logic [DW-1:0] rdata; logic [1:0] rresp; logic rlast, rvalid, rready;
  logic out_valid, out_ready = 0; logic [DW-1:0] out_data;
  logic [31:0] awaddr = 0; logic [7:0] awlen = 0; logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic [DW-1:0] wdata = '0; logic [1:0] bresp;
  always #5 clk = ~clk;

  dma_read #(.DW(DW)) dut (.clk, .rst_n, .start, .base, .beats, .busy,
    .m_araddr(araddr), .m_arlen(arlen), .m_arsize(arsize), .m_arburst(arburst), .m_arvalid(arvalid),
    .m_arready(arready), .m_rdata(rdata), .m_rresp(rresp), .m_rlast(rlast), .m_rvalid(rvalid),
    .m_rready(rready), .out_valid, .out_ready, .out_data);
  axi_mem_model #(.DW(DW)) mem (.clk, .rst_n, .araddr, .arlen, .arvalid, .arready, .rdata, .rresp,
    .rlast, .rvalid, .rready, .awaddr, .awlen, .awvalid, .awready, .wdata, .wvalid, .wready,
    .bresp, .bvalid, .bready);

  int checks = 0, failures = 0, bursts = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (arvalid && arready) begin
    bursts++;
    check(arlen < 16, "burst length within 16");
    check((araddr >> 12) == ((araddr + (32'(arlen) + 1) * 8 - 1) >> 12), "burst stays inside 4 KB");
  end

  task automatic xfer(input int b, input int n);
    int got = 0;
    for (int i = 0; i < n; i++) mem.mem[b/8 + i] = {$urandom, $urandom};
    @(negedge clk); base = b; beats = n; start = 1; @(negedge clk); start = 0;
    while (got < n) begin
      out_ready = ($urandom % 3) != 0;
      @(posedge clk);
      if (out_valid && out_ready) begin
        check(out_data == mem.mem[b/8 + got], $sformatf("beat %0d", got)); got++;
      end
      @(negedge clk);
    end
    out_ready = 0;
    repeat (2) @(posedge clk);
    #1 check(!busy, "idle after the transfer");
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    xfer(32'h100, 5);
    xfer(32'h0FC0, 40);   // crosses 4 KB after 8 beats
    xfer(32'h2000, 1);
    xfer(32'h3008, 100);
    check(bursts == 1 + 3 + 1 + 7, $sformatf("burst count %0d", bursts));
    check(mem.rd_stalls > 0, "memory applied back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
