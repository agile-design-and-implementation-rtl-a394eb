// axi_mem_model: behavioural model of the external DDR memory behind an AXI4 slave port,
// for testbenches only. Memory is an associative array of DW-bit beats indexed by beat address
// (byte address / (DW/8)). Reads accept INCR bursts and return them after a random delay with
// random gaps; writes accept one beat per address phase (AWLEN = 0). Ready signals are random
// so that the masters see back-pressure. rd_stalls / wr_stalls count cycles the model made a
// master wait. hold_wr lets a testbench refuse writes for a while.
module axi_mem_model #(
  parameter int DW = 128
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [31:0]   araddr,
  input  logic [7:0]    arlen,
  input  logic          arvalid,
  output logic          arready,
  output logic [DW-1:0] rdata,
  output logic [1:0]    rresp,
  output logic          rlast,
  output logic          rvalid,
  input  logic          rready,
  input  logic [31:0]   awaddr,
  input  logic [7:0]    awlen,
  input  logic          awvalid,
  output logic          awready,
  input  logic [DW-1:0] wdata,
  input  logic          wvalid,
  output logic          wready,
  output logic [1:0]    bresp,
  output logic          bvalid,
  input  logic          bready
);
  localparam int SH = $clog2(DW/8);
  logic [DW-1:0] mem [int];
  int rd_stalls = 0, wr_stalls = 0, writes = 0;
  bit hold_wr = 0;   // set by a testbench to refuse writes for a while

  function automatic logic [DW-1:0] rd(input int a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  // read channel
  int r_addr, r_left;
  logic r_busy = 0;
  assign rresp = 2'b00;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arready <= 0; rvalid <= 0; rlast <= 0; rdata <= '0; r_busy <= 0;
    end else begin
      arready <= !r_busy && ($urandom % 3 != 0);
      if (arvalid && arready && !r_busy) begin
        r_busy <= 1; r_addr = int'(araddr >> SH); r_left = int'(arlen) + 1; arready <= 0;
      end
      if (rvalid && rready) begin
        r_addr++; r_left--;
        rvalid <= 0;
        if (r_left == 0) r_busy <= 0;
      end
      if (r_busy && (!rvalid || rready) && r_left > 0 && ($urandom % 4 != 0)) begin
        rvalid <= 1; rdata <= rd(r_addr); rlast <= (r_left == 1);
      end
      if (rvalid && !rready) rd_stalls++;
      if (arvalid && !arready) rd_stalls++;
    end
  end

  // write channel
  logic aw_got = 0, w_got = 0; int w_addr; logic [DW-1:0] w_data;
  assign bresp = 2'b00;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      awready <= 0; wready <= 0; bvalid <= 0; aw_got <= 0; w_got <= 0;
    end else begin
      awready <= !aw_got && !bvalid && !hold_wr && ($urandom % 3 != 0);
      wready  <= !w_got && !bvalid && ($urandom % 3 != 0);
      if (awvalid && awready && !aw_got) begin
        aw_got <= 1; w_addr = int'(awaddr >> SH); awready <= 0;
        if (awlen != 0) $error("axi_mem_model: only single-beat writes are modelled");
      end
      if (wvalid && wready && !w_got) begin w_got <= 1; w_data = wdata; wready <= 0; end
      if (aw_got && w_got && !bvalid) begin
        mem[w_addr] = w_data; writes++;
        bvalid <= 1; aw_got <= 0; w_got <= 0;
      end
      if (bvalid && bready) bvalid <= 0;
      if ((awvalid && !awready) || (wvalid && !wready)) wr_stalls++;
    end
  end
endmodule
