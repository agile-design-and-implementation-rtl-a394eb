// dma_write: the write channel of the DMA group, a stream-to-AXI4 write master.
//
// On start it takes `count` beats from the input stream and writes beat i to byte address
// base + i * stride, one single-beat AXI4 write per beat (address and data offered together, the
// next write only after the response). The stride lets the results of one output-channel group be
// interleaved with the other groups of the same pixel in memory. busy is high from the cycle after
// start until the last write response has arrived. Addresses must be aligned to DW/8 bytes.
// Sending results to their place in DDR follows the architecture description; single-beat
// strided writes are this design's own choice.
module dma_write #(
  parameter int DW     = 128,
  parameter int ADDR_W = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [ADDR_W-1:0] stride,
  input  logic [31:0]       count,
  output logic              busy,
  // AXI4 write address channel
  output logic [ADDR_W-1:0] m_awaddr,
  output logic [7:0]        m_awlen,
  output logic [2:0]        m_awsize,
  output logic [1:0]        m_awburst,
  output logic              m_awvalid,
  input  logic              m_awready,
  // AXI4 write data channel
  output logic [DW-1:0]     m_wdata,
  output logic [DW/8-1:0]   m_wstrb,
  output logic              m_wlast,
  output logic              m_wvalid,
  input  logic              m_wready,
  // AXI4 write response channel
  input  logic [1:0]        m_bresp,
  input  logic              m_bvalid,
  output logic              m_bready,
  // stream in
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DW-1:0]     in_data
);

  typedef enum logic [1:0] {S_IDLE, S_GET, S_SEND, S_RESP} state_e;
  state_e state;

  logic [ADDR_W-1:0] addr, step;
  logic [31:0]       left;
  logic              aw_done, w_done;

  assign m_awlen   = 8'd0;
  assign m_awsize  = 3'($clog2(DW/8));
  assign m_awburst = 2'b01;
  assign m_wstrb   = '1;
  assign m_wlast   = 1'b1;
  assign m_awaddr  = addr;
  assign m_awvalid = (state == S_SEND) && !aw_done;
  assign m_wvalid  = (state == S_SEND) && !w_done;
  assign m_bready  = (state == S_RESP);
  assign in_ready  = (state == S_GET);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; addr <= '0; step <= '0; left <= '0;
      aw_done <= 1'b0; w_done <= 1'b0; m_wdata <= '0;
    end else begin
      case (state)
        S_IDLE: if (start && count != 0) begin
          addr  <= base;
          step  <= stride;
          left  <= count;
          state <= S_GET;
        end
        S_GET: if (in_valid) begin
          m_wdata <= in_data;
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          state   <= S_SEND;
        end
        S_SEND: begin
          if (m_awvalid && m_awready) aw_done <= 1'b1;
          if (m_wvalid && m_wready)   w_done  <= 1'b1;
          if ((aw_done || m_awready) && (w_done || m_wready)) state <= S_RESP;
        end
        S_RESP: if (m_bvalid) begin
          addr <= addr + step;
          left <= left - 1;
          state <= (left == 1) ? S_IDLE : S_GET;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr))
    else $error("dma_write: AW changed before handshake");
  assert property (@(posedge clk) disable iff (!rst_n) m_wvalid && !m_wready |=> m_wvalid && $stable(m_wdata))
    else $error("dma_write: W changed before handshake");
  assert property (@(posedge clk) disable iff (!rst_n) m_bvalid && m_bready |-> m_bresp == 2'b00)
    else $error("dma_write: error response");

endmodule
