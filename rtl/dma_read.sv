// dma_read: the read channel of the DMA group, an AXI4 burst-read master feeding a stream.
//
// On start it reads `beats` consecutive data beats of DW bits from byte address base and
// delivers them, in order, as a valid/ready stream. Reads are split into INCR bursts of at most
// MAX_BURST beats that never cross a 4 KB boundary; one burst is outstanding at a time. R-channel
// back-pressure comes straight from the stream consumer (rready = out_ready). busy is high from
// the cycle after start until the last beat has been delivered. base must be aligned to DW/8 bytes.
// Moving image and weight data from DDR over AXI with bursts follows the architecture
// description; burst length and single outstanding burst are this design's own choices.
module dma_read #(
  parameter int DW        = 128,
  parameter int ADDR_W    = 32,
  parameter int MAX_BURST = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [31:0]       beats,
  output logic              busy,
  // AXI4 read address channel
  output logic [ADDR_W-1:0] m_araddr,
  output logic [7:0]        m_arlen,
  output logic [2:0]        m_arsize,
  output logic [1:0]        m_arburst,
  output logic              m_arvalid,
  input  logic              m_arready,
  // AXI4 read data channel
  input  logic [DW-1:0]     m_rdata,
  input  logic [1:0]        m_rresp,
  input  logic              m_rlast,
  input  logic              m_rvalid,
  output logic              m_rready,
  // stream out
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DW-1:0]     out_data
);

  localparam int BB = DW / 8;                 // bytes per beat
  localparam int BW = $clog2(BB);

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA} state_e;
  state_e state;

  logic [ADDR_W-1:0] addr;
  logic [31:0]       left;       // beats not yet requested
  logic [31:0]       to_recv;    // beats of the current burst still to receive
  logic [31:0]       blen;

  // burst length: min(MAX_BURST, left, beats to the next 4 KB boundary)
  always_comb begin
    logic [31:0] to_4k;
    to_4k = (32'(13'h1000) - 32'(addr[11:0])) >> BW;
    blen  = 32'(MAX_BURST);
    if (left  < blen) blen = left;
    if (to_4k < blen) blen = to_4k;
  end

  assign m_arsize  = 3'(BW);
  assign m_arburst = 2'b01;
  assign m_arvalid = (state == S_ADDR);
  assign m_araddr  = addr;
  assign m_arlen   = 8'(blen - 1);
  assign m_rready  = (state == S_DATA) && out_ready;
  assign out_valid = (state == S_DATA) && m_rvalid;
  assign out_data  = m_rdata;
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; addr <= '0; left <= '0; to_recv <= '0;
    end else begin
      case (state)
        S_IDLE: if (start && beats != 0) begin
          addr  <= base;
          left  <= beats;
          state <= S_ADDR;
        end
        S_ADDR: if (m_arready) begin
          to_recv <= blen;
          left    <= left - blen;
          addr    <= addr + ADDR_W'(blen << BW);
          state   <= S_DATA;
        end
        S_DATA: if (m_rvalid && m_rready) begin
          to_recv <= to_recv - 1;
          if (to_recv == 1) state <= (left == 0) ? S_IDLE : S_ADDR;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI rules: address held while waiting; burst ends where it should
  assert property (@(posedge clk) disable iff (!rst_n) m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr))
    else $error("dma_read: AR changed before handshake");
  assert property (@(posedge clk) disable iff (!rst_n) m_rvalid && m_rready |-> (m_rlast == (to_recv == 1)))
    else $error("dma_read: RLAST does not match the burst length");
  assert property (@(posedge clk) disable iff (!rst_n) m_rvalid && m_rready |-> m_rresp == 2'b00)
    else $error("dma_read: error response");

endmodule
