// cnn_accel_top: the CNN accelerator: a systolic-array convolution engine fed from DDR.
//
// The host fills the instruction cache over AXI-Lite and starts a run. The global controller
// steps through the instructions; for each layer the read DMA brings weights and then the input
// feature map from memory through the data pre-processing stage into the ALU (line cache, weight
// buffer, 3-D systolic array, or the external reshape operator), the results pass through the
// buffer group (a FIFO) and the quantization unit, and the write DMA stores the 8-bit output
// map back to memory, where the next layer reads it. irq pulses when the last instruction is done.
// Ports: the AXI-Lite slave of the instruction module, one AXI4 master (read and write channels)
// towards the memory, and the two streams of the reshape operator, which is not part of this RTL.
// Parallelism PAR is both the input- and the output-channel parallelism (array width and height,
// 16 in the main configuration); beats on the memory bus carry PAR bytes, so the bus is PAR*8 bits.
// K*K is the depth of the array (kernel positions). The block structure follows the architecture
// figure; bus widths, handshakes and the layout of data in memory are this design's own.
module cnn_accel_top #(
  parameter int PAR      = 16,
  parameter int K        = 3,
  parameter int GD       = 32,    // channel groups (input channels / PAR) held per PE
  parameter int LB_WORDS = 416,   // line cache words per row: width x channel groups
  parameter int N_INSTR  = 64,
  parameter int DW       = PAR * 8
) (
  input  logic clk,
  input  logic rst_n,
  // AXI-Lite slave (instructions, control)
  input  logic [11:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [11:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // AXI4 master (memory)
  output logic [31:0]   m_araddr,
  output logic [7:0]    m_arlen,
  output logic [2:0]    m_arsize,
  output logic [1:0]    m_arburst,
  output logic          m_arvalid,
  input  logic          m_arready,
  input  logic [DW-1:0] m_rdata,
  input  logic [1:0]    m_rresp,
  input  logic          m_rlast,
  input  logic          m_rvalid,
  output logic          m_rready,
  output logic [31:0]   m_awaddr,
  output logic [7:0]    m_awlen,
  output logic [2:0]    m_awsize,
  output logic [1:0]    m_awburst,
  output logic          m_awvalid,
  input  logic          m_awready,
  output logic [DW-1:0] m_wdata,
  output logic [DW/8-1:0] m_wstrb,
  output logic          m_wlast,
  output logic          m_wvalid,
  input  logic          m_wready,
  input  logic [1:0]    m_bresp,
  input  logic          m_bvalid,
  output logic          m_bready,
  // reshape operator streams
  output logic                               rs_out_valid,
  input  logic                               rs_out_ready,
  output logic [K*K-1:0][PAR-1:0][7:0]       rs_out_data,
  output logic [$clog2(GD)-1:0]              rs_out_g,
  output logic                               rs_out_last,
  input  logic                               rs_in_valid,
  output logic                               rs_in_ready,
  input  logic [PAR-1:0][31:0]               rs_in_data,
  output logic                               irq
);

  localparam int IW = $clog2(N_INSTR);

  logic          start, run_busy;
  logic [IW:0]   num_instr;
  logic [IW-1:0] idx;
  cnn_pkg::layer_cfg_t instr_cfg, cfg;

  instr_unit #(.N_INSTR(N_INSTR)) u_instr (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .start, .num_instr, .run_busy, .run_done(irq), .idx, .cfg(instr_cfg)
  );

  logic route, pp_clear, rd_start, rd_busy, wr_start, wr_busy, lb_start, wclear;
  logic [31:0] rd_base, rd_beats, wr_base, wr_stride, wr_count;
  logic alu_wgt_busy, alu_busy, pp_pending;

  global_controller #(.PAR(PAR), .K(K), .N_INSTR(N_INSTR)) u_ctrl (
    .clk, .rst_n, .start, .num_instr, .idx, .instr_cfg, .cfg,
    .busy(run_busy), .done(irq),
    .route, .pp_clear,
    .rd_start, .rd_base, .rd_beats, .rd_busy,
    .wr_start, .wr_base, .wr_stride, .wr_count, .wr_busy,
    .lb_start, .wclear,
    .alu_wgt_busy(alu_wgt_busy || pp_pending),
    .alu_busy(alu_busy || pp_pending)
  );

  // DMA group: read side
  logic rd_valid, rd_ready;
  logic [DW-1:0] rd_data;
  dma_read #(.DW(DW)) u_dma_rd (
    .clk, .rst_n, .start(rd_start), .base(rd_base), .beats(rd_beats), .busy(rd_busy),
    .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arvalid, .m_arready,
    .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready,
    .out_valid(rd_valid), .out_ready(rd_ready), .out_data(rd_data)
  );

  // data pre-processing
  logic f_valid, f_ready, w_valid, w_ready;
  logic [PAR-1:0][7:0] f_data, w_data;
  logic [31:0] pp_count;
  data_preproc #(.LANES(PAR)) u_pp (
    .clk, .rst_n, .clear(pp_clear), .route, .in_groups(cfg.in_groups), .in_ch(cfg.in_ch),
    .in_valid(rd_valid), .in_ready(rd_ready), .in_data(rd_data),
    .feat_valid(f_valid), .feat_ready(f_ready), .feat_data(f_data),
    .wgt_valid(w_valid), .wgt_ready(w_ready), .wgt_data(w_data),
    .count(pp_count), .pending(pp_pending)
  );

  // ALU
  logic a_valid, a_ready;
  logic [PAR-1:0][31:0] a_data;
  alu #(.K(K), .PAR(PAR), .GD(GD), .LB_WORDS(LB_WORDS)) u_alu (
    .clk, .rst_n, .cfg, .start(lb_start), .wclear,
    .feat_valid(f_valid), .feat_ready(f_ready), .feat_data(f_data),
    .wgt_valid(w_valid), .wgt_ready(w_ready), .wgt_data(w_data),
    .rs_out_valid, .rs_out_ready, .rs_out_data, .rs_out_g, .rs_out_last,
    .rs_in_valid, .rs_in_ready, .rs_in_data,
    .res_valid(a_valid), .res_ready(a_ready), .res_data(a_data),
    .wgt_busy(alu_wgt_busy), .busy(alu_busy)
  );

  // buffer group
  logic bg_valid, bg_ready;
  logic [PAR-1:0][31:0] bg_data;
  stream_fifo #(.W(PAR*32), .DEPTH(16)) u_bufgrp (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid(bg_valid), .out_ready(bg_ready), .out_data(bg_data)
  );

  // quantization unit
  logic q_valid, q_ready;
  logic [PAR-1:0][7:0] q_data;
  quant_unit #(.LANES(PAR)) u_quant (
    .clk, .rst_n, .q_mult(cfg.q_mult), .q_shift(cfg.q_shift), .q_zp(cfg.q_zp),
    .in_valid(bg_valid), .in_ready(bg_ready), .in_data(bg_data),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_data)
  );

  // DMA group: write side
  dma_write #(.DW(DW)) u_dma_wr (
    .clk, .rst_n, .start(wr_start), .base(wr_base), .stride(wr_stride), .count(wr_count),
    .busy(wr_busy),
    .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready, .m_bresp, .m_bvalid, .m_bready,
    .in_valid(q_valid), .in_ready(q_ready), .in_data(q_data)
  );

endmodule
