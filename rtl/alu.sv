// alu: the computing core of the accelerator.
//
// Feature beats enter the input buffer (line_buffer, the line cache), which produces channel-first
// sliding windows; weight beats enter the weight buffer (wb_buffer). An input switch sends the
// windows either to the 3-D systolic array (convolution layers, cfg.op = OP_CONV) or out of the
// block to the reshape operator (cfg.op = OP_RESHAPE). An output switch takes the results of the
// array, or the results returned by the reshape operator, into the output buffer (stream_fifo),
// from which they leave as a stream of ROWS 32-bit values per beat.
// Back-pressure: the array, its weight feed and its window feed all advance together on one
// enable, which is high unless the array holds a result the output buffer cannot take.
// start begins a layer in the line cache; wclear restarts the weight numbering. busy is high while
// windows are still produced, weights still travel, or the array or output buffer holds results.
// The block structure (buffer, switch, systolic array or reshape, switch, buffer) follows the ALU
// figure; the reshape operator itself is not part of this block, its streams are ports.
module alu #(
  parameter int DATA_W   = 8,
  parameter int ACC_W    = 32,
  parameter int K        = 3,
  parameter int PAR      = 16,   // channel parallelism: array columns and rows
  parameter int GD       = 32,
  parameter int LB_WORDS = 416,
  parameter int OB_DEPTH = 8,
  parameter int CW       = (PAR > 1) ? $clog2(PAR) : 1,
  parameter int GW       = $clog2(GD)
) (
  input  logic clk,
  input  logic rst_n,
  input  cnn_pkg::layer_cfg_t cfg,
  input  logic start,
  input  logic wclear,
  // feature beats
  input  logic                            feat_valid,
  output logic                            feat_ready,
  input  logic [PAR-1:0][DATA_W-1:0]      feat_data,
  // weight beats
  input  logic                            wgt_valid,
  output logic                            wgt_ready,
  input  logic [PAR-1:0][DATA_W-1:0]      wgt_data,
  // windows to the reshape operator
  output logic                                  rs_out_valid,
  input  logic                                  rs_out_ready,
  output logic [K*K-1:0][PAR-1:0][DATA_W-1:0]   rs_out_data,
  output logic [GW-1:0]                         rs_out_g,
  output logic                                  rs_out_last,
  // results from the reshape operator
  input  logic                            rs_in_valid,
  output logic                            rs_in_ready,
  input  logic [PAR-1:0][ACC_W-1:0]       rs_in_data,
  // results
  output logic                            res_valid,
  input  logic                            res_ready,
  output logic [PAR-1:0][ACC_W-1:0]       res_data,
  output logic                            wgt_busy,
  output logic                            busy
);

  localparam int KK = K * K;
  logic conv;
  assign conv = (cfg.op == cnn_pkg::OP_CONV);

  // line cache
  logic win_valid, win_ready, win_last;
  logic [KK-1:0][PAR-1:0][DATA_W-1:0] win_data;
  logic [GW-1:0] win_g;
  logic lb_busy;

  line_buffer #(.DATA_W(DATA_W), .COLS(PAR), .K(K), .LB_WORDS(LB_WORDS), .GD(GD)) u_lb (
    .clk, .rst_n, .start, .cfg,
    .in_valid(feat_valid), .in_ready(feat_ready), .in_data(feat_data),
    .win_valid, .win_ready, .win_data, .win_g, .win_last, .busy(lb_busy)
  );

  // weight buffer
  logic pk_valid;
  logic [KK-1:0][PAR-1:0][DATA_W-1:0] pk_wgt;
  logic [CW-1:0] pk_col;
  logic [GW-1:0] pk_g;
  logic wb_busy;
  logic en;

  wb_buffer #(.DATA_W(DATA_W), .KK(KK), .COLS(PAR), .ROWS(PAR), .GD(GD)) u_wb (
    .clk, .rst_n, .clear(wclear),
    .in_valid(wgt_valid), .in_ready(wgt_ready), .in_data(wgt_data),
    .out_valid(pk_valid), .out_ready(en), .out_wgt(pk_wgt), .out_col(pk_col), .out_g(pk_g),
    .busy(wb_busy)
  );

  // input switch
  logic arr_feat_valid;
  assign arr_feat_valid = conv && win_valid;
  assign rs_out_valid   = !conv && win_valid;
  assign rs_out_data    = win_data;
  assign rs_out_g       = win_g;
  assign rs_out_last    = win_last;
  assign win_ready      = conv ? en : rs_out_ready;

  // systolic array
  logic arr_res_valid, arr_busy_w;
  logic [PAR-1:0][ACC_W-1:0] arr_res;
  logic ob_in_valid, ob_in_ready;
  logic [PAR-1:0][ACC_W-1:0] ob_in_data;

  assign en = !arr_res_valid || (conv && ob_in_ready);

  systolic_array_3d #(.DATA_W(DATA_W), .ACC_W(ACC_W), .KK(KK), .COLS(PAR), .ROWS(PAR), .GD(GD))
  u_array (
    .clk, .rst_n, .en,
    .feat_valid(arr_feat_valid), .feat(win_data), .feat_g(win_g), .feat_last(win_last),
    .wgt_valid(pk_valid), .wgt(pk_wgt), .wgt_col(pk_col), .wgt_g(pk_g),
    .wgt_busy(arr_busy_w),
    .res_valid(arr_res_valid), .res(arr_res)
  );

  // array pipeline occupancy, for busy: windows entered minus results left
  logic [15:0] in_flight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_flight <= '0;
    else in_flight <= in_flight + 16'(arr_feat_valid && en && win_last)
                                - 16'(arr_res_valid && en);
  end

  // output switch
  assign ob_in_valid = conv ? arr_res_valid : rs_in_valid;
  assign ob_in_data  = conv ? arr_res : rs_in_data;
  assign rs_in_ready = !conv && ob_in_ready;

  logic ob_out_valid;
  stream_fifo #(.W(PAR*ACC_W), .DEPTH(OB_DEPTH)) u_obuf (
    .clk, .rst_n,
    .in_valid(ob_in_valid), .in_ready(ob_in_ready), .in_data(ob_in_data),
    .out_valid(ob_out_valid), .out_ready(res_ready), .out_data(res_data)
  );
  assign res_valid = ob_out_valid;

  assign wgt_busy = wb_busy || pk_valid || arr_busy_w;
  assign busy     = lb_busy || (in_flight != '0) || ob_out_valid;

endmodule
