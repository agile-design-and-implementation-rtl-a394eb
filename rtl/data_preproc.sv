// data_preproc: the data pre-processing stage between the read DMA and the ALU.
//
// Beats read from memory are first buffered (stream_fifo), then delivered to the ALU as one of two
// streams selected by the control register route: route = 0 sends them to the feature input
// (line cache), route = 1 to the weight input. Feature beats carry channel groups in order
// (group 0 .. in_groups-1 of one pixel, then the next pixel); lanes whose channel index
// (group * LANES + lane) is at or above the layer's channel count in_ch are forced to zero, so
// that an input whose channel count is not a multiple of the array width (such as a 3-channel
// image) computes correctly whatever memory holds there. A status counter (count) tells how many
// beats were delivered since clear, which also restarts the group count; pending is high while
// the buffer still holds beats.
// The block's place in the flow, its buffer and its control/status part follow the architecture
// figure; the routing register, the channel mask and the counter are this design's own reading of
// "making the data format meet the ALU's requirements".
module data_preproc #(
  parameter int DATA_W = 8,
  parameter int LANES  = 16,
  parameter int DEPTH  = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic route,                   // 0: features, 1: weights
  input  logic [5:0] in_groups,         // channel groups per pixel
  input  logic [9:0] in_ch,             // channels of the layer input
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [LANES-1:0][DATA_W-1:0]  in_data,
  output logic                          feat_valid,
  input  logic                          feat_ready,
  output logic [LANES-1:0][DATA_W-1:0]  feat_data,
  output logic                          wgt_valid,
  input  logic                          wgt_ready,
  output logic [LANES-1:0][DATA_W-1:0]  wgt_data,
  output logic [31:0]                   count,
  output logic                          pending    // beats still held in the buffer
);

  logic b_valid, b_ready;
  logic [LANES-1:0][DATA_W-1:0] b_data;

  stream_fifo #(.W(LANES*DATA_W), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data)
  );

  logic [5:0] grp;
  always_comb begin
    for (int i = 0; i < LANES; i++)
      feat_data[i] = (32'(grp) * LANES + i < 32'(in_ch)) ? b_data[i] : '0;
  end
  assign wgt_data   = b_data;
  assign pending    = b_valid;
  assign feat_valid = b_valid && !route;
  assign wgt_valid  = b_valid && route;
  assign b_ready    = route ? wgt_ready : feat_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      grp   <= '0;
    end else if (clear) begin
      count <= '0;
      grp   <= '0;
    end else if (b_valid && b_ready) begin
      count <= count + 1'b1;
      if (!route) grp <= (grp == in_groups - 1'b1) ? '0 : grp + 1'b1;
    end
  end

endmodule
