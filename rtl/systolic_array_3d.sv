// systolic_array_3d: the three-dimensional systolic array with its output accumulation.
//
// The array is KK layers of ROWS x COLS processing elements (pe). Layer k handles kernel position
// k of the sliding window (9 layers for a 3x3 kernel), columns handle input-channel lanes and rows
// handle output channels. Features enter at the top of every column: feat[k][c] is input channel
// c + COLS*g of the window pixel at kernel position k, with the channel groups g of one window on
// successive valid cycles (channel first) and feat_last on the last group. Each feature flows down
// its column, one row per cycle. Weights enter at the left of every row: wgt[k][r] is the weight
// of output channel r for the tagged column (input lane) wgt_col and group wgt_g; it flows right,
// one column per cycle, and is kept by the PE of the tagged column. Results flow down the columns
// as bundles and leave at the bottom (ROWS cycles after the window's last group entered), where
// ob_accumulator sums them over columns and layers: res[r] is the complete convolution sum of
// output channel r for one window, one cycle later.
// Weights for all groups must be loaded before features that use them enter; wgt_busy stays high
// while weight packets are still moving through the rows.
// en advances every register of the array (a stall freezes it as a whole).
// The layer/row/column mapping follows the convolution-mapping description; weight tags with a
// per-PE weight buffer are this design's own way of letting each PE keep only its channel's weight.
module systolic_array_3d #(
  parameter int DATA_W = 8,
  parameter int ACC_W  = 32,
  parameter int KK     = 9,    // kernel positions (third dimension)
  parameter int COLS   = 16,   // input-channel parallelism
  parameter int ROWS   = 16,   // output-channel parallelism
  parameter int GD     = 32,   // channel groups held per PE
  parameter int CW     = (COLS > 1) ? $clog2(COLS) : 1,
  parameter int GW     = $clog2(GD)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic                                feat_valid,
  input  logic [KK-1:0][COLS-1:0][DATA_W-1:0] feat,
  input  logic [GW-1:0]                       feat_g,
  input  logic                                feat_last,
  input  logic                                wgt_valid,
  input  logic [KK-1:0][ROWS-1:0][DATA_W-1:0] wgt,
  input  logic [CW-1:0]                       wgt_col,
  input  logic [GW-1:0]                       wgt_g,
  output logic                                wgt_busy,
  output logic                                res_valid,
  output logic [ROWS-1:0][ACC_W-1:0]          res
);

  typedef logic [ROWS-1:0][ACC_W-1:0] bundle_t;

  // vertical nets: index 0 is the top input, index r+1 the output of row r
  logic                     fv [KK][COLS][ROWS+1];
  logic [DATA_W-1:0]        fd [KK][COLS][ROWS+1];
  logic [GW-1:0]            fg [KK][COLS][ROWS+1];
  logic                     fl [KK][COLS][ROWS+1];
  logic                     pv [KK][COLS][ROWS+1];
  bundle_t                  pd [KK][COLS][ROWS+1];
  // horizontal nets: index 0 is the left input, index c+1 the output of column c
  logic                     wv [KK][ROWS][COLS+1];
  logic [DATA_W-1:0]        wd [KK][ROWS][COLS+1];
  logic [CW-1:0]            wc [KK][ROWS][COLS+1];
  logic [GW-1:0]            wg [KK][ROWS][COLS+1];

  logic [KK-1:0][COLS-1:0][ROWS-1:0][ACC_W-1:0] bottom;
  logic [KK-1:0][COLS-1:0] bottom_v;

  for (genvar k = 0; k < KK; k++) begin : g_layer
    for (genvar c = 0; c < COLS; c++) begin : g_top
      assign fv[k][c][0] = feat_valid;
      assign fd[k][c][0] = feat[k][c];
      assign fg[k][c][0] = feat_g;
      assign fl[k][c][0] = feat_last;
      assign pv[k][c][0] = 1'b0;
      assign pd[k][c][0] = '0;
      assign bottom[k][c]   = pd[k][c][ROWS];
      assign bottom_v[k][c] = pv[k][c][ROWS];
    end
    for (genvar r = 0; r < ROWS; r++) begin : g_left
      assign wv[k][r][0] = wgt_valid;
      assign wd[k][r][0] = wgt[k][r];
      assign wc[k][r][0] = wgt_col;
      assign wg[k][r][0] = wgt_g;
    end
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      for (genvar c = 0; c < COLS; c++) begin : g_col
        pe #(.DATA_W(DATA_W), .ACC_W(ACC_W), .ROWS(ROWS), .ROW(r), .COL(c),
             .CW(CW), .GD(GD), .GW(GW)) u_pe (
          .clk, .rst_n, .en,
          .f_in_valid (fv[k][c][r]),   .f_in  (fd[k][c][r]),   .f_in_g (fg[k][c][r]),
          .f_in_last  (fl[k][c][r]),
          .f_out_valid(fv[k][c][r+1]), .f_out (fd[k][c][r+1]), .f_out_g(fg[k][c][r+1]),
          .f_out_last (fl[k][c][r+1]),
          .w_in_valid (wv[k][r][c]),   .w_in  (wd[k][r][c]),   .w_in_col (wc[k][r][c]),
          .w_in_g     (wg[k][r][c]),
          .w_out_valid(wv[k][r][c+1]), .w_out (wd[k][r][c+1]), .w_out_col(wc[k][r][c+1]),
          .w_out_g    (wg[k][r][c+1]),
          .p_in_valid (pv[k][c][r]),   .p_in  (pd[k][c][r]),
          .p_out_valid(pv[k][c][r+1]), .p_out (pd[k][c][r+1])
        );
      end
    end
  end

  // any weight packet still travelling along row 0 of layer 0 (all rows move in lock step)
  always_comb begin
    wgt_busy = 1'b0;
    for (int c = 1; c <= COLS; c++) wgt_busy = wgt_busy | wv[0][0][c];
  end

  ob_accumulator #(.ACC_W(ACC_W), .KK(KK), .COLS(COLS), .ROWS(ROWS)) u_ob (
    .clk, .rst_n, .en,
    .in_valid (bottom_v[0][0]),
    .in       (bottom),
    .out_valid(res_valid),
    .out      (res)
  );

endmodule
