// pe: one processing element of the systolic array.
//
// Each PE has three inputs and three outputs: a feature (IN) arriving from the PE above, a weight
// (W) arriving from the PE to the left, and the bundle of finished results (OUT) of the PEs above
// it in the same column. It forwards all three, each through one register stage, to its
// neighbours. Weights stream along a row tagged with a column index and a channel group; a PE
// keeps only the weights tagged with its own column, in a small weight buffer indexed by channel
// group, so that one weight stream serves the whole row. Features stream down a column channel
// first: for one sliding-window position, channel group 0, 1, ... G-1 follow on successive cycles.
// The PE multiplies each feature with the buffered weight of the same group and accumulates
// (restarting at group 0). Its own result is never added to the results of the PEs above: on the
// last group of a window it writes its sum into its own slot (ROW) of the result bundle and hands
// the bundle on together with the upstream results, as the architecture description requires.
//
// Timing: every register advances only when en is high, which gives the whole array a single
// back-pressure point. Outputs are registered: f_out, w_out and p_out follow their inputs by one
// enabled cycle. p_in must be valid exactly in the cycle the last group of a window is at f_in;
// the neighbouring PE above guarantees this by construction.
// The weight buffer depth (GD) and the tag format are this design's own choice.
module pe #(
  parameter int DATA_W = 8,
  parameter int ACC_W  = 32,
  parameter int ROWS   = 16,   // results carried by the bundle (rows of the array)
  parameter int ROW    = 0,    // this PE's row: its slot in the bundle
  parameter int COL    = 0,    // this PE's column: the weight tag it keeps
  parameter int CW     = 4,    // column tag width
  parameter int GD     = 32,   // weight buffer depth (channel groups)
  parameter int GW     = $clog2(GD)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  // feature, from the PE above
  input  logic                     f_in_valid,
  input  logic signed [DATA_W-1:0] f_in,
  input  logic [GW-1:0]            f_in_g,
  input  logic                     f_in_last,
  output logic                     f_out_valid,
  output logic signed [DATA_W-1:0] f_out,
  output logic [GW-1:0]            f_out_g,
  output logic                     f_out_last,
  // weight, from the PE on the left
  input  logic                     w_in_valid,
  input  logic signed [DATA_W-1:0] w_in,
  input  logic [CW-1:0]            w_in_col,
  input  logic [GW-1:0]            w_in_g,
  output logic                     w_out_valid,
  output logic signed [DATA_W-1:0] w_out,
  output logic [CW-1:0]            w_out_col,
  output logic [GW-1:0]            w_out_g,
  // result bundle, from the PE above
  input  logic                           p_in_valid,
  input  logic [ROWS-1:0][ACC_W-1:0]     p_in,
  output logic                           p_out_valid,
  output logic [ROWS-1:0][ACC_W-1:0]     p_out
);

  logic signed [DATA_W-1:0] wbuf [GD];
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W-1:0]  acc_next;
  logic signed [2*DATA_W-1:0] prod;

  always_comb begin
    prod     = f_in * wbuf[f_in_g];
    acc_next = ((f_in_g == '0) ? '0 : acc) + ACC_W'(prod);
  end

  // weight buffer: capture the weights tagged with this column
  always_ff @(posedge clk) begin
    if (en && w_in_valid && w_in_col == CW'(COL))
      wbuf[w_in_g] <= w_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_out_valid <= 1'b0;
      f_out       <= '0;
      f_out_g     <= '0;
      f_out_last  <= 1'b0;
      w_out_valid <= 1'b0;
      w_out       <= '0;
      w_out_col   <= '0;
      w_out_g     <= '0;
      p_out_valid <= 1'b0;
      p_out       <= '0;
      acc         <= '0;
    end else if (en) begin
      f_out_valid <= f_in_valid;
      f_out       <= f_in;
      f_out_g     <= f_in_g;
      f_out_last  <= f_in_last;
      w_out_valid <= w_in_valid;
      w_out       <= w_in;
      w_out_col   <= w_in_col;
      w_out_g     <= w_in_g;
      if (f_in_valid) acc <= acc_next;
      p_out_valid <= f_in_valid && f_in_last;
      if (f_in_valid && f_in_last) begin
        p_out      <= p_in;
        p_out[ROW] <= acc_next;
      end
    end
  end

  // The bundle from above must arrive together with the last group of a window.
  if (ROW > 0) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     en |-> (p_in_valid == (f_in_valid && f_in_last)))
      else $error("pe: result bundle out of step with the feature stream");
  end

endmodule
