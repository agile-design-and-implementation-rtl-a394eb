// line_buffer: the input line cache that turns a feature-map stream into sliding windows.
//
// Feature maps arrive channel first: for each row, for each pixel, the channel groups of that
// pixel on successive beats, each beat carrying COLS channels (one per array column). The whole
// map never fits on chip, so only K rows are kept, in a ring of K row slots of LB_WORDS beats each
// (row y lives in slot y mod K). For every output pixel (oy, ox), and for every channel group g,
// the block gathers the K x K window (kernel size ksize <= K, stride and zero padding from the
// layer configuration) and emits it as one beat: win_data[ky*K+kx] holds the COLS channels of the
// pixel at kernel position (ky, kx), zero outside the map or outside a smaller kernel. win_g is
// the group and win_last marks the last group of a window, so all channels of a window are
// processed before the window moves on (channel priority).
// Rows are loaded until all rows that output row oy needs are present, then all windows of that
// row are emitted; loading and emitting take turns. Input rows left over at the end (when the
// stride skips them) are still consumed. start loads the configuration and begins a layer; busy is
// high until the last window has left.
// The line cache and channel-first order follow the ALU description; the ring of K rows, the
// beat format and the alternation of loading and emitting are this design's own choices.
module line_buffer #(
  parameter int DATA_W   = 8,
  parameter int COLS     = 16,
  parameter int K        = 3,
  parameter int LB_WORDS = 416,   // beats per row: input width x channel groups
  parameter int GD       = 32,
  parameter int GW       = $clog2(GD)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  cnn_pkg::layer_cfg_t cfg,
  input  logic                                in_valid,
  output logic                                in_ready,
  input  logic [COLS-1:0][DATA_W-1:0]         in_data,
  output logic                                win_valid,
  input  logic                                win_ready,
  output logic [K*K-1:0][COLS-1:0][DATA_W-1:0] win_data,
  output logic [GW-1:0]                       win_g,
  output logic                                win_last,
  output logic                                busy
);

  localparam int AW = $clog2(LB_WORDS);
  typedef logic [COLS-1:0][DATA_W-1:0] beat_t;

  beat_t mem [K][LB_WORDS];

  cnn_pkg::layer_cfg_t c;
  logic        active;
  // loading side
  logic [AW-1:0] wr_addr;
  logic [10:0]   rows_loaded;
  logic [$clog2(K)-1:0] wr_slot;
  // emitting side
  logic [10:0] oy, ox;
  logic [GW-1:0] g;

  logic signed [12:0] top_row;     // first input row of the current window row
  logic signed [12:0] need;        // rows needed before output row oy can start
  logic [AW-1:0] row_beats;
  logic emitting_done;
  logic can_load, can_emit, adv;

  always_comb begin
    top_row   = $signed({2'b0, oy}) * $signed({11'b0, c.stride}) - $signed({11'b0, c.pad});
    need      = top_row + $signed({11'b0, c.ksize});
    if (need > $signed({3'b0, c.in_h})) need = $signed({3'b0, c.in_h});
    row_beats = AW'(c.in_w * c.in_groups);
    emitting_done = (oy == {1'b0, c.out_h});
    can_load  = active && (rows_loaded < {1'b0, c.in_h}) &&
                (emitting_done || ($signed({2'b0, rows_loaded}) < top_row + $signed(13'(K))));
    can_emit  = active && !emitting_done && ($signed({2'b0, rows_loaded}) >= need);
    adv       = !win_valid || win_ready;
  end

  assign in_ready = can_load;
  assign busy     = active || win_valid;

  // write side
  always_ff @(posedge clk) begin
    if (in_valid && can_load) mem[wr_slot][wr_addr] <= in_data;
  end

  // window gather (combinational read of K*K positions)
  logic [K*K-1:0][COLS-1:0][DATA_W-1:0] gather;
  always_comb begin
    gather = '0;
    for (int ky = 0; ky < K; ky++) begin
      for (int kx = 0; kx < K; kx++) begin
        logic signed [12:0] iy, ix;
        iy = top_row + 13'(ky);
        ix = $signed({2'b0, ox}) * $signed({11'b0, c.stride}) - $signed({11'b0, c.pad}) + 13'(kx);
        if (ky < int'(c.ksize) && kx < int'(c.ksize) &&
            iy >= 0 && iy < $signed({3'b0, c.in_h}) && ix >= 0 && ix < $signed({3'b0, c.in_w}))
          gather[ky*K+kx] = mem[32'(iy) % K][AW'(ix * $signed({7'b0, c.in_groups}) + $signed({7'b0, g}))];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; active <= 1'b0;
      wr_addr <= '0; rows_loaded <= '0; wr_slot <= '0;
      oy <= '0; ox <= '0; g <= '0;
      win_valid <= 1'b0; win_data <= '0; win_g <= '0; win_last <= 1'b0;
    end else if (start) begin
      c <= cfg; active <= 1'b1;
      wr_addr <= '0; rows_loaded <= '0; wr_slot <= '0;
      oy <= '0; ox <= '0; g <= '0;
      win_valid <= 1'b0;
    end else begin
      if (in_valid && can_load) begin
        if (wr_addr == row_beats - 1'b1) begin
          wr_addr     <= '0;
          rows_loaded <= rows_loaded + 1'b1;
          wr_slot     <= (wr_slot == $clog2(K)'(K-1)) ? '0 : wr_slot + 1'b1;
        end else begin
          wr_addr <= wr_addr + 1'b1;
        end
      end
      if (adv) begin
        win_valid <= can_emit;
        if (can_emit) begin
          win_data <= gather;
          win_g    <= g;
          win_last <= (g == GW'(c.in_groups - 1));
          if (g == GW'(c.in_groups - 1)) begin
            g <= '0;
            if (ox == {1'b0, c.out_w} - 1'b1) begin
              ox <= '0;
              oy <= oy + 1'b1;
            end else begin
              ox <= ox + 1'b1;
            end
          end else begin
            g <= g + 1'b1;
          end
        end
      end
      if (active && emitting_done && rows_loaded == {1'b0, c.in_h}) active <= 1'b0;
    end
  end

endmodule
