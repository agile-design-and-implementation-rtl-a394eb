// wb_buffer: the weight buffer (WB) in front of the left edge of the systolic array.
//
// Weights arrive from memory as beats of ROWS bytes. KK consecutive beats form one weight packet:
// beat k holds, for kernel position k, the weight of each of the ROWS output channels (byte r) for
// one input channel. The buffer assembles a packet, tags it with the column (input lane) and
// channel group it belongs to, and hands it to the array, which injects it into the left of every
// row of every layer. Packets are numbered in order: column first, then group, so packet n goes
// to column n mod COLS, group n / COLS. clear resets the numbering before each weight load.
// Interface: in_valid/in_ready/in_data beats; out_valid/out_ready packet with its tags (out_ready
// is the array's advance). busy is high while a packet is being assembled or waits.
// The name and position of the block follow the array figure; the packet format and tagging are
// this design's own.
module wb_buffer #(
  parameter int DATA_W = 8,
  parameter int KK     = 9,
  parameter int COLS   = 16,
  parameter int ROWS   = 16,
  parameter int GD     = 32,
  parameter int CW     = (COLS > 1) ? $clog2(COLS) : 1,
  parameter int GW     = $clog2(GD)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic                               in_valid,
  output logic                               in_ready,
  input  logic [ROWS-1:0][DATA_W-1:0]        in_data,
  output logic                               out_valid,
  input  logic                               out_ready,
  output logic [KK-1:0][ROWS-1:0][DATA_W-1:0] out_wgt,
  output logic [CW-1:0]                      out_col,
  output logic [GW-1:0]                      out_g,
  output logic                               busy
);

  localparam int KW = (KK > 1) ? $clog2(KK) : 1;
  logic [KW-1:0] beat;
  logic [CW-1:0] col;
  logic [GW-1:0] grp;

  assign in_ready = !out_valid;
  assign busy     = out_valid || (beat != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat <= '0; col <= '0; grp <= '0;
      out_valid <= 1'b0; out_wgt <= '0; out_col <= '0; out_g <= '0;
    end else if (clear) begin
      beat <= '0; col <= '0; grp <= '0; out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) begin
        out_valid <= 1'b0;
        if (col == CW'(COLS-1)) begin
          col <= '0;
          grp <= grp + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
      if (in_valid && in_ready) begin
        out_wgt[beat] <= in_data;
        if (beat == KW'(KK-1)) begin
          beat      <= '0;
          out_valid <= 1'b1;
          out_col   <= col;
          out_g     <= grp;
        end else begin
          beat <= beat + 1'b1;
        end
      end
    end
  end

endmodule
