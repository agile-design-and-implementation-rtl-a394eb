// ob_accumulator: the output buffer (OB) stage below the systolic array.
//
// A column of the array delivers, for one sliding-window position, one partial sum per output
// channel: the contribution of one input-channel lane (column) at one kernel position (layer of
// the third dimension). These partial results are incomplete; this block adds them up over the
// column (input channel) and layer (kernel position) directions, which gives one complete 32-bit
// sum per output channel. The sum is formed by a combinational adder tree and registered.
// Interface: in_valid/in from the array bottoms (all columns and layers arrive in the same
// cycle), out_valid/out one enabled cycle later. en stalls the register (shared back-pressure).
// Adding the results after they leave the array follows the architecture description; a single
// registered adder tree is this design's own choice.
module ob_accumulator #(
  parameter int ACC_W = 32,
  parameter int KK    = 9,
  parameter int COLS  = 16,
  parameter int ROWS  = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic                                       in_valid,
  input  logic [KK-1:0][COLS-1:0][ROWS-1:0][ACC_W-1:0] in,
  output logic                                       out_valid,
  output logic [ROWS-1:0][ACC_W-1:0]                 out
);

  logic [ROWS-1:0][ACC_W-1:0] sum;

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      sum[r] = '0;
      for (int k = 0; k < KK; k++)
        for (int c = 0; c < COLS; c++)
          sum[r] = sum[r] + in[k][c][r];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      if (in_valid) out <= sum;
    end
  end

endmodule
