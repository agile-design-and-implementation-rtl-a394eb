// stream_fifo: a synchronous first-in first-out buffer with valid/ready (AXI-Stream style) ports.
//
// Used for the Buffer Group between the ALU and the quantization unit, for the output buffer of
// the ALU and for the buffer of the data pre-processing stage. A word is written when in_valid and
// in_ready are both high and read when out_valid and out_ready are both high; in_ready is low only
// when all DEPTH entries are full. Data appears at the output one cycle after it is written (no
// fall-through). Storage is a plain array with registered pointers.
// That these stages buffer streams follows the architecture description; depth and the
// handshake are this design's own choices.
module stream_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic push, pop;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign push = in_valid && in_ready;
  assign pop  = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> $stable(out_data))
    else $error("stream_fifo: output changed while stalled");

endmodule
