// quant_unit: requantizes the 32-bit results of a layer to 8-bit features.
//
// Each of the LANES values of a beat is multiplied by the signed 16-bit multiplier q_mult, shifted
// right by q_shift with rounding to nearest (half rounds up), offset by the zero point q_zp and
// saturated to the signed 8-bit range:
//   y = sat8( ((x * q_mult + 2^(q_shift-1)) >>> q_shift) + q_zp )      (no rounding term if q_shift = 0)
// The result beat (LANES bytes, lane r in byte r) is the next layer's feature beat.
// Interface: valid/ready stream in and out, one register stage; a beat is accepted whenever the
// output register is empty or being emptied.
// That a quantization unit sits between the buffer group and the DMA and takes its parameters from
// the instruction follows the architecture description; the arithmetic is this design's own,
// the usual fixed-point scale-and-shift scheme.
module quant_unit #(
  parameter int ACC_W  = 32,
  parameter int DATA_W = 8,
  parameter int LANES  = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic signed [15:0] q_mult,
  input  logic [5:0]         q_shift,
  input  logic signed [7:0]  q_zp,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [LANES-1:0][ACC_W-1:0]   in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [LANES-1:0][DATA_W-1:0]  out_data
);

  localparam int PW = ACC_W + 16 + 2;
  localparam logic signed [PW-1:0] QMAX = PW'((1 <<< (DATA_W-1)) - 1);
  localparam logic signed [PW-1:0] QMIN = -PW'(1 <<< (DATA_W-1));

  logic [LANES-1:0][DATA_W-1:0] q;

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      logic signed [PW-1:0] p, rnd, s;
      p   = PW'($signed(in_data[i])) * PW'(q_mult);
      rnd = (q_shift == '0) ? '0 : (PW'(1) <<< (q_shift - 1'b1));
      s   = ((p + rnd) >>> q_shift) + PW'(q_zp);
      if (s > QMAX)      q[i] = QMAX[DATA_W-1:0];
      else if (s < QMIN) q[i] = QMIN[DATA_W-1:0];
      else               q[i] = s[DATA_W-1:0];
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= q;
    end
  end

endmodule
