// instr_unit: the instruction module: an AXI-Lite register file holding the instruction cache,
// and the decoder that turns the current instruction into layer parameters.
//
// The host writes the instructions of a whole network over AXI-Lite, then starts the run.
// Address map (byte addresses, 32-bit registers):
//   0x000 CTRL       write 1 to bit 0 to start (start pulse for one cycle)
//   0x004 STATUS     read: bit 0 busy, bit 1 done (done stays set until the next start)
//   0x008 NUM_INSTR  number of instructions to execute
//   0x800 + 4*(8*i + w)  word w of instruction i, i < N_INSTR (see cnn_pkg for the word layout)
// The global controller selects an instruction with idx; cfg is its decoded form (combinational).
// AXI-Lite: a write is accepted when address and data are both valid and no response is pending;
// a read when no read data is pending. Responses are always OKAY.
// Passing instructions over AXI-Lite into an on-chip cache and decoding them into layer parameters
// follows the architecture description; the address map and encoding are this design's own.
module instr_unit #(
  parameter int N_INSTR = 64,
  parameter int IW      = $clog2(N_INSTR)
) (
  input  logic clk,
  input  logic rst_n,
  // AXI-Lite slave
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
  // to / from the global controller
  output logic        start,
  output logic [IW:0] num_instr,
  input  logic        run_busy,
  input  logic        run_done,
  input  logic [IW-1:0] idx,
  output cnn_pkg::layer_cfg_t cfg
);

  localparam int WORDS = N_INSTR * cnn_pkg::INSTR_WORDS;
  localparam int MW    = $clog2(WORDS);

  logic [31:0] imem [WORDS];
  logic        done_q;
  logic        wr;

  assign wr        = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr;
  assign s_wready  = wr;
  assign s_bresp   = 2'b00;
  assign s_arready = !s_rvalid;
  assign s_rresp   = 2'b00;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] strb);
    for (int b = 0; b < 4; b++) if (strb[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  always_ff @(posedge clk) begin
    if (wr && s_awaddr[11]) imem[s_awaddr[MW+1:2]] <= merge(imem[s_awaddr[MW+1:2]], s_wdata, s_wstrb);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid <= 1'b0; s_rvalid <= 1'b0; s_rdata <= '0;
      start <= 1'b0; num_instr <= '0; done_q <= 1'b0;
    end else begin
      start <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr) begin
        s_bvalid <= 1'b1;
        if (s_awaddr == 12'h000 && s_wstrb[0] && s_wdata[0]) begin
          start  <= 1'b1;
          done_q <= 1'b0;
        end
        if (s_awaddr == 12'h008) num_instr <= (IW+1)'(s_wdata);
      end
      if (run_done) done_q <= 1'b1;
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        if (s_araddr[11])               s_rdata <= imem[s_araddr[MW+1:2]];
        else if (s_araddr == 12'h004)   s_rdata <= {30'b0, done_q, run_busy};
        else if (s_araddr == 12'h008)   s_rdata <= 32'(num_instr);
        else                            s_rdata <= '0;
      end
    end
  end

  // decoder
  logic [cnn_pkg::INSTR_WORDS-1:0][31:0] words;
  always_comb begin
    for (int w = 0; w < cnn_pkg::INSTR_WORDS; w++)
      words[w] = imem[MW'(idx) * MW'(cnn_pkg::INSTR_WORDS) + MW'(w)];
    cfg = cnn_pkg::decode_instr(words);
  end

  assert property (@(posedge clk) disable iff (!rst_n) s_bvalid && !s_bready |=> s_bvalid)
    else $error("instr_unit: write response dropped");
  assert property (@(posedge clk) disable iff (!rst_n) s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata))
    else $error("instr_unit: read data changed before handshake");

endmodule
