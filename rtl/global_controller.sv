// global_controller: runs the network, layer by layer, as the instructions describe it.
//
// After start it executes instructions 0 .. num_instr-1. For a convolution layer it loops over
// the output-channel groups og (PAR output channels each, the rows of the array):
//   1. weight load: restart the weight numbering, route the read stream to the weights and read
//      in_groups * PAR * K*K beats from wgt_base + og * (that many beats) * PAR bytes;
//      wait until the read is over and every weight has reached its processing element.
//   2. compute: start the line cache, route the read stream to the features, read the whole input
//      map (in_h * in_w * in_groups beats from feat_base) and write out_h * out_w result beats to
//      out_base + og * PAR bytes, one beat every out_groups * PAR bytes (channel-first output);
//      wait until the writes are done and the ALU is empty.
// A reshape layer has no weights: the input map is streamed once through the external reshape
// operator and out_h * out_w * out_groups beats are written contiguously from out_base.
// done pulses for one cycle when the last instruction is finished; busy is high while running.
// The controller's role (taking the decoded parameters and scheduling the DMA group, the
// pre-processing and the ALU) follows the architecture description; the sequence is this design's own.
module global_controller #(
  parameter int PAR     = 16,
  parameter int K       = 3,
  parameter int N_INSTR = 64,
  parameter int IW      = $clog2(N_INSTR)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic        start,
  input  logic [IW:0] num_instr,
  output logic [IW-1:0] idx,
  input  cnn_pkg::layer_cfg_t instr_cfg,
  output cnn_pkg::layer_cfg_t cfg,        // parameters of the layer being run
  output logic        busy,
  output logic        done,
  // data pre-processing
  output logic        route,              // 0 features, 1 weights
  output logic        pp_clear,
  // read DMA
  output logic        rd_start,
  output logic [31:0] rd_base,
  output logic [31:0] rd_beats,
  input  logic        rd_busy,
  // write DMA
  output logic        wr_start,
  output logic [31:0] wr_base,
  output logic [31:0] wr_stride,
  output logic [31:0] wr_count,
  input  logic        wr_busy,
  // ALU
  output logic        lb_start,
  output logic        wclear,
  input  logic        alu_wgt_busy,
  input  logic        alu_busy
);

  localparam int KK = K * K;

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_WLOAD, S_WWAIT, S_RUN, S_RWAIT, S_NEXT} state_e;
  state_e state;

  logic [5:0]  og;
  logic [31:0] wbeats;
  logic        is_conv;

  assign busy    = (state != S_IDLE);
  assign is_conv = (cfg.op == cnn_pkg::OP_CONV);
  assign wbeats  = 32'(cfg.in_groups) * 32'(PAR * KK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; idx <= '0; og <= '0; cfg <= '0; done <= 1'b0;
      route <= 1'b0; pp_clear <= 1'b0;
      rd_start <= 1'b0; rd_base <= '0; rd_beats <= '0;
      wr_start <= 1'b0; wr_base <= '0; wr_stride <= '0; wr_count <= '0;
      lb_start <= 1'b0; wclear <= 1'b0;
    end else begin
      done <= 1'b0; rd_start <= 1'b0; wr_start <= 1'b0; lb_start <= 1'b0;
      wclear <= 1'b0; pp_clear <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          idx <= '0;
          if (num_instr == 0) done <= 1'b1;
          else state <= S_FETCH;
        end
        S_FETCH: begin
          cfg <= instr_cfg;
          og  <= '0;
          state <= (instr_cfg.op == cnn_pkg::OP_CONV) ? S_WLOAD : S_RUN;
        end
        S_WLOAD: begin
          wclear   <= 1'b1;
          pp_clear <= 1'b1;
          route    <= 1'b1;
          rd_start <= 1'b1;
          rd_base  <= cfg.wgt_base + 32'(og) * wbeats * 32'(PAR);
          rd_beats <= wbeats;
          state    <= S_WWAIT;
        end
        S_WWAIT: if (!rd_start && !rd_busy && !alu_wgt_busy) state <= S_RUN;
        S_RUN: begin
          pp_clear <= 1'b1;
          route    <= 1'b0;
          lb_start <= 1'b1;
          rd_start <= 1'b1;
          rd_base  <= cfg.feat_base;
          rd_beats <= 32'(cfg.in_h) * 32'(cfg.in_w) * 32'(cfg.in_groups);
          wr_start <= 1'b1;
          if (is_conv) begin
            wr_base   <= cfg.out_base + 32'(og) * 32'(PAR);
            wr_stride <= 32'(cfg.out_groups) * 32'(PAR);
            wr_count  <= 32'(cfg.out_h) * 32'(cfg.out_w);
          end else begin
            wr_base   <= cfg.out_base;
            wr_stride <= 32'(PAR);
            wr_count  <= 32'(cfg.out_h) * 32'(cfg.out_w) * 32'(cfg.out_groups);
          end
          state <= S_RWAIT;
        end
        S_RWAIT: if (!wr_start && !wr_busy && !rd_busy && !alu_busy) begin
          if (is_conv && og != cfg.out_groups - 1'b1) begin
            og    <= og + 1'b1;
            state <= S_WLOAD;
          end else begin
            state <= S_NEXT;
          end
        end
        S_NEXT: begin
          if ({1'b0, idx} == num_instr - 1'b1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
