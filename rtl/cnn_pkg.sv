// cnn_pkg: types and constants shared by the accelerator.
//
// The accelerator works on 8-bit signed features and weights and accumulates in 32-bit signed
// partial sums, one DSP-style multiply-accumulate per processing element. A layer is described
// by a layer_cfg_t, decoded from an eight-word instruction held in the on-chip instruction cache.
// The word layout below is this design's own; the operation types (convolution on the systolic
// array or an external reshape operator) and the kinds of parameters an instruction carries
// (layer type, image and weight sizes, channel counts, DDR addresses, quantization values)
// follow the architecture description.
package cnn_pkg;

  localparam int DATA_W = 8;   // feature and weight width
  localparam int ACC_W  = 32;  // partial-sum width
  localparam int INSTR_WORDS = 8;

  typedef enum logic [1:0] {
    OP_CONV    = 2'd0,  // convolution on the systolic array
    OP_RESHAPE = 2'd1   // data routed through the external reshape operator
  } op_e;

  // Decoded layer parameters.
  //  word 0: [1:0] op, [3:2] kernel size (1..3), [5:4] stride, [7:6] padding,
  //          [13:8] input channel groups, [21:16] output channel groups
  //  word 1: [9:0] input height, [25:16] input width
  //  word 2: [9:0] output height, [25:16] output width
  //  word 3: feature map base address, word 4: weight base, word 5: output base
  //  word 6: [15:0] quant multiplier (signed), [21:16] right shift, [31:24] zero point
  //  word 7: [9:0] input channels
  typedef struct packed {
    op_e         op;
    logic [1:0]  ksize;
    logic [1:0]  stride;
    logic [1:0]  pad;
    logic [5:0]  in_groups;
    logic [5:0]  out_groups;
    logic [9:0]  in_h;
    logic [9:0]  in_w;
    logic [9:0]  out_h;
    logic [9:0]  out_w;
    logic [31:0] feat_base;
    logic [31:0] wgt_base;
    logic [31:0] out_base;
    logic signed [15:0] q_mult;
    logic [5:0]  q_shift;
    logic signed [7:0]  q_zp;
    logic [9:0]  in_ch;
  } layer_cfg_t;

  function automatic layer_cfg_t decode_instr(input logic [INSTR_WORDS-1:0][31:0] w);
    layer_cfg_t c;
    c.op         = op_e'(w[0][1:0]);
    c.ksize      = w[0][3:2];
    c.stride     = w[0][5:4];
    c.pad        = w[0][7:6];
    c.in_groups  = w[0][13:8];
    c.out_groups = w[0][21:16];
    c.in_h       = w[1][9:0];
    c.in_w       = w[1][25:16];
    c.out_h      = w[2][9:0];
    c.out_w      = w[2][25:16];
    c.feat_base  = w[3];
    c.wgt_base   = w[4];
    c.out_base   = w[5];
    c.q_mult     = w[6][15:0];
    c.q_shift    = w[6][21:16];
    c.q_zp       = w[6][31:24];
    c.in_ch      = w[7][9:0];
    return c;
  endfunction

endpackage
