// tb_alu: self-checking test of the ALU (line cache, weight buffer, switches, systolic array,
// output buffer) at PAR = 2.
// Convolution mode: random weights are loaded, then a 4x4 map with 4 channels (2 groups) is
// streamed and every 32-bit result of a padded 3x3 convolution is compared with a reference;
// the result port is back-pressured at random so that the array must stall. Reshape mode: the
// windows must leave on the reshape port and the values returned there must come out in order.
module tb_alu;
  localparam int PAR = 2, K = 3, GD = 2, LBW = 16, KK = 9;
  logic clk = 0, rst_n = 0, start = 0, wclear = 0;
  cnn_pkg::layer_cfg_t cfg = '0;
  logic feat_valid = 0, feat_ready, wgt_valid = 0, wgt_ready;
  logic [PAR-1:0][7:0] feat_data = '0, wgt_data = '0;
  logic rs_out_valid, rs_out_ready = 0, rs_out_last, rs_in_valid = 0, rs_in_ready;
  logic [KK-1:0][PAR-1:0][7:0] rs_out_data; logic [0:0] rs_out_g;
  logic [PAR-1:0][31:0] rs_in_data = '0;
  logic res_valid, res_ready = 0, wgt_busy, busy;
  logic [PAR-1:0][31:0] res_data;
  always #5 clk = ~clk;
  alu #(.K(K), .PAR(PAR), .GD(GD), .LB_WORDS(LBW), .OB_DEPTH(2)) dut (.*);

  int checks = 0, failures = 0, stalls = 0, nres = 0;
  logic [PAR-1:0][31:0] expq [$];
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n) begin
    if (!dut.en) stalls++;
    if (res_valid && res_ready) begin
      check(res_data == expq.pop_front(), $sformatf("result %0d", nres)); nres++;
    end
  end
  always @(negedge clk) res_ready = ($urandom % 3) == 0;

  logic signed [7:0] W [PAR][2*PAR][KK];   // [out][in][k]
  logic signed [7:0] F [4][4][2*PAR];
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    cfg.op = cnn_pkg::OP_CONV; cfg.ksize = 3; cfg.stride = 1; cfg.pad = 1; cfg.in_groups = 2;
    cfg.out_groups = 1; cfg.in_h = 4; cfg.in_w = 4; cfg.out_h = 4; cfg.out_w = 4; cfg.in_ch = 4;
    for (int o = 0; o < PAR; o++) for (int i = 0; i < 2*PAR; i++) for (int k = 0; k < KK; k++) W[o][i][k] = 8'($urandom);
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) for (int i = 0; i < 2*PAR; i++) F[y][x][i] = 8'($urandom);
    for (int oy = 0; oy < 4; oy++) for (int ox = 0; ox < 4; ox++) begin
      logic [PAR-1:0][31:0] e;
      for (int o = 0; o < PAR; o++) begin
        int s; s = 0;
        for (int ky = 0; ky < 3; ky++) for (int kx = 0; kx < 3; kx++) for (int i = 0; i < 2*PAR; i++) begin
          int iy, ix; iy = oy - 1 + ky; ix = ox - 1 + kx;
          if (iy >= 0 && iy < 4 && ix >= 0 && ix < 4) s += int'(F[iy][ix][i]) * int'(W[o][i][ky*3+kx]);
        end
        e[o] = s;
      end
      expq.push_back(e);
    end
    // weights: packet (column c, group g) = KK beats, beat k lane r = W[r][g*PAR+c][k]
    @(negedge clk); wclear = 1; @(negedge clk); wclear = 0;
    for (int g = 0; g < 2; g++) for (int c = 0; c < PAR; c++) for (int k = 0; k < KK; k++) begin
      @(negedge clk);
      wgt_valid = 1; for (int r = 0; r < PAR; r++) wgt_data[r] = W[r][g*PAR+c][k];
      while (!wgt_ready) @(negedge clk);
    end
    @(negedge clk); wgt_valid = 0;
    wait (!wgt_busy);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) for (int g = 0; g < 2; g++) begin
      @(negedge clk);
      feat_valid = 1; for (int c = 0; c < PAR; c++) feat_data[c] = F[y][x][g*PAR+c];
      #1 while (!feat_ready) @(negedge clk);
    end
    @(negedge clk); feat_valid = 0;
    wait (nres == 16);
    repeat (5) @(posedge clk);
    check(!busy, "idle after the layer");
    check(stalls > 0, "array stalled under back-pressure");
    // reshape mode: 1x1 windows of a 2x2 map, 1 group; stand-in returns lane values + 1000
    cfg.op = cnn_pkg::OP_RESHAPE; cfg.ksize = 1; cfg.pad = 0; cfg.in_groups = 1; cfg.in_h = 2; cfg.in_w = 2;
    cfg.out_h = 2; cfg.out_w = 2;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        feat_valid = 1; feat_data = 16'($urandom);
        #1 while (!feat_ready) @(negedge clk);
      end
      for (int i = 0; i < 4; i++) begin
        @(negedge clk); rs_out_ready = 1;
        #1 while (!rs_out_valid) @(negedge clk);
        begin
          logic [PAR-1:0][31:0] v;
          for (int c = 0; c < PAR; c++) v[c] = 32'(rs_out_data[0][c]) + 1000;
          check(rs_out_last && rs_out_data[1] == '0, "reshape window format");
          expq.push_back(v);
          @(negedge clk); rs_out_ready = 0;
          rs_in_valid = 1; rs_in_data = v;
          #1 while (!rs_in_ready) @(negedge clk);
          @(negedge clk); rs_in_valid = 0;
        end
      end
    join
    @(negedge clk); feat_valid = 0;
    wait (nres == 20);
    check(expq.size() == 0, "all results out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
