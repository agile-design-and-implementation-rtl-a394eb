// tb_line_buffer: self-checking test of the line cache / window generator.
// Several layer shapes (3x3 with padding 1 and stride 1 or 2, 3x3 without padding, 1x1 with
// several channel groups) are streamed in channel first with random gaps, windows are taken with
// random back-pressure, and every window is compared with one cut here from the same map.
// Counts that input stalls (line cache full) and output stalls both happened.
module tb_line_buffer;
  localparam int COLS = 2, K = 3, LBW = 64, GD = 4, GW = 2;
  logic clk = 0, rst_n = 0, start = 0;
  cnn_pkg::layer_cfg_t cfg;
  logic in_valid = 0, in_ready, win_valid, win_ready = 0, win_last, busy;
  logic [COLS-1:0][7:0] in_data = '0;
  logic [K*K-1:0][COLS-1:0][7:0] win_data;
  logic [GW-1:0] win_g;
  always #5 clk = ~clk;
  line_buffer #(.COLS(COLS), .K(K), .LB_WORDS(LBW), .GD(GD)) dut (.*);

  int checks = 0, failures = 0, in_stalls = 0, out_stalls = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [COLS-1:0][7:0] fmap [16][16][GD];
  int H, Wd, G, KS, S, P, OH, OW, nwin;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) in_stalls++;
    if (win_valid && !win_ready) out_stalls++;
  end

  task automatic run(input int h, input int w, input int g, input int ks, input int s, input int p);
    H = h; Wd = w; G = g; KS = ks; S = s; P = p;
    OH = (H + 2*P - KS) / S + 1; OW = (Wd + 2*P - KS) / S + 1;
    for (int y = 0; y < H; y++) for (int x = 0; x < Wd; x++) for (int gg = 0; gg < G; gg++)
      for (int c = 0; c < COLS; c++) fmap[y][x][gg][c] = 8'($urandom);
    cfg = '0;
    cfg.ksize = 2'(KS); cfg.stride = 2'(S); cfg.pad = 2'(P);
    cfg.in_h = 10'(H); cfg.in_w = 10'(Wd); cfg.in_groups = 6'(G);
    cfg.out_h = 10'(OH); cfg.out_w = 10'(OW);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    nwin = 0;
    fork
      begin // producer
        for (int y = 0; y < H; y++) for (int x = 0; x < Wd; x++) for (int gg = 0; gg < G; gg++) begin
          @(negedge clk);
          while (($urandom % 4) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_data = fmap[y][x][gg];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
        @(negedge clk); in_valid = 0;
      end
      begin // consumer
        for (int oy = 0; oy < OH; oy++) for (int ox = 0; ox < OW; ox++) for (int gg = 0; gg < G; gg++) begin
          @(negedge clk);
          win_ready = ($urandom % 3) != 0;
          @(posedge clk);
          while (!(win_valid && win_ready)) begin
            @(negedge clk); win_ready = ($urandom % 3) != 0; @(posedge clk);
          end
          // compare
          check(win_g == GW'(gg) && win_last == (gg == G - 1), "group tags");
          for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) begin
            int iy, ix; logic [COLS-1:0][7:0] e;
            iy = oy*S - P + ky; ix = ox*S - P + kx;
            e = (ky < KS && kx < KS && iy >= 0 && iy < H && ix >= 0 && ix < Wd) ? fmap[iy][ix][gg] : '0;
            check(win_data[ky*K+kx] == e, $sformatf("window (%0d,%0d,g%0d) pos %0d", oy, ox, gg, ky*K+kx));
          end
          nwin++;
        end
        @(negedge clk); win_ready = 0;
      end
    join
    repeat (3) @(posedge clk);
    #1 check(!busy, "idle after the last window");
    check(nwin == OH*OW*G, "window count");
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(5, 4, 2, 3, 1, 1);
    run(6, 5, 1, 3, 2, 1);
    run(4, 3, 3, 1, 1, 0);
    run(5, 5, 1, 3, 1, 0);
    run(7, 6, 2, 3, 2, 1);
    check(in_stalls > 0, "line cache held the input back");
    check(out_stalls > 0, "window output was back-pressured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
