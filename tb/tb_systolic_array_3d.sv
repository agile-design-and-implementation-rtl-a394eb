// tb_systolic_array_3d: self-checking test of the 3-D systolic array with its accumulation.
// A small array (2x2 kernel = 4 layers, 3 columns, 2 rows, up to 4 channel groups) is loaded
// with random weights through the tagged weight stream, then fed random channel-first windows.
// Every result is compared with a direct convolution sum computed here. The first phase runs
// without stalls and checks the latency (ROWS + 1 cycles from the last group of a window to its
// result); the second phase drops the enable at random to check that back-pressure loses nothing.
module tb_systolic_array_3d;
  localparam int KK = 4, COLS = 3, ROWS = 2, GD = 4, GW = 2, CW = 2;
  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;

  logic feat_valid = 0, feat_last = 0; logic [KK-1:0][COLS-1:0][7:0] feat = '0; logic [GW-1:0] feat_g = 0;
  logic wgt_valid = 0; logic [KK-1:0][ROWS-1:0][7:0] wgt = '0; logic [CW-1:0] wgt_col = 0; logic [GW-1:0] wgt_g = 0;
  logic wgt_busy, res_valid; logic [ROWS-1:0][31:0] res;

  systolic_array_3d #(.KK(KK), .COLS(COLS), .ROWS(ROWS), .GD(GD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic signed [7:0] W [KK][ROWS][COLS][GD];
  int expq [$];       // expected sums, row-major per window
  int lastq [$];      // cycle at which the window's last group entered
  int cyc = 0, ng, stall_phase = 0, nres = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // result checker
  always @(posedge clk) if (rst_n && res_valid && en) begin
    for (int r = 0; r < ROWS; r++) begin
      int e; e = expq.pop_front();
      check($signed(res[r]) == e, $sformatf("result %0d row %0d: %0d exp %0d", nres, r, $signed(res[r]), e));
    end
    if (!stall_phase) begin
      int t; t = lastq.pop_front();
      check(cyc - t == ROWS + 1, $sformatf("latency %0d exp %0d", cyc - t, ROWS + 1));
    end
    nres++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_windows(input int n, input int ngrp, input bit stalls);
    for (int w = 0; w < n; w++) begin
      int s [ROWS];
      for (int r = 0; r < ROWS; r++) s[r] = 0;
      for (int g = 0; g < ngrp; g++) begin
        @(negedge clk);
        for (int k = 0; k < KK; k++) for (int c = 0; c < COLS; c++) feat[k][c] = 8'($urandom);
        for (int r = 0; r < ROWS; r++)
          for (int k = 0; k < KK; k++) for (int c = 0; c < COLS; c++)
            s[r] += int'($signed(feat[k][c])) * int'(W[k][r][c][g]);
        feat_valid = 1; feat_g = GW'(g); feat_last = (g == ngrp - 1);
        if (stalls) en = ($urandom % 3) != 0;
        while (!en) begin @(negedge clk); en = ($urandom % 3) != 0; end
        if (feat_last) begin
          for (int r = 0; r < ROWS; r++) expq.push_back(s[r]);
          lastq.push_back(cyc);
        end
        @(posedge clk);
      end
      @(negedge clk); feat_valid = 0;
      if (stalls) en = ($urandom % 2) != 0;
    end
    @(negedge clk); feat_valid = 0; en = 1;
    repeat (ROWS + 4) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < KK; k++) for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) for (int g = 0; g < GD; g++) W[k][r][c][g] = 8'($urandom);
    // weight load: packet (column c, group g) carries [k][r]
    for (int g = 0; g < GD; g++) for (int c = 0; c < COLS; c++) begin
      @(negedge clk);
      wgt_valid = 1; wgt_col = CW'(c); wgt_g = GW'(g);
      for (int k = 0; k < KK; k++) for (int r = 0; r < ROWS; r++) wgt[k][r] = W[k][r][c][g];
      @(posedge clk);
    end
    @(negedge clk); wgt_valid = 0;
    @(posedge clk); #1 check(wgt_busy, "weights still travelling after the last packet");
    wait (!wgt_busy);
    run_windows(6, 3, 0);
    run_windows(6, 1, 0);
    stall_phase = 1;
    run_windows(12, 4, 1);
    run_windows(8, 2, 1);
    check(expq.size() == 0, "every window produced a result");
    check(nres == 32, $sformatf("result count %0d", nres));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
