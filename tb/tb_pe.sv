// tb_pe: self-checking test of one processing element.
// Loads weights tagged for several columns (only the PE's own column must be kept), streams
// channel-first windows of random features with the upstream result bundle, and checks the
// accumulated result in the PE's own slot, the untouched upstream slot, the one-cycle forwarding
// of feature and weight, and that a low enable freezes the PE.
module tb_pe;
  localparam int ROWS = 2, ROW = 1, COL = 2, CW = 2, GD = 4, GW = 2;
  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;

  logic f_in_valid = 0, f_in_last = 0; logic signed [7:0] f_in = 0; logic [GW-1:0] f_in_g = 0;
  logic f_out_valid, f_out_last; logic signed [7:0] f_out; logic [GW-1:0] f_out_g;
  logic w_in_valid = 0; logic signed [7:0] w_in = 0; logic [CW-1:0] w_in_col = 0; logic [GW-1:0] w_in_g = 0;
  logic w_out_valid; logic signed [7:0] w_out; logic [CW-1:0] w_out_col; logic [GW-1:0] w_out_g;
  logic p_in_valid = 0; logic [ROWS-1:0][31:0] p_in = '0;
  logic p_out_valid; logic [ROWS-1:0][31:0] p_out;

  pe #(.ROWS(ROWS), .ROW(ROW), .COL(COL), .CW(CW), .GD(GD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic signed [7:0] wref [4][4];  // [col][g]

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // weight load: all columns, all groups
    for (int g = 0; g < GD; g++)
      for (int c = 0; c < 4; c++) begin
        wref[c][g] = 8'($urandom);
        @(negedge clk);
        w_in_valid = 1; w_in = wref[c][g]; w_in_col = CW'(c); w_in_g = GW'(g);
        @(posedge clk); #1;
        check(w_out_valid && w_out == wref[c][g] && w_out_col == CW'(c), "weight forwarded after one cycle");
      end
    @(negedge clk); w_in_valid = 0;
    // windows
    for (int win = 0; win < 20; win++) begin
      int ng; logic signed [31:0] exp_sum; logic [31:0] up;
      ng = 1 + (win % GD);
      exp_sum = 0; up = $urandom;
      for (int g = 0; g < ng; g++) begin
        logic signed [7:0] x;
        x = 8'($urandom);
        exp_sum += 32'(x) * 32'(wref[COL][g]);
        @(negedge clk);
        f_in_valid = 1; f_in = x; f_in_g = GW'(g); f_in_last = (g == ng - 1);
        p_in_valid = f_in_last; p_in = '0; p_in[0] = up;
        if (win == 5 && g == 0) begin
          // stall for a few cycles with the feature held: nothing may move
          logic signed [7:0] held; logic [31:0] held_p;
          held = f_out; held_p = p_out[ROW];
          en = 0;
          repeat (3) @(posedge clk);
          #1 check(f_out == held && p_out[ROW] == held_p, "stall freezes the PE");
          @(negedge clk); en = 1;
        end
        @(posedge clk); #1;
        check(f_out_valid && f_out == x && f_out_g == GW'(g), "feature forwarded after one cycle");
        if (g == ng - 1) begin
          check(p_out_valid, "result valid on last group");
          check($signed(p_out[ROW]) == exp_sum, $sformatf("sum %0d exp %0d", $signed(p_out[ROW]), exp_sum));
          check(p_out[0] == up, "upstream result passed on unchanged");
        end else begin
          check(!p_out_valid, "no result before last group");
        end
      end
      @(negedge clk); f_in_valid = 0; p_in_valid = 0;
      // a held enable keeps the result register
      en = 0; @(posedge clk); #1;
      check(f_out_valid, "enable low freezes the outputs");
      @(negedge clk); en = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
