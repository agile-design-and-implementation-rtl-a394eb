// tb_wb_buffer: self-checking test of the weight buffer.
// Random weight beats are sent with random gaps and taken with random back-pressure; each packet
// must hold KK consecutive beats in order and carry the column/group tags column first; clear
// must restart the numbering.
module tb_wb_buffer;
  localparam int KK = 3, COLS = 3, ROWS = 2, GD = 4;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_ready, out_valid, out_ready = 0, busy;
  logic [ROWS-1:0][7:0] in_data = '0;
  logic [KK-1:0][ROWS-1:0][7:0] out_wgt; logic [1:0] out_col; logic [1:0] out_g;
  always #5 clk = ~clk;
  wb_buffer #(.KK(KK), .COLS(COLS), .ROWS(ROWS), .GD(GD)) dut (.*);
  int checks = 0, failures = 0, npk = 0;
  logic [ROWS-1:0][7:0] sent [$];
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) sent.push_back(in_data);
    if (out_valid && out_ready) begin
      for (int k = 0; k < KK; k++) check(out_wgt[k] == sent.pop_front(), $sformatf("packet %0d beat %0d", npk, k));
      check(out_col == 2'(npk % COLS) && out_g == 2'(npk / COLS), $sformatf("packet %0d tags", npk));
      npk++;
    end
  end
  task automatic load(input int n);
    npk = 0;
    for (int i = 0; i < n * KK; i++) begin
      @(negedge clk);
      while ($urandom % 3 == 0) begin in_valid = 0; out_ready = $urandom % 2; @(negedge clk); end
      in_valid = 1; in_data = 16'($urandom); out_ready = $urandom % 2;
      @(posedge clk); while (!in_ready) begin @(negedge clk); out_ready = $urandom % 2; @(posedge clk); end
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    #1 check(npk == n && !busy, "all packets delivered");
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    load(COLS * GD);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    load(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
