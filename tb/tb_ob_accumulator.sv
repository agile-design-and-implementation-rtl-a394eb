// tb_ob_accumulator: self-checking test of the output accumulation below the array.
// Random partial results are summed here over layers and columns and compared with the block's
// registered output one cycle later; a low enable must hold the output.
module tb_ob_accumulator;
  localparam int KK = 2, COLS = 3, ROWS = 2;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0, out_valid;
  logic [KK-1:0][COLS-1:0][ROWS-1:0][31:0] in = '0;
  logic [ROWS-1:0][31:0] out;
  always #5 clk = ~clk;
  ob_accumulator #(.KK(KK), .COLS(COLS), .ROWS(ROWS)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      int e [ROWS];
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) e[r] = 0;
      for (int k = 0; k < KK; k++) for (int c = 0; c < COLS; c++) for (int r = 0; r < ROWS; r++) begin
        in[k][c][r] = $urandom; e[r] += int'(in[k][c][r]);
      end
      in_valid = 1; en = 1;
      @(posedge clk); #1;
      check(out_valid, "valid one cycle later");
      for (int r = 0; r < ROWS; r++) check(int'(out[r]) == e[r], $sformatf("sum row %0d", r));
      @(negedge clk); en = 0; in = '1;
      @(posedge clk); #1;
      for (int r = 0; r < ROWS; r++) check(int'(out[r]) == e[r], "held while enable is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
