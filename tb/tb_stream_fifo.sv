// tb_stream_fifo: self-checking test of the stream FIFO.
// Random valid and ready patterns push a counting sequence through a 4-deep FIFO; the output must
// be the same sequence, in_ready must drop exactly when four words are held, and the FIFO must
// fill up at least once.
module tb_stream_fifo;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data = 0, out_data;
  always #5 clk = ~clk;
  stream_fifo #(.W(16), .DEPTH(4)) dut (.*);
  int checks = 0, failures = 0, expv = 0, held = 0, fulls = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      check(out_data == 16'(expv), $sformatf("got %0d exp %0d", out_data, expv));
      expv++;
    end
    if (in_valid && in_ready) in_data <= in_data + 1'b1;
    held <= held + (in_valid && in_ready) - (out_valid && out_ready);
    check(in_ready == (held != 4), "in_ready reflects fullness");
    if (held == 4) fulls++;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom % 4) != 0;
      out_ready = (i < 1000) ? (($urandom % 3) == 0) : (($urandom % 4) != 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (10) @(posedge clk);
    check(expv > 500, "data flowed");
    check(fulls > 0, "FIFO became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
