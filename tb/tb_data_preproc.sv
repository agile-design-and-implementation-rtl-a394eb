// tb_data_preproc: self-checking test of the data pre-processing stage.
// Weight beats (route 1) must come out unchanged on the weight port; feature beats (route 0) of a
// 6-channel layer with 4 lanes and 2 groups must have the lanes of channels 6 and 7 zeroed in
// every second beat and be otherwise unchanged; the beat counter must count; both outputs get
// random back-pressure.
module tb_data_preproc;
  localparam int L = 4;
  logic clk = 0, rst_n = 0, clear = 0, route = 0;
  logic [5:0] in_groups = 2; logic [9:0] in_ch = 6;
  logic in_valid = 0, in_ready, feat_valid, feat_ready = 0, wgt_valid, wgt_ready = 0, pending;
  logic [L-1:0][7:0] in_data = '0, feat_data, wgt_data; logic [31:0] count;
  always #5 clk = ~clk;
  data_preproc #(.LANES(L), .DEPTH(4)) dut (.*);
  int checks = 0, failures = 0, nout = 0;
  logic [L-1:0][7:0] sent [$];
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) sent.push_back(in_data);
    check(!(feat_valid && wgt_valid), "one output at a time");
    if (wgt_valid && wgt_ready) begin
      check(route && wgt_data == sent.pop_front(), "weight beat unchanged"); nout++;
    end
    if (feat_valid && feat_ready) begin
      logic [L-1:0][7:0] e; e = sent.pop_front();
      if (nout % 2 == 1) begin e[2] = 0; e[3] = 0; end
      check(!route && feat_data == e, $sformatf("feature beat %0d", nout)); nout++;
    end
  end
  task automatic send(input int n);
    nout = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1; in_data = 32'($urandom) | 32'hF0F0_0000;
      feat_ready = $urandom % 2; wgt_ready = $urandom % 2;
      while (!in_ready) begin @(negedge clk); feat_ready = $urandom % 2; wgt_ready = $urandom % 2; end
    end
    @(negedge clk); in_valid = 0; feat_ready = 1; wgt_ready = 1;
    repeat (8) @(posedge clk);
    check(nout == n && count == 32'(n) && !pending, "all beats delivered and counted");
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    route = 1; send(20);
    route = 0; send(30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
