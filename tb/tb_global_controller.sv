// tb_global_controller: self-checking test of the layer sequencer.
// A three-instruction program (a convolution with two output-channel groups, a reshape layer and
// a convolution with one group) is run against stand-ins for the DMA engines and the ALU that stay
// busy for random times. Every read and write command the controller issues (route, base
// address, beat count, stride) is compared with the expected sequence, the controller must wait
// for the weights to settle before computing, and done must pulse once at the end.
module tb_global_controller;
  localparam int PAR = 4, K = 3, NI = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] num_instr = 3; logic [1:0] idx;
  cnn_pkg::layer_cfg_t instr_cfg, cfg, prog [NI];
  logic busy, done, route, pp_clear, rd_start, wr_start, lb_start, wclear;
  logic [31:0] rd_base, rd_beats, wr_base, wr_stride, wr_count;
  logic rd_busy = 0, wr_busy = 0, alu_wgt_busy = 0, alu_busy = 0;
  always #5 clk = ~clk;
  assign instr_cfg = prog[idx];
  global_controller #(.PAR(PAR), .K(K), .N_INSTR(NI)) dut (.*);

  int checks = 0, failures = 0, dones = 0, wgt_wait_seen = 0;
  string got [$], expct [$];
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // stand-ins: each command keeps its unit busy for a random time
  int rd_left = 0, wr_left = 0, wb_left = 0;
  always @(posedge clk) if (rst_n) begin
    if (rd_start) begin
      got.push_back($sformatf("rd route=%0d base=%h beats=%0d", route, rd_base, rd_beats));
      rd_left = 3 + $urandom % 10;
      if (route) wb_left = rd_left + 2 + $urandom % 6;
    end
    if (wr_start) begin
      got.push_back($sformatf("wr base=%h stride=%0d count=%0d", wr_base, wr_stride, wr_count));
      wr_left = 5 + $urandom % 20;
    end
    if (done) dones++;
    if (alu_wgt_busy && !rd_busy && busy) wgt_wait_seen++;
    if (lb_start) check(wb_left == 0, "compute starts only after the weights have settled");
    rd_busy      <= rd_left > 0; if (rd_left > 0) rd_left--;
    wr_busy      <= wr_left > 0; if (wr_left > 0) wr_left--;
    alu_wgt_busy <= wb_left > 0; if (wb_left > 0) wb_left--;
    alu_busy     <= wr_left > 1;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    prog[0] = '0; prog[0].op = cnn_pkg::OP_CONV; prog[0].ksize = 3; prog[0].in_groups = 2; prog[0].out_groups = 2;
    prog[0].in_h = 5; prog[0].in_w = 6; prog[0].out_h = 5; prog[0].out_w = 6;
    prog[0].feat_base = 32'h1000; prog[0].wgt_base = 32'h8000; prog[0].out_base = 32'h20000;
    prog[1] = '0; prog[1].op = cnn_pkg::OP_RESHAPE; prog[1].in_groups = 2; prog[1].out_groups = 2;
    prog[1].in_h = 5; prog[1].in_w = 6; prog[1].out_h = 3; prog[1].out_w = 3;
    prog[1].feat_base = 32'h20000; prog[1].out_base = 32'h30000;
    prog[2] = '0; prog[2].op = cnn_pkg::OP_CONV; prog[2].ksize = 1; prog[2].in_groups = 1; prog[2].out_groups = 1;
    prog[2].in_h = 3; prog[2].in_w = 3; prog[2].out_h = 3; prog[2].out_w = 3;
    prog[2].feat_base = 32'h30000; prog[2].wgt_base = 32'h9000; prog[2].out_base = 32'h40000;
    prog[3] = '0;
    // expected commands (weights: in_groups*PAR*K*K beats of PAR bytes per output group)
    expct.push_back($sformatf("rd route=1 base=%h beats=%0d", 32'h8000, 72));
    expct.push_back($sformatf("rd route=0 base=%h beats=%0d", 32'h1000, 60));
    expct.push_back($sformatf("wr base=%h stride=%0d count=%0d", 32'h20000, 8, 30));
    expct.push_back($sformatf("rd route=1 base=%h beats=%0d", 32'h8000 + 72 * 4, 72));
    expct.push_back($sformatf("rd route=0 base=%h beats=%0d", 32'h1000, 60));
    expct.push_back($sformatf("wr base=%h stride=%0d count=%0d", 32'h20004, 8, 30));
    expct.push_back($sformatf("rd route=0 base=%h beats=%0d", 32'h20000, 60));
    expct.push_back($sformatf("wr base=%h stride=%0d count=%0d", 32'h30000, 4, 18));
    expct.push_back($sformatf("rd route=1 base=%h beats=%0d", 32'h9000, 36));
    expct.push_back($sformatf("rd route=0 base=%h beats=%0d", 32'h30000, 9));
    expct.push_back($sformatf("wr base=%h stride=%0d count=%0d", 32'h40000, 4, 9));
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    #1 check(busy, "busy after start");
    wait (dones == 1);
    repeat (5) @(posedge clk);
    check(!busy && dones == 1, "one done pulse, then idle");
    check(got.size() == expct.size(), $sformatf("command count %0d exp %0d", got.size(), expct.size()));
    for (int i = 0; i < expct.size() && i < got.size(); i++)
      check(got[i] == expct[i], $sformatf("command %0d: '%s' exp '%s'", i, got[i], expct[i]));
    check(wgt_wait_seen > 0, "waited for weights still travelling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
