// tb_instr_unit: self-checking test of the instruction cache and decoder.
// Writes random instructions over AXI-Lite (one word with a partial byte strobe), reads them back,
// checks that the decoded layer parameters match the word layout, that NUM_INSTR reads back, that
// a CTRL write pulses start for exactly one cycle, and that STATUS shows busy and a sticky done.
module tb_instr_unit;
  localparam int NI = 4;
  logic clk = 0, rst_n = 0;
  logic [11:0] s_awaddr = 0, s_araddr = 0; logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready;
  logic [31:0] s_wdata = 0, s_rdata; logic [3:0] s_wstrb = 4'hf; logic [1:0] s_bresp, s_rresp;
  logic s_bvalid, s_bready = 1, s_arvalid = 0, s_arready, s_rvalid, s_rready = 1;
  logic start, run_busy = 0, run_done = 0; logic [2:0] num_instr; logic [1:0] idx = 0;
  cnn_pkg::layer_cfg_t cfg;
  always #5 clk = ~clk;
  instr_unit #(.N_INSTR(NI)) dut (.*);
  int checks = 0, failures = 0, starts = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (start) starts++;
  task automatic wr(input logic [11:0] a, input logic [31:0] d, input logic [3:0] strb = 4'hf);
    @(negedge clk); s_awaddr = a; s_wdata = d; s_wstrb = strb; s_awvalid = 1; s_wvalid = 1; #1;
    while (!(s_awready && s_wready)) @(negedge clk);
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); s_araddr = a; s_arvalid = 1; #1;
    while (!s_arready) @(negedge clk);
    @(negedge clk); s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
  endtask
  logic [31:0] words [NI][8];
  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < NI; i++) for (int w = 0; w < 8; w++) begin
      words[i][w] = $urandom; wr(12'h800 + 12'(4 * (8 * i + w)), words[i][w]);
    end
    // partial write: byte 1 of instruction 2 word 6
    wr(12'h800 + 12'(4 * (8 * 2 + 6)), 32'hA5A5A5A5, 4'b0010);
    words[2][6][15:8] = 8'hA5;
    for (int i = 0; i < NI; i++) for (int w = 0; w < 8; w++) begin
      rd(12'h800 + 12'(4 * (8 * i + w)), d);
      check(d == words[i][w], $sformatf("read back %0d.%0d", i, w));
    end
    for (int i = 0; i < NI; i++) begin
      @(negedge clk); idx = 2'(i); #1;
      check(cfg.op == cnn_pkg::op_e'(words[i][0][1:0]) && cfg.ksize == words[i][0][3:2] &&
            cfg.stride == words[i][0][5:4] && cfg.pad == words[i][0][7:6] &&
            cfg.in_groups == words[i][0][13:8] && cfg.out_groups == words[i][0][21:16], "decode word 0");
      check(cfg.in_h == words[i][1][9:0] && cfg.in_w == words[i][1][25:16] &&
            cfg.out_h == words[i][2][9:0] && cfg.out_w == words[i][2][25:16], "decode sizes");
      check(cfg.feat_base == words[i][3] && cfg.wgt_base == words[i][4] && cfg.out_base == words[i][5], "decode addresses");
      check(cfg.q_mult == words[i][6][15:0] && cfg.q_shift == words[i][6][21:16] &&
            cfg.q_zp == words[i][6][31:24] && cfg.in_ch == words[i][7][9:0], "decode quantization and channels");
    end
    wr(12'h008, 3);
    rd(12'h008, d); check(d == 3 && num_instr == 3, "NUM_INSTR");
    wr(12'h000, 1);
    repeat (3) @(posedge clk);
    check(starts == 1, $sformatf("one start pulse (%0d)", starts));
    run_busy = 1;
    rd(12'h004, d); check(d[1:0] == 2'b01, "status busy");
    @(negedge clk); run_busy = 0; run_done = 1; @(negedge clk); run_done = 0;
    repeat (2) @(posedge clk);
    rd(12'h004, d); check(d[1:0] == 2'b10, "status done");
    rd(12'h004, d); check(d[1:0] == 2'b10, "done is sticky");
    wr(12'h000, 1);
    repeat (2) @(posedge clk);
    rd(12'h004, d); check(d[1] == 1'b0, "start clears done");
    check(starts == 2, "second start pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
