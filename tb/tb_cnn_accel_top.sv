// tb_cnn_accel_top: end-to-end test of the accelerator at reduced size (PAR = 4 channels per
// beat, 3x3 kernels, 4 channel groups per PE).
// The testbench plays the host: it fills memory (behavioural DDR model with random back-pressure)
// with an input map and weights, writes a four-layer program over AXI-Lite, starts it and waits
// for irq. The layers chain through memory:
//   L0 3x3 conv, stride 1, pad 1: 7x7x6 -> 7x7x8 (6 channels: lanes of the second group masked)
//   L1 3x3 conv, stride 2, pad 1: 7x7x8 -> 4x4x4
//   L2 1x1 conv:                  4x4x4 -> 4x4x8 (two output-channel groups)
//   L3 reshape through a stand-in operator that returns each pixel, doubled: 4x4x8 -> 4x4x8
// Every output byte of every layer is compared with a reference computed here from the same
// memory contents. The run also counts the mechanisms it must exercise: memory back-pressure on
// reads and writes, a stalled systolic array, a stalled line cache, padding, channel masking,
// several channel groups, several output-channel groups, 4 KB burst splitting and the mode switch
// to the reshape path; a mechanism that never happened counts as a failure.
module tb_cnn_accel_top;
  localparam int PAR = 4, K = 3, GD = 4, LBW = 32, NI = 8, DW = PAR * 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [11:0] s_awaddr = 0, s_araddr = 0; logic s_awvalid = 0, s_awready, s_wvalid = 0, s_wready;
  logic [31:0] s_wdata = 0, s_rdata; logic [3:0] s_wstrb = 4'hf; logic [1:0] s_bresp, s_rresp;
  logic s_bvalid, s_bready = 1, s_arvalid = 0, s_arready, s_rvalid, s_rready = 1;
  logic [31:0] m_araddr, m_awaddr; logic [7:0] m_arlen, m_awlen; logic [2:0] m_arsize, m_awsize;
  logic [1:0] m_arburst, m_awburst, m_rresp, m_bresp;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready, m_awvalid, m_awready;
  logic [DW-1:0] m_rdata, m_wdata; logic [DW/8-1:0] m_wstrb; logic m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic rs_out_valid, rs_out_ready, rs_out_last, rs_in_valid, rs_in_ready, irq;
  logic [K*K-1:0][PAR-1:0][7:0] rs_out_data; logic [$clog2(GD)-1:0] rs_out_g;
  logic [PAR-1:0][31:0] rs_in_data;

  cnn_accel_top #(.PAR(PAR), .K(K), .GD(GD), .LB_WORDS(LBW), .N_INSTR(NI)) dut (.*);

  axi_mem_model #(.DW(DW)) ddr (.clk, .rst_n,
    .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready), .rdata(m_rdata),
    .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready), .wdata(m_wdata),
    .wvalid(m_wvalid), .wready(m_wready), .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready));

  // stand-in reshape operator: one result beat per window beat, lane = 2 * centre pixel value
  logic rs_full = 0; logic [PAR-1:0][31:0] rs_q;
  assign rs_out_ready = !rs_full;
  assign rs_in_valid  = rs_full;
  assign rs_in_data   = rs_q;
  always @(posedge clk) begin
    if (rs_in_valid && rs_in_ready) rs_full <= 0;
    if (rs_out_valid && rs_out_ready) begin
      rs_full <= 1;
      for (int c = 0; c < PAR; c++) rs_q[c] <= 32'(2 * int'($signed(rs_out_data[0][c])));
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  int n_arr_stall = 0, n_lb_stall = 0, n_reshape = 0, n_4k = 0, n_mask = 0;
  always @(posedge clk) if (rst_n) begin
    if (!dut.u_alu.en) n_arr_stall++;
    if (dut.u_alu.feat_valid && !dut.u_alu.feat_ready) n_lb_stall++;
    if (rs_out_valid && rs_out_ready) n_reshape++;
    if (m_arvalid && m_arready && m_arlen != 15 && m_araddr[11:0] + (32'(m_arlen) + 1) * (DW/8) == 4096) n_4k++;
    if (dut.u_pp.feat_valid && dut.u_pp.feat_ready && dut.u_pp.feat_data != dut.u_pp.b_data) n_mask++;
  end

  // AXI-Lite host writes
  // AXI-Lite host accesses; ready and valid are sampled at the falling edge, where they are stable
  task automatic lite_wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); s_awaddr = a; s_wdata = d; s_awvalid = 1; s_wvalid = 1; #1;
    while (!(s_awready && s_wready)) @(negedge clk);
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
  endtask
  task automatic lite_rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); s_araddr = a; s_arvalid = 1; #1;
    while (!s_arready) @(negedge clk);
    @(negedge clk); s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
  endtask

  // reference model memory (bytes, by byte address)
  byte refm [int];
  function automatic byte mb(input int addr);   // byte from the DDR model
    logic [DW-1:0] w; int a;
    a = addr / (DW/8);
    w = ddr.mem.exists(a) ? ddr.mem[a] : '0;
    return byte'(w[8*(addr % (DW/8)) +: 8]);
  endfunction
  task automatic put(input int addr, input byte v);
    int a; logic [DW-1:0] w;
    a = addr / (DW/8);
    w = ddr.mem.exists(a) ? ddr.mem[a] : '0;
    w[8*(addr % (DW/8)) +: 8] = v;
    ddr.mem[a] = w;
  endtask

  typedef struct { int op, ks, s, p, ih, iw, ic, oh, ow, oc, fb, wb, ob, qm, qs, qz; } layer_t;
  layer_t L [4];

  function automatic byte quant(input longint x, input int m, input int sh, input int zp);
    longint p;
    p = x * m; if (sh > 0) p += longint'(1) <<< (sh - 1);
    p = (p >>> sh) + zp;
    if (p > 127) p = 127; if (p < -128) p = -128;
    return byte'(p);
  endfunction

  // feature (y,x,ch) of a map at base with G groups, masked to its channel count
  function automatic int feat(input layer_t l, input int y, input int x, input int ch);
    int g;
    if (y < 0 || y >= l.ih || x < 0 || x >= l.iw || ch >= l.ic) return 0;
    g = (l.ic + PAR - 1) / PAR;
    return int'(mb(l.fb + ((y * l.iw + x) * g) * PAR + ch));
  endfunction

  task automatic expect_layer(input layer_t l);
    int G, OG;
    G = (l.ic + PAR - 1) / PAR; OG = (l.oc + PAR - 1) / PAR;
    for (int oy = 0; oy < l.oh; oy++) for (int ox = 0; ox < l.ow; ox++) for (int o = 0; o < OG * PAR; o++) begin
      longint acc = 0; int og, r;
      og = o / PAR; r = o % PAR;
      if (l.op == 0) begin
        for (int ky = 0; ky < l.ks; ky++) for (int kx = 0; kx < l.ks; kx++) for (int ci = 0; ci < G * PAR; ci++) begin
          int w; int k;
          k = ky * K + kx;
          w = int'(mb(l.wb + og * (G * PAR * K * K) * PAR + (((ci / PAR) * PAR + ci % PAR) * K * K + k) * PAR + r));
          acc += longint'(feat(l, oy * l.s - l.p + ky, ox * l.s - l.p + kx, ci)) * w;
        end
      end else begin
        acc = 2 * feat(l, oy, ox, o);
      end
      refm[l.ob + ((oy * l.ow + ox) * OG) * PAR + o] = quant(acc, l.qm, l.qs, l.qz);
    end
  endtask

  task automatic check_layer(input int n, input layer_t l);
    int OG, bad = 0;
    OG = (l.oc + PAR - 1) / PAR;
    for (int i = 0; i < l.oh * l.ow * OG * PAR; i++) begin
      byte got, e;
      got = mb(l.ob + i); e = refm[l.ob + i];
      check(got == e, $sformatf("layer %0d byte %0d: got %0d exp %0d", n, i, got, e));
    end
  endtask

  initial begin
    logic [31:0] st;
    int cyc0;
    L[0] = '{0, 3, 1, 1, 7, 7, 6, 7, 7, 8, 32'h0F88, 32'h2000, 32'h4000, 3, 9, -2};
    L[1] = '{0, 3, 2, 1, 7, 7, 8, 4, 4, 4, 32'h4000, 32'h3000, 32'h5000, 5, 10, 1};
    L[2] = '{0, 1, 1, 0, 4, 4, 4, 4, 4, 8, 32'h5000, 32'h3800, 32'h6000, 7, 6, 0};
    L[3] = '{1, 1, 1, 0, 4, 4, 8, 4, 4, 8, 32'h6000, 0, 32'h7000, 1, 0, 0};
    // input map (6 channels in 2 groups; the unused lanes hold garbage that must be masked)
    for (int i = 0; i < 7 * 7 * 2 * PAR; i++) put(L[0].fb + i, byte'($urandom));
    // weights of the three convolutions
    for (int n = 0; n < 3; n++) begin
      int G, OG;
      G = (L[n].ic + PAR - 1) / PAR; OG = (L[n].oc + PAR - 1) / PAR;
      for (int i = 0; i < OG * G * PAR * K * K * PAR; i++) put(L[n].wb + i, byte'($signed(4'($urandom))));
    end
    repeat (3) @(posedge clk); rst_n = 1;
    // program
    for (int n = 0; n < 4; n++) begin
      int G, OG; logic [11:0] a;
      G = (L[n].ic + PAR - 1) / PAR; OG = (L[n].oc + PAR - 1) / PAR;
      a = 12'h800 + 12'(n * 32);
      lite_wr(a + 0,  32'(L[n].op) | (32'(L[n].ks) << 2) | (32'(L[n].s) << 4) | (32'(L[n].p) << 6) |
                      (32'(G) << 8) | (32'(OG) << 16));
      lite_wr(a + 4,  32'(L[n].ih) | (32'(L[n].iw) << 16));
      lite_wr(a + 8,  32'(L[n].oh) | (32'(L[n].ow) << 16));
      lite_wr(a + 12, L[n].fb);
      lite_wr(a + 16, L[n].wb);
      lite_wr(a + 20, L[n].ob);
      lite_wr(a + 24, 32'(16'(L[n].qm)) | (32'(L[n].qs) << 16) | (32'(8'(L[n].qz)) << 24));
      lite_wr(a + 28, 32'(L[n].ic));
    end
    lite_rd(12'h81C, st);
    check(st == 32'(L[0].ic), "instruction word read back");
    lite_wr(12'h008, 4);
    lite_wr(12'h000, 1);
    // hold the memory's write side for a while so that results pile up and stall the array
    ddr.hold_wr = 1;
    for (int i = 0; i < 20000 && n_arr_stall < 20; i++) @(posedge clk);
    ddr.hold_wr = 0;
    cyc0 = 0;
    fork
      begin @(posedge irq); end
      begin forever begin @(posedge clk); cyc0++; end end
    join_any
    disable fork;
    repeat (2) @(posedge clk);
    lite_rd(12'h004, st);
    check(st[1:0] == 2'b10, $sformatf("status shows done and not busy (%b)", st[1:0]));
    // reference, layer by layer (each layer reads the previous one's output from memory)
    for (int n = 0; n < 4; n++) begin
      expect_layer(L[n]);
      check_layer(n, L[n]);
    end
    $display("run took %0d cycles; array stalls %0d, line-cache stalls %0d, reshape beats %0d, 4K splits %0d, masked beats %0d, memory stalls rd %0d wr %0d",
             cyc0, n_arr_stall, n_lb_stall, n_reshape, n_4k, n_mask, ddr.rd_stalls, ddr.wr_stalls);
    check(n_arr_stall > 0, "systolic array stalled by back-pressure");
    check(n_lb_stall > 0, "line cache held the input back");
    check(n_reshape == 4 * 4 * 2, "reshape path used for every window beat");
    check(n_4k > 0, "a read burst was split at 4 KB");
    check(n_mask > 0, "channel masking applied");
    check(ddr.rd_stalls > 0 && ddr.wr_stalls > 0, "memory back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
