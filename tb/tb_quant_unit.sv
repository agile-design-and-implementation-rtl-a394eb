// tb_quant_unit: self-checking test of the requantization.
// Random 32-bit values with random multiplier, shift and zero point are compared lane by lane with
// a reference computed here in 64-bit arithmetic (round half up, then saturate); output
// back-pressure is applied at random; large values must saturate at least once either way.
module tb_quant_unit;
  localparam int L = 4;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] q_mult = 0; logic [5:0] q_shift = 0; logic signed [7:0] q_zp = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [L-1:0][31:0] in_data = '0; logic [L-1:0][7:0] out_data;
  always #5 clk = ~clk;
  quant_unit #(.LANES(L)) dut (.*);
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;
  logic [L-1:0][7:0] expq [$];
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic logic [7:0] ref_q(input int x, input int m, input int sh, input int zp);
    longint p, r;
    p = longint'(x) * longint'(m);
    if (sh > 0) p = p + (longint'(1) <<< (sh - 1));
    r = (p >>> sh) + zp;
    if (r > 127) begin sat_hi++; r = 127; end
    if (r < -128) begin sat_lo++; r = -128; end
    return 8'(r);
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [L-1:0][7:0] e; e = expq.pop_front();
    for (int i = 0; i < L; i++) check(out_data[i] == e[i], $sformatf("lane %0d got %0d exp %0d", i, $signed(out_data[i]), $signed(e[i])));
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [L-1:0][7:0] e;
      @(negedge clk);
      q_mult = 16'($urandom); q_shift = 6'(8 + $urandom % 16); q_zp = 8'($urandom);
      if (t % 10 == 0) q_shift = 0;
      for (int i = 0; i < L; i++) begin
        in_data[i] = (t % 3 == 0) ? $urandom : 32'($signed(20'($urandom)));
        e[i] = ref_q($signed(in_data[i]), q_mult, q_shift, q_zp);
      end
      in_valid = 1; out_ready = ($urandom % 4) != 0;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      expq.push_back(e);
      // hold the parameters until this beat has left the unit
      @(negedge clk); in_valid = 0; out_ready = 1;
      @(posedge clk);
    end
    repeat (4) @(posedge clk);
    check(expq.size() == 0, "all beats came out");
    check(sat_hi > 0 && sat_lo > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
