// rav_acs_tb: checks one modified ACS unit (and a second one configured as
// the starting state) against the published rules: candidate metrics
// WM_i + BM_i, winner among survivor candidates, V = winner negative, WM
// held when V = 0, Dec, and Tb = NAND(Vb, WM < -T + r) with T = 24, r = 4.
// Random stimulus in the ranges the decoder produces; the init values
// (-T/valid for the starting state, 0/invalid otherwise) are checked too.
`timescale 1ns/1ps
module rav_acs_tb;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic signed [5:0] bm0, bm1, wm0, wm1;
  logic vb0, vb1;
  logic signed [5:0] wm, wm_s;
  logic vb, dec, tb, vb_s, dec_s, tb_s;
  int checks = 0, failures = 0;

  rav_acs dut (.clk, .rst_n, .init, .en, .bm0, .bm1, .wm0, .wm1, .vb0, .vb1,
               .wm(wm), .vb(vb), .dec(dec), .tb(tb));
  rav_acs #(.START(1'b1)) dut_s (.clk, .rst_n, .init, .en, .bm0, .bm1, .wm0, .wm1,
               .vb0, .vb1, .wm(wm_s), .vb(vb_s), .dec(dec_s), .tb(tb_s));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  int n_hold, n_load;

  initial begin
    int ewm, evb, edec, p0, p1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    expect_eq("init wm", int'(wm), 0);     expect_eq("init vb", int'(vb), 0);
    expect_eq("init wm start", int'(wm_s), -24); expect_eq("init vb start", int'(vb_s), 1);
    expect_eq("init tb start", int'(tb_s), 0);   expect_eq("init tb", int'(tb), 1);
    ewm = 0; evb = 0; edec = 0;
    for (int i = 0; i < 5000; i++) begin
      bm0 = 6'(int'($urandom_range(18)) - 4);
      bm1 = 6'(int'($urandom_range(18)) - 4);
      wm0 = 6'(-int'($urandom_range(28)));
      wm1 = 6'(-int'($urandom_range(28)));
      vb0 = 1'($urandom); vb1 = 1'($urandom);
      en  = ($urandom_range(7) != 0);
      p0 = int'(wm0) + int'(bm0);
      p1 = int'(wm1) + int'(bm1);
      if (en) begin
        int m, d;
        if (vb0 && vb1) d = (p1 < p0) ? 1 : 0;
        else d = vb1 ? 1 : 0;
        m = d ? p1 : p0;
        edec = d;
        evb = ((vb0 || vb1) && m < 0) ? 1 : 0;
        if (evb) begin ewm = m; n_load++; end else n_hold++;
      end
      @(negedge clk);
      expect_eq("vb", int'(vb), evb);
      expect_eq("dec", int'(dec), edec);
      expect_eq("wm", int'(wm), ewm);
      expect_eq("tb", int'(tb), (evb && ewm < -20) ? 0 : 1);
    end
    checks++;
    if (n_hold == 0 || n_load == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
