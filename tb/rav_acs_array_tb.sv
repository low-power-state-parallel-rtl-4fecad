// rav_acs_array_tb: runs the 64-state ACS array for the 133/171 code on
// normalized branch metrics of a noisy encoded stream and compares, depth by
// depth, every validity bit, decision bit, threshold flag and surviving
// winner metric with a behavioural model of the relaxed adaptive Viterbi
// recursion written here (trellis from the encoder equations, bias d from
// the model's own threshold check with T = 24, r = 4).
`timescale 1ns/1ps
module rav_acs_array_tb;
  localparam int K = 7, N = 64;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0;
  logic signed [3:0][5:0] nbm;
  logic out_valid;
  logic [N-1:0] vb, dec, tb;
  logic signed [N-1:0][5:0] wm;
  int checks = 0, failures = 0;

  rav_acs_array dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  mwm [N];
  bit  mvb [N];
  bit  mdec [N];
  int  n_r, n_0;

  function automatic int sym(int n, int p);
    int w;
    w = (((n >> 5) & 1) << 6) | p;
    return ($countones(w & 'o171) % 2) * 2 + ($countones(w & 'o133) % 2);
  endfunction

  initial begin
    int st, u, c0, c1, y0, y1, bmv[4], mn, d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    for (int n = 0; n < N; n++) begin mwm[n] = (n == 0) ? -24 : 0; mvb[n] = (n == 0); end
    st = 0;
    for (int t = 0; t < 3000; t++) begin
      int nwm [N];
      bit nvb [N];
      u  = int'($urandom_range(1));
      c0 = $countones(((u << 6) | st) & 'o133) % 2;
      c1 = $countones(((u << 6) | st) & 'o171) % 2;
      st = (u << 5) | (st >> 1);
      y0 = c0 ? 7 : 0; y1 = c1 ? 7 : 0;
      if ($urandom_range(5) == 0) y0 = int'($urandom_range(7));
      if ($urandom_range(5) == 0) y1 = int'($urandom_range(7));
      for (int s = 0; s < 4; s++)
        bmv[s] = ((s & 1) ? 7 - y0 : y0) + ((s & 2) ? 7 - y1 : y1);
      mn = bmv[0];
      for (int s = 1; s < 4; s++) if (bmv[s] < mn) mn = bmv[s];
      d = 4;
      for (int n = 0; n < N; n++) if (mvb[n] && mwm[n] < -20) d = 0;
      if (d != 0) n_r++; else n_0++;
      for (int s = 0; s < 4; s++) nbm[s] = 6'(bmv[s] - mn - d);
      // model step
      for (int n = 0; n < N; n++) begin
        int p0, p1, a, b, m, dd;
        p0 = (n << 1) & (N - 1); p1 = p0 | 1;
        a = mwm[p0] + (bmv[sym(n, p0)] - mn - d);
        b = mwm[p1] + (bmv[sym(n, p1)] - mn - d);
        if (mvb[p0] && mvb[p1]) dd = (b < a) ? 1 : 0;
        else dd = mvb[p1] ? 1 : 0;
        m = dd ? b : a;
        nvb[n] = (mvb[p0] || mvb[p1]) && m < 0;
        nwm[n] = nvb[n] ? m : mwm[n];
        mdec[n] = dd[0];
      end
      for (int n = 0; n < N; n++) begin mwm[n] = nwm[n]; mvb[n] = nvb[n]; end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int n = 0; n < N; n++) begin
        checks += 3;
        if (vb[n] != mvb[n] || dec[n] != mdec[n] ||
            tb[n] != !(mvb[n] && mwm[n] < -20)) begin
          failures++;
          if (failures < 10) $display("depth %0d state %0d: vb %0d/%0d dec %0d/%0d", t, n, vb[n], mvb[n], dec[n], mdec[n]);
        end
        if (mvb[n]) begin
          checks++;
          if (int'($signed(wm[n])) != mwm[n]) begin
            failures++;
            if (failures < 10) $display("depth %0d state %0d: wm %0d expected %0d", t, n, $signed(wm[n]), mwm[n]);
          end
        end
      end
    end
    checks++;
    if (n_r == 0 || n_0 == 0) begin failures++; $display("bias never %0s", n_r == 0 ? "r" : "0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
