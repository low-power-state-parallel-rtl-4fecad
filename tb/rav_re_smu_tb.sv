// rav_re_smu_tb: register-exchange survivor memory unit (64 states, L = 40).
// Phase 1 feeds the columns of a known input sequence in which only the
// state on the transmitted path survives: the outputs must reproduce the
// input bits in order, the first one for depth 0, each 3 cycles after the
// column of depth t+39. Phase 2 restarts with init and feeds random
// columns; the outputs are compared with a path-history and majority model
// written here (only surviving rows vote, strict majority of ones).
`timescale 1ns/1ps
module rav_re_smu_tb;
  localparam int N = 64, L = 40, NCOL = 1500;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0;
  logic [N-1:0] vb, dec;
  logic out_valid, out_bit;
  int checks = 0, failures = 0;

  rav_re_smu dut (.*);
  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q [$];
  int unsigned col_cyc [NCOL];
  int out_cnt;
  bit phase1;

  always @(posedge clk) if (rst_n && !init && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else if (int'(out_bit) != exp_q.pop_front()) begin
      failures++;
      if (failures < 10) $display("output %0d wrong", out_cnt);
    end
    if (phase1) begin
      checks++;
      if (cyc != col_cyc[out_cnt + L - 1] + 3) begin
        failures++;
        $display("latency %0d at %0d", cyc - col_cyc[out_cnt + L - 1], out_cnt);
      end
    end
    out_cnt++;
  end

  bit hist [N][$];
  bit rvb  [N];

  initial begin
    int st, u;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // phase 1: single survivor on the transmitted path
    phase1 = 1; out_cnt = 0;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    st = 0;
    for (int t = 0; t < NCOL; t++) begin
      int prev;
      u = int'($urandom_range(1));
      prev = st;
      st = (u << 5) | (st >> 1);
      vb = 64'd1 << st;
      dec = {$urandom, $urandom};
      dec[st] = 1'(prev & 1);
      if (t + L - 1 < NCOL) exp_q.push_back(u);
      @(negedge clk);
      in_valid = 1;
      col_cyc[t] = cyc;
      @(negedge clk);
      in_valid = 0;
    end
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("phase 1: %0d outputs missing", exp_q.size()); end
    // phase 2: random columns against the model
    phase1 = 0; out_cnt = 0; exp_q = {};
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int n = 0; n < N; n++) begin
      hist[n] = {};
      for (int i = 0; i < L; i++) hist[n].push_back(1'b0);
      rvb[n] = 0;
    end
    for (int t = 0; t < NCOL; t++) begin
      bit nh [N][$];
      int o, c;
      vb  = {$urandom, $urandom} & {$urandom, $urandom};
      dec = {$urandom, $urandom};
      for (int n = 0; n < N; n++) begin
        if (vb[n]) begin
          nh[n] = hist[((n << 1) & (N - 1)) | int'(dec[n])];
          void'(nh[n].pop_front());
          nh[n].push_back(1'((n >> 5) & 1));
        end else nh[n] = hist[n];
      end
      o = 0; c = 0;
      for (int n = 0; n < N; n++) begin
        hist[n] = nh[n];
        if (vb[n]) begin c++; o += int'(hist[n][0]); end
      end
      if (t >= L - 1) exp_q.push_back((2 * o > c) ? 1 : 0);
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
    end
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("phase 2: %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
