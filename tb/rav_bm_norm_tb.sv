// rav_bm_norm_tb: normalized metrics must equal BM - (BM_B + d) as signed
// numbers, one cycle after the input, for random metric sets with their
// true minimum and d in {0, 4}.
`timescale 1ns/1ps
module rav_bm_norm_tb;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0;
  logic [3:0][3:0] bm;
  logic [3:0] bm_min, d;
  logic out_valid;
  logic signed [3:0][5:0] nbm;
  int checks = 0, failures = 0;

  rav_bm_norm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v [4];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      int m;
      @(negedge clk);
      m = 15;
      for (int s = 0; s < 4; s++) begin
        bm[s] = 4'($urandom_range(14));
        if (int'(bm[s]) < m) m = int'(bm[s]);
      end
      bm_min = 4'(m);
      d = $urandom_range(1) ? 4'd4 : 4'd0;
      for (int s = 0; s < 4; s++) exp_v[s] = int'(bm[s]) - m - int'(d);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("missing out_valid"); end
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (int'($signed(nbm[s])) != exp_v[s]) begin
          failures++;
          $display("sym %0d: got %0d expected %0d", s, $signed(nbm[s]), exp_v[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
