// rav_re_array_tb: drives random validity and decision columns into the
// 64 x 40 register exchange array and compares the oldest bit of every row
// and the registered validity bits with a path-history model kept here as
// bit queues (each surviving state copies its winning predecessor's history
// and appends the input bit of the state; other rows keep theirs).
`timescale 1ns/1ps
module rav_re_array_tb;
  localparam int N = 64, L = 40;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0;
  logic [N-1:0] vb, dec, row_vb, oldest;
  logic out_valid;
  int checks = 0, failures = 0;

  rav_re_array dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hist [N][$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    for (int n = 0; n < N; n++) begin
      hist[n] = {};
      for (int i = 0; i < L; i++) hist[n].push_back(1'b0);   // front = oldest
    end
    for (int t = 0; t < 3000; t++) begin
      bit nh [N][$];
      vb  = {$urandom, $urandom} | {$urandom, $urandom};
      dec = {$urandom, $urandom};
      in_valid = ($urandom_range(9) != 0);
      for (int n = 0; n < N; n++) begin
        if (in_valid && vb[n]) begin
          int p;
          p = ((n << 1) & (N - 1)) | int'(dec[n]);
          nh[n] = hist[p];
          void'(nh[n].pop_front());
          nh[n].push_back(1'((n >> 5) & 1));
        end else nh[n] = hist[n];
      end
      for (int n = 0; n < N; n++) hist[n] = nh[n];
      @(negedge clk);
      if (in_valid) begin
        checks++;
        if (row_vb != vb || !out_valid) begin failures++; $display("row_vb/out_valid wrong at %0d", t); end
      end
      for (int n = 0; n < N; n++) begin
        checks++;
        if (oldest[n] != hist[n][0]) begin
          failures++;
          if (failures < 10) $display("step %0d row %0d: oldest %0d expected %0d", t, n, oldest[n], hist[n][0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
