// rav_bmu_tb: checks the branch metric unit against the per-bit distance of
// every soft input pair (all 64 pairs, in random order too) and its
// one-cycle latency; also checks that init suppresses out_valid.
`timescale 1ns/1ps
module rav_bmu_tb;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0;
  logic [2:0] y0 = 0, y1 = 0;
  logic out_valid;
  logic [3:0][3:0] bm;
  int checks = 0, failures = 0;

  rav_bmu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bdist(int y, int c);
    return (c == 1) ? 7 - y : y;
  endfunction

  task automatic apply(int a, int b);
    @(negedge clk);
    y0 = 3'(a); y1 = 3'(b); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("no out_valid"); end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (int'(bm[s]) != bdist(a, s & 1) + bdist(b, s >> 1)) begin
        failures++;
        $display("y=(%0d,%0d) sym %0d: got %0d", a, b, s, bm[s]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) apply(a, b);
    for (int i = 0; i < 100; i++) apply(int'($urandom_range(7)), int'($urandom_range(7)));
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("out_valid without input"); end
    init = 1; in_valid = 1;
    @(negedge clk);
    init = 0; in_valid = 0;
    checks++;
    if (out_valid) begin failures++; $display("out_valid during init"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
