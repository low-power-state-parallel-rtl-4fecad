// rav_dec_mem_tb: random writes and three-port synchronous reads of the
// 144 x 64 decision memory compared with a model array; checks the
// one-cycle read latency, that a read holds its data until the next read,
// and that a read of the address being written returns the old word.
`timescale 1ns/1ps
module rav_dec_mem_tb;
  localparam int W = 64, DEPTH = 144;
  logic clk = 0, we = 0;
  logic [7:0] waddr;
  logic [W-1:0] wdata;
  logic [2:0] re;
  logic [2:0][7:0] raddr;
  logic [2:0][W-1:0] rdata;
  int checks = 0, failures = 0;

  rav_dec_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model [DEPTH];
  logic [W-1:0] exp_r [3];
  bit           seen [3];

  initial begin
    re = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = {$urandom, $urandom}; model[a] = wdata;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      we = $urandom_range(1);
      waddr = 8'($urandom_range(DEPTH - 1));
      wdata = {$urandom, $urandom};
      for (int p = 0; p < 3; p++) begin
        re[p] = ($urandom_range(3) != 0);
        raddr[p] = (p == 0 && t % 7 == 0) ? waddr : 8'($urandom_range(DEPTH - 1));
        if (re[p]) begin exp_r[p] = model[raddr[p]]; seen[p] = 1; end
      end
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0; re = '0;
      for (int p = 0; p < 3; p++) if (seen[p]) begin
        checks++;
        if (rdata[p] !== exp_r[p]) begin
          failures++;
          if (failures < 10) $display("port %0d: %h expected %h", p, rdata[p], exp_r[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
