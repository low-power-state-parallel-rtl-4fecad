// rav_tb_smu_tb: trace-back survivor memory unit (64 states, L = 48, D = 24,
// three pointers). Decision columns of a known random input sequence are
// fed with random gaps; in every column the transmitted state survives and
// holds the true decision, while random other states (all of higher index,
// so the priority encoder must pick the transmitted one) carry random
// decisions. Every output block must equal the transmitted bits of its
// depths, blocks must come in order, and in a gap-free first part each block
// must appear L+D+2 cycles after the column of depth (j+3)D-1.
`timescale 1ns/1ps
module rav_tb_smu_tb;
  localparam int N = 64, L = 48, D = 24, NCOL = 2400, NTOT = NCOL + 4 * D;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0;
  logic [N-1:0] vb, dec;
  logic out_valid;
  logic [D-1:0] out_bits;
  int checks = 0, failures = 0;

  rav_tb_smu dut (.*);
  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit data [NTOT];
  int unsigned col_cyc [NTOT];
  int blk, nblk_lat;

  always @(posedge clk) if (rst_n && !init && out_valid) begin
    if ((blk + 1) * D <= NCOL) begin
      for (int i = 0; i < D; i++) begin
        checks++;
        if (out_bits[i] != data[blk * D + i]) begin
          failures++;
          if (failures < 10) $display("block %0d bit %0d wrong", blk, i);
        end
      end
      if ((blk + 3) * D - 1 < NCOL / 2) begin
        checks++; nblk_lat++;
        if (cyc != col_cyc[(blk + 3) * D - 1] + L + D + 2) begin
          failures++;
          $display("block %0d latency %0d", blk, cyc - col_cyc[(blk + 3) * D - 1]);
        end
      end
    end
    blk++;
  end

  initial begin
    int st;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    st = 0; blk = 0;
    // columns beyond NCOL only carry the trace-back of the last blocks
    for (int t = 0; t < NTOT; t++) begin
      int prev;
      data[t] = 1'($urandom);
      prev = st;
      st = (int'(data[t]) << 5) | (st >> 1);
      if (t >= NCOL / 2)
        while ($urandom_range(3) == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk);
      vb  = ({$urandom, $urandom} & ~((64'd1 << st) - 1)) | (64'd1 << st);
      dec = {$urandom, $urandom};
      dec[st] = 1'(prev & 1);
      in_valid = 1;
      col_cyc[t] = cyc;
    end
    @(negedge clk); in_valid = 0;
    repeat (L + D + 10) @(negedge clk);
    checks++;
    if (blk * D < NCOL) begin failures++; $display("only %0d blocks", blk); end
    checks++;
    if (nblk_lat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
