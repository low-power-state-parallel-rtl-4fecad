// rav_majority_vote_tb: random bits and survivor masks (sparse, dense, empty
// and full); the output two cycles later must be 1 exactly when the ones
// among masked bits outnumber the zeros.
`timescale 1ns/1ps
module rav_majority_vote_tb;
  localparam int N = 64;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0;
  logic [N-1:0] bits, mask;
  logic out_valid, out_bit;
  int checks = 0, failures = 0;

  rav_majority_vote dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q [$];
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else if (int'(out_bit) != exp_q.pop_front()) failures++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int o, c;
      @(negedge clk);
      bits = {$urandom, $urandom};
      case (t % 4)
        0: mask = {$urandom, $urandom};
        1: mask = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        2: mask = (t % 40 == 2) ? '0 : {$urandom, $urandom} | {$urandom, $urandom};
        default: mask = (t % 40 == 3) ? '1 : 64'(1) << $urandom_range(63);
      endcase
      in_valid = ($urandom_range(5) != 0);
      if (in_valid) begin
        o = $countones(bits & mask);
        c = $countones(mask);
        exp_q.push_back((2 * o > c) ? 1 : 0);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
