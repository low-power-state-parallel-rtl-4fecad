// rav_decoder_k8k9_tb: runs the decoder on the two larger codes of the
// rate-1/2 family it supports by parameters: K = 8 (128 states, generators
// 247/371, L_RE = 46, {L, D} = {56, 28}) and K = 9 (256 states, 561/753,
// L_RE = 55, {L, D} = {64, 32}), side by side, each checked end to end.
`timescale 1ns/1ps
module rav_decoder_k8k9_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done8, done9;
  int   c8, f8, c9, f9;

  rav_e2e_run #(.K(8), .G0('o247), .G1('o371), .L_RE(46), .L_TB(56), .NBITS(4032))
    run8 (.clk(clk), .done(done8), .checks(c8), .failures(f8));
  rav_e2e_run #(.K(9), .G0('o561), .G1('o753), .L_RE(55), .L_TB(64), .NBITS(4032))
    run9 (.clk(clk), .done(done9), .checks(c9), .failures(f9));

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c9, f8 + f9 + 1);
    $finish;
  end

  initial begin
    repeat (10) @(posedge clk);
    wait (done8 && done9);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c9, f8 + f9);
    $finish;
  end
endmodule
