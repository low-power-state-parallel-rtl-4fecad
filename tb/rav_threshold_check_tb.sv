// rav_threshold_check_tb: the bias must be r (4) exactly when every Tb flag
// is 1, and 0 when any flag is 0 (all single-zero patterns and random ones).
`timescale 1ns/1ps
module rav_threshold_check_tb;
  logic [63:0] tb;
  logic [3:0]  d;
  int checks = 0, failures = 0;

  rav_threshold_check dut (.tb(tb), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] v);
    int exp_d;
    tb = v;
    #1;
    exp_d = 4;
    for (int i = 0; i < 64; i++) if (!v[i]) exp_d = 0;
    checks++;
    if (int'(d) != exp_d) begin
      failures++;
      $display("tb=%h: d=%0d expected %0d", v, d, exp_d);
    end
  endtask

  initial begin
    chk('1);
    chk('0);
    for (int i = 0; i < 64; i++) chk(~(64'd1 << i));
    for (int i = 0; i < 200; i++) chk({$urandom, $urandom} | {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
