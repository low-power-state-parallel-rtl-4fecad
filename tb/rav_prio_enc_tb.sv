// rav_prio_enc_tb: the encoder must return the lowest set bit for every
// one-hot input, for random inputs and flag an all-zero input.
`timescale 1ns/1ps
module rav_prio_enc_tb;
  logic [63:0] req;
  logic [5:0]  idx;
  logic        any_req;
  int checks = 0, failures = 0;

  rav_prio_enc dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] v);
    int e;
    req = v;
    #1;
    e = -1;
    for (int i = 63; i >= 0; i--) if (v[i]) e = i;
    checks++;
    if ((e < 0 && any_req) || (e >= 0 && (!any_req || int'(idx) != e))) begin
      failures++;
      $display("req %h: idx %0d any %0d expected %0d", v, idx, any_req, e);
    end
  endtask

  initial begin
    chk('0);
    for (int i = 0; i < 64; i++) chk(64'd1 << i);
    for (int i = 0; i < 64; i++) chk(~64'd0 << i);
    for (int i = 0; i < 500; i++) chk({$urandom, $urandom} & {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
