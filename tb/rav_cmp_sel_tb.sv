// rav_cmp_sel_tb: exhaustive check of compare-and-select over all 6-bit
// metric pairs and validity combinations against the rules: both valid ->
// the smaller metric (ties to PM0); one valid -> that one; none -> PM0 with
// V = 0; V = 1 only for a valid negative winner.
`timescale 1ns/1ps
module rav_cmp_sel_tb;
  logic signed [5:0] pm0, pm1, m;
  logic vb0, vb1, v, dec;
  int checks = 0, failures = 0;

  rav_cmp_sel dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -32; a < 32; a++)
      for (int b = -32; b < 32; b++)
        for (int vv = 0; vv < 4; vv++) begin
          int em, ed, ev;
          pm0 = 6'(a); pm1 = 6'(b); vb0 = vv[0]; vb1 = vv[1];
          #1;
          if (vb0 && vb1) ed = (b < a) ? 1 : 0;
          else if (vb1)   ed = 1;
          else            ed = 0;
          em = ed ? b : a;
          ev = ((vb0 || vb1) && em < 0) ? 1 : 0;
          checks++;
          if (int'(m) != em || int'(v) != ev || int'(dec) != ed) begin
            failures++;
            if (failures < 10)
              $display("pm=(%0d,%0d) vb=%b: got m=%0d v=%0d d=%0d", a, b, vv[1:0], m, v, dec);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
