// rav_best_bm_tb: checks the best branch metric search against a linear scan
// for random and all-equal metric sets.
`timescale 1ns/1ps
module rav_best_bm_tb;
  logic [3:0][3:0] bm;
  logic [3:0] bm_min;
  int checks = 0, failures = 0;

  rav_best_bm dut (.bm(bm), .bm_min(bm_min));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int m;
      for (int s = 0; s < 4; s++) bm[s] = (i < 16) ? 4'(i) : 4'($urandom_range(14));
      m = 15;
      for (int s = 0; s < 4; s++) if (int'(bm[s]) < m) m = int'(bm[s]);
      #1;
      checks++;
      if (int'(bm_min) != m) begin
        failures++;
        $display("min of %h: got %0d expected %0d", bm, bm_min, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
