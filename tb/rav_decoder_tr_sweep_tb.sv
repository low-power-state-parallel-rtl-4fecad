// rav_decoder_tr_sweep_tb: the decoder over a grid of threshold T and bias r
// values, T in {20, 24, 28} and r in {2, 4, 8}, each point decoding 480000
// bits over a BPSK / AWGN channel at Eb/N0 = 3.5 dB (see rav_tr_point).
// All nine points run side by side. The test prints the bit error rates
// and the average survivor count of every point, and checks:
//  * every point delivers all of its output;
//  * the survivor count grows with T at each r (a larger threshold keeps
//    more paths);
//  * at T = 24, r = 4 the survivor count lies between 20 and 34 of 64
//    (published fixed-point figure: about 27);
//  * for T >= 24 and r <= 4 both outputs stay below a BER of 1e-3
//    (published: about 1.5e-4 at T = 24, r = 4).
`timescale 1ns/1ps
module rav_decoder_tr_sweep_tb;
  localparam int NBITS = 480000;
  localparam int TV [3] = '{20, 24, 28};
  localparam int RV [3] = '{2, 4, 8};

  logic clk = 0;
  always #5 clk = ~clk;

  logic done [3][3];
  int   ere [3][3], etb [3][3], sv [3][3], fl [3][3];

  for (genvar i = 0; i < 3; i++) begin : g_t
    for (genvar j = 0; j < 3; j++) begin : g_r
      rav_tr_point #(.T(TV[i]), .R(RV[j]), .NBITS(NBITS)) pt (
        .clk(clk), .done(done[i][j]), .err_re(ere[i][j]), .err_tb(etb[i][j]),
        .surv_x100(sv[i][j]), .failures(fl[i][j])
      );
    end
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_done();
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) if (!done[i][j]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (10) @(posedge clk);
    while (!all_done()) @(posedge clk);
    @(posedge clk);
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        $display("T=%0d r=%0d: RE BER %.2e  TB BER %.2e  avg survivors %0d.%02d", TV[i], RV[j],
                 real'(ere[i][j]) / NBITS, real'(etb[i][j]) / NBITS, sv[i][j] / 100, sv[i][j] % 100);
        checks++;
        if (fl[i][j] != 0) begin
          failures++;
          $display("T=%0d r=%0d: output incomplete", TV[i], RV[j]);
        end
      end
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (sv[i+1][j] <= sv[i][j]) begin
          failures++;
          $display("r=%0d: survivors do not grow from T=%0d to T=%0d", RV[j], TV[i], TV[i+1]);
        end
      end
    checks++;
    if (sv[1][1] < 2000 || sv[1][1] > 3400) begin
      failures++;
      $display("T=24 r=4: survivor count out of range");
    end
    for (int i = 1; i < 3; i++)
      for (int j = 0; j < 2; j++) begin
        checks += 2;
        if (ere[i][j] * 1000 > NBITS) begin
          failures++;
          $display("T=%0d r=%0d: RE BER too high", TV[i], RV[j]);
        end
        if (etb[i][j] * 1000 > NBITS) begin
          failures++;
          $display("T=%0d r=%0d: TB BER too high", TV[i], RV[j]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
