// rav_decoder_awgn_tb: bit error rate and survivor count of the default
// decoder (K = 7, T = 24, r = 4) on a BPSK / AWGN channel at Eb/N0 = 3, 3.5
// and 4 dB.
//
// Each code bit c is sent as +1 (c = 1) or -1 (c = 0). Gaussian noise with
// variance 1 / (2 R Eb/N0), R = 1/2, comes from the Box-Muller transform.
// The sample is quantized to 3 bits with a uniform step of 0.25:
// q = clamp(floor(y / 0.25) + 4, 0, 7). NBITS random bits per point are
// decoded by both survivor memories. The test prints the bit error rate of
// each output and the average number of survivors per depth. As a sanity
// bound (the published fixed-point simulation of this code reports a BER
// of about 1.5e-4 and 27 to 29 survivors at 3.5 dB with the same T and r),
// it requires the BER of both outputs to stay below 5e-3 at 3 dB and below
// 1e-3 at 3.5 and 4 dB, the average survivor count to lie between 10 and
// 45 of 64, and fewer survivors at higher SNR.
`timescale 1ns/1ps
module rav_decoder_awgn_tb;
  localparam int K = 7, N = 64, D = 24;
  localparam int G0 = 'o133, G1 = 'o171;
  localparam int NBITS = 192000;
  localparam int NSYMS = NBITS + 8 * D;

  logic clk = 0, rst_n = 0, init = 0, in_valid = 0;
  logic [2:0] y0 = 0, y1 = 0;
  logic re_valid, re_bit, tb_valid;
  logic [D-1:0] tb_bits;

  rav_decoder dut (
    .clk(clk), .rst_n(rst_n), .init(init), .in_valid(in_valid), .y0(y0), .y1(y1),
    .re_valid(re_valid), .re_bit(re_bit), .tb_valid(tb_valid), .tb_bits(tb_bits)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit  data [NSYMS];
  int  re_cnt, tb_cnt, re_err, tb_err;
  longint surv_sum, surv_n;

  always @(posedge clk) if (rst_n && !init) begin
    if (dut.col_valid) begin
      surv_sum += $countones(dut.vb);
      surv_n++;
    end
    if (re_valid) begin
      if (re_cnt < NBITS && re_bit != data[re_cnt]) re_err++;
      re_cnt++;
    end
    if (tb_valid) begin
      if ((tb_cnt + 1) * D <= NBITS)
        for (int i = 0; i < D; i++) if (tb_bits[i] != data[tb_cnt * D + i]) tb_err++;
      tb_cnt++;
    end
  end

  real sigma;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic logic [2:0] quant(bit c);
    real y;
    int  q;
    y = (c ? 1.0 : -1.0) + sigma * gauss();
    q = int'($floor(y / 0.25)) + 4;
    if (q < 0) q = 0;
    if (q > 7) q = 7;
    return 3'(q);
  endfunction

  task automatic run_point(real ebn0_db, output real ber_re, output real ber_tb,
                           output real avg_surv);
    logic [K-2:0] st;
    logic [K-1:0] w;
    sigma = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** (ebn0_db / 10.0))));
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    re_cnt = 0; tb_cnt = 0; re_err = 0; tb_err = 0; surv_sum = 0; surv_n = 0;
    st = '0;
    for (int i = 0; i < NSYMS; i++) data[i] = (i < NBITS) ? 1'($urandom) : 1'b0;
    for (int i = 0; i < NSYMS; i++) begin
      @(negedge clk);
      w  = {data[i], st};
      y0 = quant(^(w & K'(G0)));
      y1 = quant(^(w & K'(G1)));
      in_valid = 1;
      st = {data[i], st[K-2:1]};
    end
    @(negedge clk); in_valid = 0;
    repeat (100) @(negedge clk);
    ber_re   = real'(re_err) / real'(NBITS);
    ber_tb   = real'(tb_err) / real'(NBITS);
    avg_surv = real'(surv_sum) / real'(surv_n);
    $display("Eb/N0 %.1f dB: RE BER %.2e (%0d errors), TB BER %.2e (%0d errors), avg survivors %.1f of %0d",
             ebn0_db, ber_re, re_err, ber_tb, tb_err, avg_surv, N);
  endtask

  initial begin
    real snr [3] = '{3.0, 3.5, 4.0};
    real bre, btb, sv, prev_sv;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev_sv = 1000.0;
    for (int p = 0; p < 3; p++) begin
      run_point(snr[p], bre, btb, sv);
      checks += 4;
      if (bre > ((p == 0) ? 5e-3 : 1e-3)) begin failures++; $display("RE BER too high"); end
      if (btb > ((p == 0) ? 5e-3 : 1e-3)) begin failures++; $display("TB BER too high"); end
      if (sv < 10.0 || sv > 45.0) begin failures++; $display("survivor count out of range"); end
      if (sv >= prev_sv) begin failures++; $display("survivors did not drop with SNR"); end
      prev_sv = sv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
