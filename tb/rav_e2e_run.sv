// rav_e2e_run: end-to-end run of one rav_decoder configuration, used by the
// larger-trellis tests. A random bit stream is encoded with the given
// generators, sent through a channel with mild noise (+-2) and sparse strong
// errors (one soft value in 60), and decoded; every RE output bit and every
// TB output block must equal the transmitted bits. The run also reports the
// average number of survivors per depth and requires both bias values of
// the threshold check to occur. A second stream goes over a BPSK/AWGN
// channel at Eb/N0 = 3.5 dB (3-bit quantizer, step 0.25); there the bit
// error rate of both outputs must stay below 1e-3 and fewer than half of the
// states may survive on average. done rises when the run is over.
`timescale 1ns/1ps
module rav_e2e_run #(
  parameter int K     = 8,
  parameter int G0    = 'o247,
  parameter int G1    = 'o371,
  parameter int L_RE  = 46,
  parameter int L_TB  = 56,
  parameter int NBITS = 4032,
  parameter int NAWGN = 48000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N = 1 << (K - 1), D = L_TB / 2;
  localparam int NMAX  = (NAWGN > NBITS) ? NAWGN : NBITS;
  localparam int NSYMS = NMAX + 8 * D;

  logic rst_n = 0, init = 0, in_valid = 0;
  logic [2:0] y0 = 0, y1 = 0;
  logic re_valid, re_bit, tb_valid;
  logic [D-1:0] tb_bits;

  rav_decoder #(.K(K), .G0(G0), .G1(G1), .L_RE(L_RE), .L_TB(L_TB)) dut (
    .clk(clk), .rst_n(rst_n), .init(init), .in_valid(in_valid), .y0(y0), .y1(y1),
    .re_valid(re_valid), .re_bit(re_bit), .tb_valid(tb_valid), .tb_bits(tb_bits)
  );

  bit data [NSYMS];
  int re_cnt, tb_cnt, n_r, n_0, surv_sum, surv_n, nb, awgn_err_re, awgn_err_tb;
  bit awgn;
  real sigma;

  initial begin
    done = 0; checks = 0; failures = 0;
  end

  always @(posedge clk) if (rst_n && !init) begin
    if (dut.u_norm.in_valid) begin
      if (dut.bias != 0) n_r++; else n_0++;
    end
    if (dut.col_valid) begin
      surv_sum += $countones(dut.vb);
      surv_n++;
    end
    if (re_valid) begin
      if (re_cnt < nb && awgn) begin
        if (re_bit !== data[re_cnt]) awgn_err_re++;
      end else if (re_cnt < nb) begin
        checks++;
        if (re_bit !== data[re_cnt]) begin
          failures++;
          if (failures < 5) $display("K=%0d RE mismatch at bit %0d", K, re_cnt);
        end
      end
      re_cnt++;
    end
    if (tb_valid) begin
      if ((tb_cnt + 1) * D <= nb && awgn) begin
        for (int i = 0; i < D; i++) if (tb_bits[i] !== data[tb_cnt * D + i]) awgn_err_tb++;
      end else if ((tb_cnt + 1) * D <= nb)
        for (int i = 0; i < D; i++) begin
          checks++;
          if (tb_bits[i] !== data[tb_cnt * D + i]) begin
            failures++;
            if (failures < 5) $display("K=%0d TB mismatch at bit %0d", K, tb_cnt * D + i);
          end
        end
      tb_cnt++;
    end
  end

  function automatic logic [2:0] chan(bit c);
    int v;
    if ($urandom_range(59) == 0) v = c ? $urandom_range(3) : 4 + $urandom_range(3);
    else begin
      v = (c ? 7 : 0) + int'($urandom_range(4)) - 2;
      if (v < 0) v = 0;
      if (v > 7) v = 7;
    end
    return 3'(v);
  endfunction

  // BPSK over AWGN, 3-bit quantizer with step 0.25 (see rav_decoder_awgn_tb)
  function automatic logic [2:0] chan_awgn(bit c);
    real u1, u2, y;
    int  q;
    u1 = (real'($urandom) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    y  = (c ? 1.0 : -1.0) + sigma * $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
    q  = int'($floor(y / 0.25)) + 4;
    if (q < 0) q = 0;
    if (q > 7) q = 7;
    return 3'(q);
  endfunction

  task automatic stream(int nbits);
    logic [K-2:0] st;
    logic [K-1:0] w;
    nb = nbits; re_cnt = 0; tb_cnt = 0;
    st = '0;
    for (int i = 0; i < nbits + 8 * D; i++) data[i] = (i < nbits) ? 1'($urandom) : 1'b0;
    for (int i = 0; i < nbits + 8 * D; i++) begin
      @(negedge clk);
      w  = {data[i], st};
      y0 = awgn ? chan_awgn(^(w & K'(G0))) : chan(^(w & K'(G0)));
      y1 = awgn ? chan_awgn(^(w & K'(G1))) : chan(^(w & K'(G1)));
      in_valid = 1;
      st = {data[i], st[K-2:1]};
    end
    @(negedge clk); in_valid = 0;
    repeat (L_TB + D + 20) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // mild channel: every bit must be right
    stream(NBITS);
    checks += 3;
    if (re_cnt < NBITS || tb_cnt * D < NBITS) begin
      failures++;
      $display("K=%0d incomplete: re %0d tb %0d", K, re_cnt, tb_cnt);
    end
    if (n_r == 0) begin failures++; $display("K=%0d bias r never used", K); end
    if (n_0 == 0) begin failures++; $display("K=%0d bias 0 never used", K); end
    $display("K=%0d (%0d states): avg survivors %0.2f, bias r %0d / 0 %0d", K, N,
             real'(surv_sum) / real'(surv_n), n_r, n_0);
    // AWGN at Eb/N0 = 3.5 dB: bounded BER (1e-3) and survivor count (< N/2)
    awgn = 1; surv_sum = 0; surv_n = 0;
    sigma = $sqrt(1.0 / (10.0 ** (3.5 / 10.0)));
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    stream(NAWGN);
    checks += 3;
    if (awgn_err_re > NAWGN / 1000) begin failures++; $display("K=%0d RE BER too high", K); end
    if (awgn_err_tb > NAWGN / 1000) begin failures++; $display("K=%0d TB BER too high", K); end
    if (surv_sum >= surv_n * (N / 2)) begin failures++; $display("K=%0d too many survivors", K); end
    $display("K=%0d AWGN 3.5 dB: RE BER %.2e, TB BER %.2e, avg survivors %.1f of %0d", K,
             real'(awgn_err_re) / real'(NAWGN), real'(awgn_err_tb) / real'(NAWGN),
             real'(surv_sum) / real'(surv_n), N);
    done = 1;
  end
endmodule
