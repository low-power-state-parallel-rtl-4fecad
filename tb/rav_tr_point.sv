// rav_tr_point: one point of the threshold / bias sweep. The default code
// (K = 7, 133/171) is decoded with the given T and r over a BPSK / AWGN
// channel at Eb/N0 = 3.5 dB (3-bit quantizer, step 0.25, as in
// rav_decoder_awgn_tb). Path metrics are 6 bits where T + 2r <= 32, the
// bound that keeps every candidate sum inside a 6-bit signed range, and 7
// bits above it. The point reports the error counts of both outputs and the
// average number of survivors per depth (times 100); failures counts only
// missing output. done rises when the run is over.
`timescale 1ns/1ps
module rav_tr_point #(
  parameter int T     = 24,
  parameter int R     = 4,
  parameter int NBITS = 48000
) (
  input  logic clk,
  output logic done,
  output int   err_re,
  output int   err_tb,
  output int   surv_x100,
  output int   failures
);
  localparam int K = 7, D = 24;
  localparam int G0 = 'o133, G1 = 'o171;
  localparam int PM_W  = (T + 2 * R <= 32) ? 6 : 7;
  localparam int NSYMS = NBITS + 8 * D;

  logic rst_n = 0, init = 0, in_valid = 0;
  logic [2:0] y0 = 0, y1 = 0;
  logic re_valid, re_bit, tb_valid;
  logic [D-1:0] tb_bits;

  rav_decoder #(.PM_W(PM_W), .T(T), .R(R)) dut (
    .clk(clk), .rst_n(rst_n), .init(init), .in_valid(in_valid), .y0(y0), .y1(y1),
    .re_valid(re_valid), .re_bit(re_bit), .tb_valid(tb_valid), .tb_bits(tb_bits)
  );

  bit  data [NSYMS];
  int  re_cnt = 0, tb_cnt = 0;
  longint surv_sum = 0, surv_n = 0;
  real sigma;

  initial begin
    done = 0; err_re = 0; err_tb = 0; surv_x100 = 0; failures = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.col_valid) begin
      surv_sum += $countones(dut.vb);
      surv_n++;
    end
    if (re_valid) begin
      if (re_cnt < NBITS && re_bit !== data[re_cnt]) err_re++;
      re_cnt++;
    end
    if (tb_valid) begin
      if ((tb_cnt + 1) * D <= NBITS)
        for (int i = 0; i < D; i++) if (tb_bits[i] !== data[tb_cnt * D + i]) err_tb++;
      tb_cnt++;
    end
  end

  function automatic logic [2:0] chan(bit c);
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

  initial begin
    logic [K-2:0] st;
    logic [K-1:0] w;
    sigma = $sqrt(1.0 / (10.0 ** (3.5 / 10.0)));
    for (int i = 0; i < NSYMS; i++) data[i] = (i < NBITS) ? 1'($urandom) : 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    st = '0;
    for (int i = 0; i < NSYMS; i++) begin
      @(negedge clk);
      w  = {data[i], st};
      y0 = chan(^(w & K'(G0)));
      y1 = chan(^(w & K'(G1)));
      in_valid = 1;
      st = {data[i], st[K-2:1]};
    end
    @(negedge clk); in_valid = 0;
    repeat (2 * 48 + 40) @(negedge clk);
    if (re_cnt < NBITS || tb_cnt * D < NBITS) failures++;
    surv_x100 = int'((100 * surv_sum) / surv_n);
    done = 1;
  end
endmodule
