// rav_decoder_tb: end-to-end test of the relaxed adaptive Viterbi decoder at
// its default size (K = 7, 64 states, code 133/171, L_RE = 40, {L, D} =
// {48, 24}).
//
// Random information bits are encoded by a convolutional encoder written
// here, mapped to 3-bit soft values (0 / 7) with mild noise of +-2 and
// sparse strong errors that land on the wrong side of the decision
// threshold, and fed to the decoder. Both outputs are compared with the
// transmitted bits: the RE output bit by bit, the TB output block by block.
// Frame 1 streams without gaps and checks the exact output latencies; frame 2
// restarts with init and inserts random stalls (in_valid low); both must
// decode without a single error. Frame 3 uses a noisier channel (one strong
// error per 18 soft values), where the decoder may make real decoding
// errors, and only bounds the bit error rate. Mechanisms counted, each of which must happen:
// bias d = r and d = 0 from the threshold check, held winner metrics
// (non-survivors), the three compare-and-select cases, stalls, trace-back
// launches, RE votes with disagreeing survivors, and a restart by init.
// Each frame is followed by zero tail bits so every data bit is output.
`timescale 1ns/1ps
module rav_decoder_tb;
  localparam int K = 7, N = 64, L_RE = 40, L_TB = 48, D = 24;
  localparam int G0 = 'o133, G1 = 'o171;
  localparam int NBITS = 12000;           // data bits per frame (multiple of D)
  localparam int NTAIL = 8 * D;           // extra zero bits to flush outputs
  localparam int NSYMS = NBITS + NTAIL;

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
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          data [NSYMS];
  int unsigned sym_cycle [NSYMS];   // cycle at which symbol i was presented
  int          re_cnt, tb_cnt, re_err, tb_err;
  bit          check_latency, noisy;

  // ---- mechanism counters ----
  int n_bias_r, n_bias_0, n_hold, n_both, n_one, n_none, n_stall, n_launch;
  int n_vote_mixed, n_restart, surv_sum, surv_n;

  always @(posedge clk) if (rst_n && !init) begin
    if (dut.u_norm.in_valid) begin
      if (dut.bias != 0) n_bias_r++; else n_bias_0++;
    end
    if (dut.u_acs.in_valid) begin
      for (int n = 0; n < N; n++) begin
        logic a, b;
        a = dut.vb[(n << 1) & (N - 1)];
        b = dut.vb[((n << 1) & (N - 1)) | 1];
        if (a && b) n_both++; else if (a || b) n_one++; else n_none++;
      end
    end
    if (dut.u_tb.launch) n_launch++;
    if (dut.u_re.u_vote.s1_valid) begin
      int o, c;
      o = 0; c = 0;
      for (int g = 0; g < 8; g++) begin
        o += int'(dut.u_re.u_vote.ones_q[g]);
        c += int'(dut.u_re.u_vote.cnt_q[g]);
      end
      if (o != 0 && o != c) n_vote_mixed++;
    end
    if (dut.col_valid) begin
      surv_sum += $countones(dut.vb);
      n_hold   += N - $countones(dut.vb);
      surv_n++;
    end
  end

  // ---- output checkers ----
  always @(posedge clk) if (rst_n && !init) begin
    if (re_valid) begin
      if (re_cnt < NBITS) begin
        checks++;
        if (re_bit !== data[re_cnt]) begin
          re_err++;
          if (!noisy) failures++;
          if (re_err < 5 && !noisy) $display("RE mismatch at bit %0d", re_cnt);
        end
        if (check_latency) begin
          checks++;
          if (cyc != sym_cycle[re_cnt + L_RE - 1] + 6) begin
            failures++;
            $display("RE latency %0d at bit %0d", cyc - sym_cycle[re_cnt + L_RE - 1], re_cnt);
          end
        end
      end
      re_cnt++;
    end
    if (tb_valid) begin
      if ((tb_cnt + 1) * D <= NBITS) begin
        for (int i = 0; i < D; i++) begin
          checks++;
          if (tb_bits[i] !== data[tb_cnt * D + i]) begin
            tb_err++;
            if (!noisy) failures++;
            if (tb_err < 5 && !noisy) $display("TB mismatch at bit %0d", tb_cnt * D + i);
          end
        end
        if (check_latency) begin
          checks++;
          if (cyc != sym_cycle[(tb_cnt + 3) * D - 1] + L_TB + D + 5) begin
            failures++;
            $display("TB latency %0d at block %0d", cyc - sym_cycle[(tb_cnt + 3) * D - 1], tb_cnt);
          end
        end
      end
      tb_cnt++;
    end
  end

  // ---- encoder and channel ----
  logic [K-2:0] enc_state;
  int unsigned  err_span;      // a strong error hits 1 soft value in err_span+1

  function automatic logic [2:0] chan(bit c);
    int v;
    if ($urandom_range(err_span) == 0) v = c ? $urandom_range(3) : 4 + $urandom_range(3);
    else begin
      v = (c ? 7 : 0) + int'($urandom_range(4)) - 2;
      if (v < 0) v = 0;
      if (v > 7) v = 7;
    end
    return 3'(v);
  endfunction

  task automatic run_frame(bit stalls);
    logic [K-1:0] w;
    enc_state = '0;
    for (int i = 0; i < NSYMS; i++) data[i] = (i < NBITS) ? 1'($urandom) : 1'b0;
    re_cnt = 0; tb_cnt = 0;
    for (int i = 0; i < NSYMS; i++) begin
      if (stalls) begin
        while ($urandom_range(7) == 0) begin
          @(negedge clk); in_valid = 0; n_stall++;
        end
      end
      @(negedge clk);
      w  = {data[i], enc_state};
      y0 = chan(^(w & K'(G0)));
      y1 = chan(^(w & K'(G1)));
      in_valid = 1;
      sym_cycle[i] = cyc;
      enc_state = {data[i], enc_state[K-2:1]};
    end
    @(negedge clk); in_valid = 0;
    repeat (L_TB + D + 20) @(negedge clk);
  endtask

  task automatic check_count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // frame 1: no stalls, latencies checked
    check_latency = 1;
    err_span = 59;
    run_frame(0);
    checks++;
    if (re_cnt < NBITS || tb_cnt * D < NBITS) begin
      failures++;
      $display("frame 1 incomplete: re %0d tb %0d", re_cnt, tb_cnt);
    end
    // frame 2: a restart by init, random stalls
    check_latency = 0;
    init = 1; @(negedge clk); init = 0; n_restart++;
    run_frame(1);
    checks++;
    if (re_cnt < NBITS || tb_cnt * D < NBITS) begin
      failures++;
      $display("frame 2 incomplete: re %0d tb %0d", re_cnt, tb_cnt);
    end
    // frame 3: a noisier channel; real decoding errors may occur, so only
    // the bit error rate is bounded (both outputs below 1 %).
    err_span = 17; noisy = 1; re_err = 0; tb_err = 0;
    init = 1; @(negedge clk); init = 0; n_restart++;
    run_frame(0);
    checks += 2;
    if (re_err * 100 > NBITS) begin failures++; $display("RE BER too high: %0d", re_err); end
    if (tb_err * 100 > NBITS) begin failures++; $display("TB BER too high: %0d", tb_err); end
    $display("frame 3: RE errors %0d, TB errors %0d of %0d bits", re_err, tb_err, NBITS);
    check_count("bias r", n_bias_r);
    check_count("bias 0", n_bias_0);
    check_count("held winner metric", n_hold);
    check_count("both predecessors survive", n_both);
    check_count("one predecessor survives", n_one);
    check_count("no predecessor survives", n_none);
    check_count("stall", n_stall);
    check_count("trace-back launch", n_launch);
    check_count("mixed majority vote", n_vote_mixed);
    check_count("restart", n_restart);
    $display("bias r %0d / 0 %0d, avg survivors %0.2f of %0d, launches %0d, stalls %0d, RE err %0d, TB err %0d",
             n_bias_r, n_bias_0, real'(surv_sum) / real'(surv_n), N, n_launch, n_stall, re_err, tb_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
