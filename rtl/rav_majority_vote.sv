// rav_majority_vote: two-stage majority vote over the oldest bits of the
// survivor rows of the register exchange array.
//
// Only rows with mask[n] = 1 (survivors) take part. Stage 1 counts, in groups
// of GRP rows, the survivors and the survivors whose bit is 1, and registers
// the partial counts. Stage 2 adds the partial counts and outputs 1 when the
// ones are a strict majority of the survivors (2*ones > survivors), so a tie
// or an empty set gives 0. The published design uses a multi-stage majority
// vote from earlier work without giving its insides; this grouping, the group
// size and the tie rule are this design's own choices.
//
// Timing: bits/mask with in_valid in cycle t, out_bit with out_valid in t+2.
module rav_majority_vote #(
  parameter int unsigned N   = 64,
  parameter int unsigned GRP = 8,
  localparam int unsigned NG = (N + GRP - 1) / GRP,
  localparam int unsigned CW = $clog2(N + 1) + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         in_valid,
  input  logic [N-1:0] bits,
  input  logic [N-1:0] mask,
  output logic         out_valid,
  output logic         out_bit
);
  logic [NG-1:0][CW-1:0] ones_q, cnt_q, ones_d, cnt_d;
  logic                  s1_valid;
  logic [CW-1:0]         ones_sum, cnt_sum;

  always_comb begin
    for (int g = 0; g < int'(NG); g++) begin
      ones_d[g] = '0;
      cnt_d[g]  = '0;
      for (int i = 0; i < int'(GRP); i++) begin
        if (g * GRP + i < N) begin
          ones_d[g] = ones_d[g] + CW'(bits[g*GRP+i] & mask[g*GRP+i]);
          cnt_d[g]  = cnt_d[g]  + CW'(mask[g*GRP+i]);
        end
      end
    end
    ones_sum = '0;
    cnt_sum  = '0;
    for (int g = 0; g < int'(NG); g++) begin
      ones_sum = ones_sum + ones_q[g];
      cnt_sum  = cnt_sum  + cnt_q[g];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      ones_q    <= '0;
      cnt_q     <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else if (init) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_valid  <= in_valid;
      if (in_valid) begin
        ones_q <= ones_d;
        cnt_q  <= cnt_d;
      end
      out_valid <= s1_valid;
      if (s1_valid) out_bit <= {ones_sum, 1'b0} > {1'b0, cnt_sum};
    end
  end
endmodule
