// rav_bmu: branch metric unit for a rate-1/2 code with soft-decision input.
//
// Each received symbol is a pair of SOFT_W-bit offset-binary soft values
// (0 = most confident '0', 2^SOFT_W-1 = most confident '1'). For each of the
// four branch symbols {c1, c0} the unit computes the simplified distance
//   BM = |y0 - E(c0)| + |y1 - E(c1)|,  E(0) = 0, E(1) = 2^SOFT_W-1,
// which is a per-bit absolute difference instead of a squared Euclidean
// distance. Computing a simplified distance for convolutional code decoding
// follows the published design; this particular formula and the soft-value
// coding are this design's own choice.
//
// Timing: one symbol per clock when in_valid is high; the metrics and
// out_valid appear one cycle later from a register (the first pipeline cut of
// the decoder front end). init clears out_valid.
module rav_bmu #(
  parameter int unsigned SOFT_W = rav_pkg::SOFT_W_DEF,
  localparam int unsigned BM_W  = SOFT_W + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       init,
  input  logic                       in_valid,
  input  logic [SOFT_W-1:0]          y0,
  input  logic [SOFT_W-1:0]          y1,
  output logic                       out_valid,
  output logic [rav_pkg::NSYM-1:0][BM_W-1:0] bm   // bm[{c1,c0}]
);
  localparam logic [SOFT_W-1:0] YMAX = '1;

  logic [rav_pkg::NSYM-1:0][BM_W-1:0] bm_d;

  always_comb begin
    for (int s = 0; s < int'(rav_pkg::NSYM); s++) begin
      logic [SOFT_W-1:0] e0, e1;
      e0 = s[0] ? YMAX - y0 : y0;
      e1 = s[1] ? YMAX - y1 : y1;
      bm_d[s] = BM_W'(e0) + BM_W'(e1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bm        <= '0;
    end else begin
      out_valid <= in_valid && !init;
      if (in_valid) bm <= bm_d;
    end
  end
endmodule
