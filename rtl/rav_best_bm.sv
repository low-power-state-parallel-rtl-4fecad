// rav_best_bm: best branch metric search.
//
// Finds the smallest of the NSYM branch metrics of the present decoding depth
// with a two-level comparison tree. It lies outside the recursive ACS loop,
// as in the published architecture, so it is purely combinational here and
// can be pipelined without touching the loop.
module rav_best_bm #(
  parameter int unsigned BM_W = rav_pkg::SOFT_W_DEF + 1
) (
  input  logic [rav_pkg::NSYM-1:0][BM_W-1:0] bm,
  output logic [BM_W-1:0]                    bm_min
);
  logic [BM_W-1:0] m01, m23;
  always_comb begin
    m01    = (bm[1] < bm[0]) ? bm[1] : bm[0];
    m23    = (bm[3] < bm[2]) ? bm[3] : bm[2];
    bm_min = (m23 < m01) ? m23 : m01;
  end
endmodule
