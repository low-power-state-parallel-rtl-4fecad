// rav_threshold_check: chooses the normalization bias d for the next depth.
//
// Every modified ACS unit reports Tb = 0 when its state holds a survivor
// whose metric is below -T + r. The flags of all N units are ANDed: if no
// survivor is that close to -T (all Tb = 1) the bias is r, which pushes the
// path metrics down toward -T; otherwise it is 0. This AND-plus-multiplexer
// structure follows the published architecture. Purely combinational.
module rav_threshold_check #(
  parameter int unsigned N    = 64,
  parameter int unsigned R    = rav_pkg::R_DEF,
  parameter int unsigned BM_W = rav_pkg::SOFT_W_DEF + 1
) (
  input  logic [N-1:0]    tb,
  output logic [BM_W-1:0] d
);
  always_comb d = (&tb) ? BM_W'(R) : '0;
endmodule
