// rav_bm_norm: branch metric normalization unit and its pipeline register.
//
// Subtracts BM_B + d from every branch metric, where BM_B is the best branch
// metric of the depth and d (0 or r) comes from the threshold check, and
// registers the result for the ACS array (the register marked "pipeline" in
// the published block diagram). Normalized metrics are PM_W-bit two's
// complement numbers; they range from -r to the largest raw metric.
//
// Timing: in_valid/bm/bm_min/d in one cycle, out_valid/nbm the next.
module rav_bm_norm #(
  parameter int unsigned BM_W = rav_pkg::SOFT_W_DEF + 1,
  parameter int unsigned PM_W = rav_pkg::PM_W_DEF
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    init,
  input  logic                                    in_valid,
  input  logic [rav_pkg::NSYM-1:0][BM_W-1:0]      bm,
  input  logic [BM_W-1:0]                         bm_min,
  input  logic [BM_W-1:0]                         d,
  output logic                                    out_valid,
  output logic signed [rav_pkg::NSYM-1:0][PM_W-1:0] nbm
);
  logic [rav_pkg::NSYM-1:0][PM_W-1:0] nbm_d;
  logic [PM_W-1:0] offs;

  always_comb begin
    offs = PM_W'(bm_min) + PM_W'(d);
    for (int s = 0; s < int'(rav_pkg::NSYM); s++)
      nbm_d[s] = PM_W'(bm[s]) - offs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      nbm       <= '0;
    end else begin
      out_valid <= in_valid && !init;
      if (in_valid) nbm <= nbm_d;
    end
  end
endmodule
