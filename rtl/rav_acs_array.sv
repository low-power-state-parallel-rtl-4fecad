// rav_acs_array: the N = 2^(K-1) modified ACS units of the state-parallel
// decoder, wired by the trellis of a rate-1/2 code.
//
// State n has the predecessors p0 = {n[K-3:0], 0} and p1 = {n[K-3:0], 1};
// each unit receives the winner metrics and validity bits of both and the
// normalized branch metric of the code symbol on each branch (computed at
// elaboration from the generators G0/G1 by rav_pkg::branch_sym). The whole
// array advances one decoding depth per cycle with in_valid high.
//
// Outputs are the registered per-state vectors: validity bits vb, decision
// bits dec, winner metrics wm and the threshold flags tb. out_valid is high
// for one cycle after each depth update, marking a new {vb, dec} column for
// the survivor memory unit. Which ACS unit starts with -T (state 0) is this
// design's choice; the published design only says "the starting state".
module rav_acs_array #(
  parameter int unsigned K    = rav_pkg::K_DEF,
  parameter int unsigned G0   = rav_pkg::G0_DEF,
  parameter int unsigned G1   = rav_pkg::G1_DEF,
  parameter int unsigned PM_W = rav_pkg::PM_W_DEF,
  parameter int unsigned T    = rav_pkg::T_DEF,
  parameter int unsigned R    = rav_pkg::R_DEF,
  localparam int unsigned N   = 1 << (K - 1)
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic                                      init,
  input  logic                                      in_valid,
  input  logic signed [rav_pkg::NSYM-1:0][PM_W-1:0] nbm,
  output logic                                      out_valid,
  output logic [N-1:0]                              vb,
  output logic [N-1:0]                              dec,
  output logic [N-1:0]                              tb,
  output logic signed [N-1:0][PM_W-1:0]             wm
);
  for (genvar n = 0; n < int'(N); n++) begin : g_acs
    localparam int unsigned P0 = (n << 1) & (N - 1);
    localparam int unsigned P1 = P0 | 1;
    localparam logic [1:0]  S0 = rav_pkg::branch_sym(K, G0, G1, n, P0);
    localparam logic [1:0]  S1 = rav_pkg::branch_sym(K, G0, G1, n, P1);

    rav_acs #(.PM_W(PM_W), .T(T), .R(R), .START(n == 0)) u_acs (
      .clk(clk), .rst_n(rst_n), .init(init), .en(in_valid),
      .bm0(nbm[S0]), .bm1(nbm[S1]),
      .wm0(wm[P0]), .wm1(wm[P1]), .vb0(vb[P0]), .vb1(vb[P1]),
      .wm(wm[n]), .vb(vb[n]), .dec(dec[n]), .tb(tb[n])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && !init;
  end
endmodule
