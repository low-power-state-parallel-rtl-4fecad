// rav_decoder: state-parallel relaxed adaptive Viterbi decoder.
//
// Decodes a rate-1/2 convolutional code (default K = 7, generators 133/171)
// from 3-bit soft input at one trellis depth per clock. Like an adaptive
// (T-algorithm) Viterbi decoder it keeps only the winners whose metric lies
// inside a retention window, but instead of searching for the best winner
// every depth it normalizes the branch metrics so that the best survivor
// stays close to -T and then purges every winner whose metric is not
// negative. The data path is:
//
//   y0,y1 -> BMU -> [reg] -> best-BM search + normalization -> [reg]
//         -> N modified ACS units (loop) -> RE SMU    -> re_bit
//                    |                   -> TB SMU    -> tb_bits
//                    +-- Tb flags -> threshold check -> bias d (0 or r)
//
// Both survivor memory styles of the published design are instantiated side
// by side on the same ACS array: the register-exchange unit with majority
// vote (one bit per depth on re_valid/re_bit) and the trace-back unit with
// three pointers (a block of D bits on tb_valid/tb_bits). The two pipeline
// registers before the ACS array follow the published block diagram.
//
// Interface: pulse init (or reset) before a new stream: it sets the start
// state 0 to metric -T, all others to 0, and empties the survivor memories.
// Present one soft symbol per cycle with in_valid; cycles without in_valid
// stall the whole decoder. Latencies, counted from the cycle a symbol is
// presented: the RE output of depth t comes 6 cycles after symbol t+L_RE-1;
// the TB block of depths jD..jD+D-1 comes L_TB+D+5 cycles after symbol
// (j+3)D-1 (3 cycles to the decision column, L_TB+D+2 in the trace-back).
// The winner metrics of the ACS array are not needed outside it.
module rav_decoder #(
  parameter int unsigned K      = rav_pkg::K_DEF,
  parameter int unsigned G0     = rav_pkg::G0_DEF,
  parameter int unsigned G1     = rav_pkg::G1_DEF,
  parameter int unsigned SOFT_W = rav_pkg::SOFT_W_DEF,
  parameter int unsigned PM_W   = rav_pkg::PM_W_DEF,
  parameter int unsigned T      = rav_pkg::T_DEF,
  parameter int unsigned R      = rav_pkg::R_DEF,
  parameter int unsigned L_RE   = rav_pkg::L_RE_DEF,
  parameter int unsigned L_TB   = rav_pkg::L_TB_DEF,
  localparam int unsigned N     = 1 << (K - 1),
  localparam int unsigned D_TB  = L_TB / 2,
  localparam int unsigned BM_W  = SOFT_W + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              in_valid,
  input  logic [SOFT_W-1:0] y0,
  input  logic [SOFT_W-1:0] y1,
  output logic              re_valid,
  output logic              re_bit,
  output logic              tb_valid,
  output logic [D_TB-1:0]   tb_bits
);
  // Branch metric unit and its output register.
  logic                                      bm_valid;
  logic [rav_pkg::NSYM-1:0][BM_W-1:0]        bm;
  logic [BM_W-1:0]                           bm_min, bias;
  logic                                      nbm_valid;
  logic signed [rav_pkg::NSYM-1:0][PM_W-1:0] nbm;

  rav_bmu #(.SOFT_W(SOFT_W)) u_bmu (
    .clk(clk), .rst_n(rst_n), .init(init), .in_valid(in_valid),
    .y0(y0), .y1(y1), .out_valid(bm_valid), .bm(bm)
  );

  rav_best_bm #(.BM_W(BM_W)) u_best (.bm(bm), .bm_min(bm_min));

  rav_bm_norm #(.BM_W(BM_W), .PM_W(PM_W)) u_norm (
    .clk(clk), .rst_n(rst_n), .init(init), .in_valid(bm_valid),
    .bm(bm), .bm_min(bm_min), .d(bias), .out_valid(nbm_valid), .nbm(nbm)
  );

  // Modified ACS array and threshold check.
  logic                          col_valid;
  logic [N-1:0]                  vb, dec, tbf;
  logic signed [N-1:0][PM_W-1:0] wm;

  rav_acs_array #(.K(K), .G0(G0), .G1(G1), .PM_W(PM_W), .T(T), .R(R)) u_acs (
    .clk(clk), .rst_n(rst_n), .init(init), .in_valid(nbm_valid), .nbm(nbm),
    .out_valid(col_valid), .vb(vb), .dec(dec), .tb(tbf), .wm(wm)
  );

  rav_threshold_check #(.N(N), .R(R), .BM_W(BM_W)) u_thr (.tb(tbf), .d(bias));

  // Survivor memory units.
  rav_re_smu #(.K(K), .L(L_RE)) u_re (
    .clk(clk), .rst_n(rst_n), .init(init), .in_valid(col_valid),
    .vb(vb), .dec(dec), .out_valid(re_valid), .out_bit(re_bit)
  );

  rav_tb_smu #(.K(K), .L(L_TB), .NPTR(3)) u_tb (
    .clk(clk), .rst_n(rst_n), .init(init), .in_valid(col_valid),
    .vb(vb), .dec(dec), .out_valid(tb_valid), .out_bits(tb_bits)
  );
endmodule
