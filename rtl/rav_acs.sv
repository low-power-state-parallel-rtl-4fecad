// rav_acs: modified add-compare-select unit of one trellis state.
//
// It adds the normalized branch metrics BM0/BM1 to the winner metrics WM0/WM1
// of its two predecessor states, lets rav_cmp_sel pick the winner among the
// candidates that come from survivors, and registers three results: the
// validity bit Vb (1 = this state holds a survivor), the decision bit Dec
// (which predecessor won) and the winner metric WM. WM is only loaded when
// the new winner survives (V = 1); this load enable stands for the clock
// gating of the published design, which holds WM to cut switching activity.
// Tb = NAND(Vb, WM < -T + r) feeds the threshold check: Tb = 0 means this
// state holds a survivor whose metric is within r of -T.
//
// On init the starting state (START = 1) is loaded with WM = -T, Vb = 1 and
// every other state with WM = 0, Vb = 0, as the published design prescribes.
// The structure follows the published unit; the synchronous init and the
// enable en (one decoding depth per enabled cycle) are this design's choices.
//
// The sums wrap at PM_W bits like the hardware; an assertion checks that a
// winner that survives never overflowed.
module rav_acs #(
  parameter int unsigned PM_W  = rav_pkg::PM_W_DEF,
  parameter int unsigned T     = rav_pkg::T_DEF,
  parameter int unsigned R     = rav_pkg::R_DEF,
  parameter bit          START = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   init,
  input  logic                   en,
  input  logic signed [PM_W-1:0] bm0,
  input  logic signed [PM_W-1:0] bm1,
  input  logic signed [PM_W-1:0] wm0,
  input  logic signed [PM_W-1:0] wm1,
  input  logic                   vb0,
  input  logic                   vb1,
  output logic signed [PM_W-1:0] wm,
  output logic                   vb,
  output logic                   dec,
  output logic                   tb
);
  localparam logic signed [PM_W-1:0] INIT_WM = START ? -PM_W'(T) : '0;
  localparam logic signed [PM_W-1:0] THR     = PM_W'(R) - PM_W'(T);

  logic signed [PM_W-1:0] pm0, pm1, m;
  logic signed [PM_W:0]   pm0_x, pm1_x, m_x;
  logic                   v, d;

  always_comb begin
    pm0   = wm0 + bm0;
    pm1   = wm1 + bm1;
    pm0_x = (PM_W+1)'(wm0) + (PM_W+1)'(bm0);
    pm1_x = (PM_W+1)'(wm1) + (PM_W+1)'(bm1);
    m_x   = d ? pm1_x : pm0_x;
  end

  rav_cmp_sel #(.PM_W(PM_W)) u_cs (
    .pm0(pm0), .pm1(pm1), .vb0(vb0), .vb1(vb1), .m(m), .v(v), .dec(d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wm  <= INIT_WM;
      vb  <= START;
      dec <= 1'b0;
    end else if (init) begin
      wm  <= INIT_WM;
      vb  <= START;
      dec <= 1'b0;
    end else if (en) begin
      vb  <= v;
      dec <= d;
      if (v) begin
        wm <= m;
        assert (m_x == (PM_W+1)'(m))
          else $error("rav_acs: surviving path metric overflowed %0d bits", PM_W);
      end
    end
  end

  assign tb = !(vb && (wm < THR));
endmodule
