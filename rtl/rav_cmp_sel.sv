// rav_cmp_sel: compare-and-select block of a modified ACS unit.
//
// Inputs are the two candidate path metrics PM0/PM1 and the validity bits
// Vb0/Vb1 of the survivors they extend. When both are valid the comparator
// picks the smaller metric; when exactly one is valid it is taken whatever the
// comparator says (the select falls back to Vb1); when neither is valid the
// select is Vb1 = 0, so M = PM0 and V = 0. V is 1 only when some input is
// valid and the winner metric M is negative, which is the non-survivor purge
// with its limit fixed at zero. This behaviour follows the published
// description; a tie between two valid metrics selects PM0, which is this
// design's choice. Purely combinational.
module rav_cmp_sel #(
  parameter int unsigned PM_W = rav_pkg::PM_W_DEF
) (
  input  logic signed [PM_W-1:0] pm0,
  input  logic signed [PM_W-1:0] pm1,
  input  logic                   vb0,
  input  logic                   vb1,
  output logic signed [PM_W-1:0] m,
  output logic                   v,
  output logic                   dec
);
  logic cmp;
  always_comb begin
    cmp = pm1 < pm0;
    dec = (vb0 && vb1) ? cmp : vb1;
    m   = dec ? pm1 : pm0;
    v   = (vb0 || vb1) && m[PM_W-1];
  end
endmodule
