// rav_re_array: register exchange array of the RE-based survivor memory.
//
// Row n holds the L most recent decoded input bits of the survivor path that
// ends in state n, the oldest bit in position L-1. On each new decision column
// (in_valid) every row whose state holds a survivor (vb[n] = 1) loads the row
// of its winning predecessor {n[K-3:0], dec[n]} shifted by one and appends the
// input bit that leads into state n, which is n[K-2]. Rows of non-survivor
// states keep their contents: this per-row load enable stands for the clock
// gating by the validity bits in the published design. row_vb registers the
// validity bits of the same depth so the majority vote can count only
// survivor rows.
//
// Timing: the rows and row_vb reflect a column one cycle after it arrives;
// out_valid marks that cycle. init clears the array.
module rav_re_array #(
  parameter int unsigned K = rav_pkg::K_DEF,
  parameter int unsigned L = rav_pkg::L_RE_DEF,
  localparam int unsigned N = 1 << (K - 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic                 in_valid,
  input  logic [N-1:0]         vb,
  input  logic [N-1:0]         dec,
  output logic                 out_valid,
  output logic [N-1:0]         row_vb,
  output logic [N-1:0]         oldest        // bit L-1 of every row
);
  logic [N-1:0][L-1:0] rows;

  for (genvar n = 0; n < int'(N); n++) begin : g_row
    localparam int unsigned P0 = (n << 1) & (N - 1);
    localparam logic        U  = 1'((n >> (K - 2)) & 1);
    logic [L-1:0] pred_row;
    assign pred_row  = dec[n] ? rows[P0 | 1] : rows[P0];
    assign oldest[n] = rows[n][L-1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                  rows[n] <= '0;
      else if (init)               rows[n] <= '0;
      else if (in_valid && vb[n])  rows[n] <= {pred_row[L-2:0], U};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      row_vb    <= '0;
    end else if (init) begin
      out_valid <= 1'b0;
      row_vb    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) row_vb <= vb;
    end
  end
endmodule
