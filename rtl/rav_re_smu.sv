// rav_re_smu: register-exchange survivor memory unit.
//
// A register exchange array of decision length L whose rows are enabled by
// the validity bits, followed by a majority vote that counts only the oldest
// bits of survivor rows, as in the published RE-based design. Each decision
// column from the ACS array yields one decoded bit: the bit for the column
// that arrived L-1 columns earlier. out_valid/out_bit appear three cycles
// after in_valid (one for the array, two for the vote). The first L-1 votes
// after init cover depths before the start and are suppressed, so the first
// out_valid carries the bit of depth 0.
module rav_re_smu #(
  parameter int unsigned K = rav_pkg::K_DEF,
  parameter int unsigned L = rav_pkg::L_RE_DEF,
  localparam int unsigned N = 1 << (K - 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         in_valid,
  input  logic [N-1:0] vb,
  input  logic [N-1:0] dec,
  output logic         out_valid,
  output logic         out_bit
);
  logic         arr_valid;
  logic [N-1:0] row_vb, oldest;
  logic         vote_valid, vote_bit;
  logic [$clog2(L)-1:0] warm;   // votes seen since init, saturates at L-1

  rav_re_array #(.K(K), .L(L)) u_array (
    .clk(clk), .rst_n(rst_n), .init(init), .in_valid(in_valid),
    .vb(vb), .dec(dec), .out_valid(arr_valid), .row_vb(row_vb), .oldest(oldest)
  );

  rav_majority_vote #(.N(N)) u_vote (
    .clk(clk), .rst_n(rst_n), .init(init), .in_valid(arr_valid),
    .bits(oldest), .mask(row_vb), .out_valid(vote_valid), .out_bit(vote_bit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                        warm <= '0;
    else if (init)                                     warm <= '0;
    else if (vote_valid && warm != $clog2(L)'(L - 1)) warm <= warm + 1'b1;
  end

  assign out_valid = vote_valid && (warm == $clog2(L)'(L - 1));
  assign out_bit   = vote_bit;
endmodule
