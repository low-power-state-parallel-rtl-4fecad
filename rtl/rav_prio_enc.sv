// rav_prio_enc: N-to-log2(N) priority encoder.
//
// Returns the index of the lowest set bit of req, so that trace-back starts
// from a state that holds a survivor; any_req is 0 when no bit is set (idx is
// then 0). Using a priority encoder over the validity bits follows the
// published design; giving the lowest index priority is this design's
// choice. Purely combinational.
module rav_prio_enc #(
  parameter int unsigned N  = 64,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] req,
  output logic [W-1:0] idx,
  output logic         any_req
);
  always_comb begin
    idx     = '0;
    any_req = 1'b0;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      if (req[i]) begin
        idx     = W'(i);
        any_req = 1'b1;
      end
    end
  end
endmodule
