// rav_dec_mem: decision memory of the trace-back survivor memory unit.
//
// DEPTH words of W bits (one word = the decision bits of all trellis states
// at one decoding depth), one write port and NRD read ports with synchronous
// read: a read issued with re[p] in cycle t returns rdata[p] in cycle t+1 and
// holds it until the next read on that port. A write and a read of the same
// address in one cycle return the old word. The published decoder builds this
// store from standard SRAM macros organised as concurrently accessible banks;
// here it is one behavioural array, and the trace-back controller guarantees
// that every access in a cycle falls in a different bank.
module rav_dec_mem #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 144,
  parameter int unsigned NRD   = 3,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [AW-1:0]           waddr,
  input  logic [W-1:0]            wdata,
  input  logic [NRD-1:0]          re,
  input  logic [NRD-1:0][AW-1:0]  raddr,
  output logic [NRD-1:0][W-1:0]   rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar p = 0; p < int'(NRD); p++) begin : g_rd
    always_ff @(posedge clk) begin
      if (re[p]) rdata[p] <= mem[raddr[p]];
    end
  end
endmodule
