// rav_tb_smu: trace-back survivor memory unit, k-pointer even scheme.
//
// Decision columns from the ACS array are written, one per depth, into a
// memory split into NB = 2*NPTR banks of D = L/(NPTR-1) columns. Each time a
// bank is complete, one of the NPTR trace-back pointers is launched from the
// state given by a priority encoder over the validity bits of that last
// column, so trace-back always starts from a survivor (the one change the
// relaxed adaptive algorithm needs in a trace-back memory). A pointer reads
// one column per clock: it traces L columns (the newest NPTR-1 banks) to reach
// a merged state, then traces D more columns through the next older bank and
// outputs the decoded bit of each (the MSB of the state). With a new pointer
// every D depths and each pointer busy for L+D depths, NPTR pointers run at
// once, one per bank, and the unit keeps up with one depth per cycle. A
// pointer launched when bank b is complete reads banks b, b-1 and b-2 while
// the writer fills b+1, b+2 and b+3, so 2*NPTR banks keep every bank alive
// until its last reader is done. The
// pointer step is: prev_state = {state[K-3:0], decision[state]}. Pointers
// run every clock even while the input stalls: they only read banks that are
// complete, and the writer cannot reach them before they finish.
//
// Interface: in_valid/vb/dec carry one decision column. out_valid pulses for
// one cycle with a block of D decoded bits; out_bits[i] is the input bit of
// the i-th depth of the block (oldest in bit 0). Blocks come out in depth
// order, the first one for depths 0..D-1 after init, and then one every D
// columns. The block of depths jD..jD+D-1 appears L+D+2 cycles after the
// column of depth (j+3)D-1 was presented (one launch cycle, L+D reads, one
// output register).
//
// The published design uses a 3-pointer even scheme with {L, D} = {48, 24},
// a priority encoder to start from a survivor, and D = L/2, and notes that
// this scheme needs about three times the memory of a single pointer; the
// pointer scheduling, and the parallel block output (instead of a
// reversing buffer) are this design's own reading of that scheme.
module rav_tb_smu #(
  parameter int unsigned K    = rav_pkg::K_DEF,
  parameter int unsigned L    = rav_pkg::L_TB_DEF,
  parameter int unsigned NPTR = 3,
  localparam int unsigned N   = 1 << (K - 1),
  localparam int unsigned D   = L / (NPTR - 1),
  localparam int unsigned NB  = 2 * NPTR,
  localparam int unsigned AW  = $clog2(NB * D),
  localparam int unsigned SW  = K - 1,
  localparam int unsigned CW  = $clog2(D),
  localparam int unsigned BW  = $clog2(NB),
  localparam int unsigned KW  = $clog2(L + D),
  localparam int unsigned PW  = (NPTR > 2) ? $clog2(NPTR) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         in_valid,
  input  logic [N-1:0] vb,
  input  logic [N-1:0] dec,
  output logic         out_valid,
  output logic [D-1:0] out_bits
);
  // ---------------- writer ----------------
  logic [BW-1:0]  wbank;
  logic [CW-1:0]  wcol;
  logic [PW-1:0]  banks_done;      // banks written since init, saturates at NPTR-1
  logic [PW-1:0]  nxt_ptr;
  logic           launch;
  logic [SW-1:0]  pe_idx;
  logic           pe_any;

  // With no survivor at all pe_idx is 0; pe_any is not needed further.
  rav_prio_enc #(.N(N)) u_pe (.req(vb), .idx(pe_idx), .any_req(pe_any));

  assign launch = in_valid && !init && (wcol == CW'(D - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= '0; wcol <= '0; banks_done <= '0; nxt_ptr <= '0;
    end else if (init) begin
      wbank <= '0; wcol <= '0; banks_done <= '0; nxt_ptr <= '0;
    end else if (in_valid) begin
      if (launch) begin
        wcol    <= '0;
        wbank   <= (wbank == BW'(NB - 1)) ? '0 : wbank + 1'b1;
        nxt_ptr <= (nxt_ptr == PW'(NPTR - 1)) ? '0 : nxt_ptr + 1'b1;
        if (banks_done != PW'(NPTR - 1)) banks_done <= banks_done + 1'b1;
      end else begin
        wcol <= wcol + 1'b1;
      end
    end
  end

  // ---------------- memory ----------------
  logic [NPTR-1:0]         re;
  logic [NPTR-1:0][AW-1:0] raddr;
  logic [NPTR-1:0][N-1:0]  rdata;

  rav_dec_mem #(.W(N), .DEPTH(NB * D), .NRD(NPTR)) u_mem (
    .clk(clk), .we(in_valid && !init), .waddr(AW'(wbank) * AW'(D) + AW'(wcol)),
    .wdata(dec), .re(re), .raddr(raddr), .rdata(rdata)
  );

  // ---------------- trace-back pointers ----------------
  logic [NPTR-1:0]          active, useful, rv, rv_useful;
  logic [NPTR-1:0][KW-1:0]  step, step_d;
  logic [NPTR-1:0][BW-1:0]  pbank;
  logic [NPTR-1:0][CW-1:0]  pcol, pcol_d;
  logic [NPTR-1:0][SW-1:0]  start_state, state;
  logic [NPTR-1:0][D-1:0]   blk;
  logic [NPTR-1:0]          done;
  logic [NPTR-1:0][D-1:0]   blk_final;
  logic [NPTR-1:0][SW-1:0]  cur;          // state at the column just read

  always_comb begin
    for (int p = 0; p < int'(NPTR); p++) begin
      re[p]    = !init && active[p];
      raddr[p] = AW'(pbank[p]) * AW'(D) + AW'(pcol[p]);
      cur[p]   = (step_d[p] == '0) ? start_state[p] : state[p];
      blk_final[p] = blk[p];
      blk_final[p][pcol_d[p]] = cur[p][SW-1];
      done[p]  = rv[p] && rv_useful[p] && (step_d[p] == KW'(L + D - 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0; useful <= '0; rv <= '0; rv_useful <= '0;
      step <= '0; step_d <= '0; pbank <= '0; pcol <= '0; pcol_d <= '0;
      start_state <= '0; state <= '0; blk <= '0;
      out_valid <= 1'b0; out_bits <= '0;
    end else if (init) begin
      active <= '0; rv <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      for (int p = 0; p < int'(NPTR); p++) begin
        // issue stage: one column read per depth
        rv[p] <= re[p];
        if (re[p]) begin
          step_d[p]    <= step[p];
          pcol_d[p]    <= pcol[p];
          rv_useful[p] <= useful[p];
          step[p]      <= step[p] + 1'b1;
          if (pcol[p] == '0) begin
            pcol[p]  <= CW'(D - 1);
            pbank[p] <= (pbank[p] == '0) ? BW'(NB - 1) : pbank[p] - 1'b1;
          end else begin
            pcol[p]  <= pcol[p] - 1'b1;
          end
          if (step[p] == KW'(L + D - 1)) active[p] <= 1'b0;
        end
        // launch (overrides the issue-stage updates of this pointer)
        if (launch && nxt_ptr == PW'(p)) begin
          active[p]      <= 1'b1;
          useful[p]      <= (banks_done == PW'(NPTR - 1));
          step[p]        <= '0;
          pbank[p]       <= wbank;
          pcol[p]        <= CW'(D - 1);
          start_state[p] <= pe_idx;
        end
        // data stage: one trace-back step
        if (rv[p]) begin
          state[p] <= {cur[p][SW-2:0], rdata[p][cur[p]]};
          if (step_d[p] >= KW'(L)) blk[p] <= blk_final[p];
        end
        if (done[p]) begin
          out_valid <= 1'b1;
          out_bits  <= blk_final[p];
        end
      end
      // Two pointers never finish in the same cycle.
      assert ($onehot0(done)) else $error("rav_tb_smu: pointer collision");
    end
  end
endmodule
