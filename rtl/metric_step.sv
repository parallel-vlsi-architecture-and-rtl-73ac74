// metric_step: one trellis step of the forward (alpha) or backward (beta) state-metric
// recursion of the 8-state 13/17 code, combinational.
//
// FORWARD=1: m_out(s') = E over the two edges s->s' of m_in(s) + u*lu + c*lc.
// FORWARD=0: m_out(s)  = E over the two edges s->s' of m_in(s') + u*lu + c*lc.
// u and c are the input and parity bits of the edge, lu and lc the soft values of the
// step (a positive value favours 1). The eight results are normalised by subtracting
// the result of state 0 and saturated to MET_W bits (this design's normalisation).
// Internally EW = MET_W+4 bits give headroom for the sums.
module metric_step #(
  parameter int  MET_W   = 12,
  parameter int  LLR_W   = 8,
  parameter bit  FORWARD = 1'b1
) (
  input  logic [turbo_pkg::NSTATES-1:0][MET_W-1:0] m_in,
  input  logic signed [LLR_W-1:0]                  lu,
  input  logic signed [LLR_W-1:0]                  lc,
  output logic [turbo_pkg::NSTATES-1:0][MET_W-1:0] m_out
);
  import turbo_pkg::*;
  localparam int EW = MET_W + 4;

  logic signed [EW-1:0] cand [NSTATES][2];
  logic signed [EW-1:0] res  [NSTATES];
  logic signed [EW-1:0] lu_e, lc_e;

  assign lu_e = EW'(lu);
  assign lc_e = EW'(lc);

  always_comb begin
    for (int t = 0; t < NSTATES; t++) begin
      for (int x = 0; x < 2; x++) begin
        logic [2:0] p;
        logic [2:0] q;
        logic       u;
        logic       c;
        if (FORWARD) begin
          // target t, predecessor p = {t[1], t[0], x}
          p = {t[1], t[0], x[0]};
          u = t[2] ^ p[1] ^ p[0];
          c = trellis_parity(p, u);
          cand[t][x] = EW'($signed(m_in[p])) + (u ? lu_e : '0) + (c ? lc_e : '0);
        end else begin
          // source t, input bit x, successor q
          q = trellis_next(3'(t), x[0]);
          c = trellis_parity(3'(t), x[0]);
          cand[t][x] = EW'($signed(m_in[q])) + (x[0] ? lu_e : '0) + (c ? lc_e : '0);
        end
      end
    end
  end

  for (genvar g = 0; g < NSTATES; g++) begin : g_e
    emax_unit #(.W(EW)) u_e (.a(cand[g][0]), .b(cand[g][1]), .y(res[g]));
  end

  always_comb begin
    for (int t = 0; t < NSTATES; t++) begin
      logic signed [EW-1:0] d;
      d = res[t] - res[0];
      if (d > EW'((1 <<< (MET_W - 1)) - 1))   m_out[t] = MET_W'((1 <<< (MET_W - 1)) - 1);
      else if (d < EW'(-(1 <<< (MET_W - 1)))) m_out[t] = MET_W'(-(1 <<< (MET_W - 1)));
      else                                     m_out[t] = d[MET_W-1:0];
    end
  end
endmodule
