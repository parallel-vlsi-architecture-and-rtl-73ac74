// llr_out_unit: SISO output metric for one trellis step, combinational.
//
// le = E over the eight u=1 edges of alpha(s) + c*lc + beta(s') minus the same over
// the eight u=0 edges: the log-domain output equation, which leaves out the
// systematic/a-priori term, so le is the extrinsic value. Each E over eight values is
// a chain of seven E-function units in state order 0..7 (this design's choice; the
// table-based E-function is not exactly associative, so the order is fixed).
// The result is EW = MET_W+4 bits wide, unsaturated.
module llr_out_unit #(
  parameter int MET_W = 12,
  parameter int LLR_W = 8
) (
  input  logic [turbo_pkg::NSTATES-1:0][MET_W-1:0] alpha,
  input  logic [turbo_pkg::NSTATES-1:0][MET_W-1:0] beta,
  input  logic signed [LLR_W-1:0]                  lc,
  output logic signed [MET_W+3:0]                  le
);
  import turbo_pkg::*;
  localparam int EW = MET_W + 4;

  logic signed [EW-1:0] val   [2][NSTATES];
  logic signed [EW-1:0] res   [2];

  always_comb begin
    for (int u = 0; u < 2; u++)
      for (int s = 0; s < NSTATES; s++)
        val[u][s] = EW'($signed(alpha[s])) +
                    (trellis_parity(3'(s), u[0]) ? EW'(lc) : '0) +
                    EW'($signed(beta[trellis_next(3'(s), u[0])]));
  end

  for (genvar u = 0; u < 2; u++) begin : g_u
    for (genvar s = 1; s < NSTATES; s++) begin : g_s
      logic signed [EW-1:0] acc;
      if (s == 1) begin : g_first
        emax_unit #(.W(EW)) u_e (.a(val[u][0]), .b(val[u][s]), .y(acc));
      end else begin : g_next
        emax_unit #(.W(EW)) u_e (.a(g_s[s-1].acc), .b(val[u][s]), .y(acc));
      end
    end
    assign res[u] = g_s[NSTATES-1].acc;
  end

  assign le = res[1] - res[0];
endmodule
