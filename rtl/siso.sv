// siso: sliding-window log-MAP soft-input soft-output decoder for one sub-block,
// with tailbiting boundary handling.
//
// One pass takes a continuous stream of (K+1)*WL symbols, one per cycle: first the
// "tail window" (the last WL symbols of the preceding sub-block, or of the block for
// the first sub-block), then the K windows of its own sub-block. Each symbol is the
// systematic value already summed with its a-priori value (in_lu) and the parity
// value (in_lc). Time is divided into slots of WL cycles; slot 0 carries the tail
// window. Following the sliding-window schedule with separate recursion units:
//   slot 0        dummy alpha over the tail window gives the initial alpha;
//   slot v+2      dummy beta over window v (v=1..K-1), started from all-zero metrics;
//   slot w+4      valid beta over window w, started from the dummy result over window
//                 w+1, or for the last window from the boundary beta of the next
//                 sub-block (bnd_beta_in); the betas are stored in a two-bank memory;
//   slot w+5      alpha over window w and the extrinsic output for its symbols.
// The first output therefore leaves 5*WL+1 cycles after the first tail symbol, and the
// pass ends after (K+5)*WL cycles: a SISO delay of c=5 windows. The beta reached at
// the start of the sub-block by the valid beta over window 0 is published on
// bnd_beta_out for the SISO of the preceding sub-block.
//
// Recursions follow the log-domain equations: alpha and beta use the systematic
// (a-priori included) and parity metrics, the output uses alpha, the parity metric and
// beta only, so out_le is the extrinsic value. out_lapp = out_le + in_lu is the
// a-posteriori value used for the final decision. State metrics are normalised every
// step by subtracting the metric of state 0 and saturated to MET_W bits; the
// E-function over the eight edges of each output class is evaluated as a chain in
// state order. Metric width, normalisation and the chain order are this design's
// choices; the window schedule and c=5 follow the document. Symbols are kept in a
// circular buffer of 8 windows.
module siso #(
  parameter int WL    = 32,  // window length
  parameter int K     = 8,   // windows per sub-block, k = K*WL
  parameter int LLR_W = 8,   // width of input and output soft values
  parameter int MET_W = 12   // width of the state metrics
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  logic signed [LLR_W-1:0]              in_lu,
  input  logic signed [LLR_W-1:0]              in_lc,
  input  logic [turbo_pkg::NSTATES-1:0][MET_W-1:0] bnd_beta_in,
  output logic [turbo_pkg::NSTATES-1:0][MET_W-1:0] bnd_beta_out,
  output logic                                 out_valid,
  output logic signed [LLR_W-1:0]              out_le,
  output logic signed [LLR_W-1:0]              out_lapp,
  output logic                                 busy
);
  import turbo_pkg::*;

  localparam int NB    = 8;                 // buffered windows
  localparam int OFF_W = $clog2(WL);
  localparam int SL_W  = $clog2(K + 6);
  localparam int NSLOT = K + 5;

  typedef logic [NSTATES-1:0][MET_W-1:0] mvec_t;

  initial begin
    assert (K >= 2) else $error("siso: K must be at least 2");
    assert (WL == (1 << OFF_W)) else $error("siso: WL must be a power of two");
  end

  // ---------------------------------------------------------------- timing
  logic              active;
  logic [SL_W-1:0]   slot;
  logic [OFF_W-1:0]  off;
  logic [OFF_W-1:0]  roff;     // backward offset
  logic              last_cyc;

  assign roff     = OFF_W'(WL - 1) - off;
  assign last_cyc = active && (slot == SL_W'(NSLOT - 1)) && (off == OFF_W'(WL - 1));
  assign busy     = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      slot   <= '0;
      off    <= '0;
    end else if (last_cyc) begin
      active <= 1'b0;
      slot   <= '0;
      off    <= '0;
    end else if (active || in_valid) begin
      active <= 1'b1;
      off    <= off + 1'b1;
      if (off == OFF_W'(WL - 1)) slot <= slot + 1'b1;
    end
  end

  // input stream must be continuous for (K+1)*WL cycles
  assert property (@(posedge clk) disable iff (!rst_n)
                   (active && slot >= 1 && slot <= SL_W'(K) && !(slot == SL_W'(K) && off == OFF_W'(WL-1)))
                   |-> ##1 in_valid)
    else $error("siso: input stream interrupted");

  // ---------------------------------------------------------------- symbol buffer
  logic [2*LLR_W-1:0] ibuf [NB*WL];

  // write: slot s (0..K) stores at window index s mod NB
  always_ff @(posedge clk) begin
    if (in_valid && (!active || slot <= SL_W'(K)))
      ibuf[{slot[2:0], off}] <= {in_lu, in_lc};
  end

  // read ports of the three buffered units
  logic signed [LLR_W-1:0] db_lu, db_lc, vb_lu, vb_lc, al_lu, al_lc;
  logic [2:0] db_i, vb_i, al_i;
  assign db_i = slot[2:0] - 3'd1;   // window v stored at index v+1 = slot-1
  assign vb_i = slot[2:0] - 3'd3;   // window w stored at index w+1 = slot-3
  assign al_i = slot[2:0] - 3'd4;   // window w stored at index w+1 = slot-4
  assign {db_lu, db_lc} = ibuf[{db_i, roff}];
  assign {vb_lu, vb_lc} = ibuf[{vb_i, roff}];
  assign {al_lu, al_lc} = ibuf[{al_i, off}];

  // ---------------------------------------------------------------- dummy beta
  mvec_t db_reg, db_res, db_cur, db_nxt;
  logic  db_on;
  assign db_on  = active && slot >= SL_W'(3) && slot <= SL_W'(K + 1);
  assign db_cur = (off == '0) ? '0 : db_reg;
  metric_step #(.MET_W(MET_W), .LLR_W(LLR_W), .FORWARD(1'b0)) u_db (
    .m_in(db_cur), .lu(db_lu), .lc(db_lc), .m_out(db_nxt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      db_reg <= '0;
      db_res <= '0;
    end else if (db_on) begin
      db_reg <= db_nxt;
      if (off == OFF_W'(WL - 1)) db_res <= db_nxt;
    end
  end

  // ---------------------------------------------------------------- valid beta
  mvec_t vb_reg, vb_cur, vb_nxt;
  logic  vb_on, vb_lastwin;
  mvec_t bmem [2][WL];

  assign vb_on      = active && slot >= SL_W'(4) && slot <= SL_W'(K + 3);
  assign vb_lastwin = (slot == SL_W'(K + 3));
  assign vb_cur     = (off != '0) ? vb_reg : (vb_lastwin ? mvec_t'(bnd_beta_in) : db_res);
  metric_step #(.MET_W(MET_W), .LLR_W(LLR_W), .FORWARD(1'b0)) u_vb (
    .m_in(vb_cur), .lu(vb_lu), .lc(vb_lc), .m_out(vb_nxt));

  always_ff @(posedge clk) begin
    if (vb_on) bmem[slot[0]][roff] <= vb_cur;   // window w = slot-4 uses bank w mod 2
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vb_reg       <= '0;
      bnd_beta_out <= '0;
    end else if (vb_on) begin
      vb_reg <= vb_nxt;
      if (slot == SL_W'(4) && off == OFF_W'(WL - 1)) bnd_beta_out <= vb_nxt;
    end
  end

  // ---------------------------------------------------------------- alpha and output
  // One forward unit runs the dummy alpha over the tail window (slot 0, straight from
  // the input) and the valid alpha (slots 5..K+4, from the buffer).
  mvec_t al_reg, al_cur, al_nxt, b_rd;
  logic  al_on, from_in;
  logic signed [LLR_W-1:0] st_lu, st_lc;
  logic signed [MET_W+3:0] le;

  assign al_on   = active && slot >= SL_W'(5);
  assign from_in = !active || slot == '0;
  assign b_rd    = bmem[~slot[0]][off];          // window w = slot-5 in bank w mod 2
  assign st_lu   = from_in ? in_lu : al_lu;
  assign st_lc   = from_in ? in_lc : al_lc;
  assign al_cur  = active ? al_reg : '0;

  metric_step #(.MET_W(MET_W), .LLR_W(LLR_W), .FORWARD(1'b1)) u_al (
    .m_in(al_cur), .lu(st_lu), .lc(st_lc), .m_out(al_nxt));

  llr_out_unit #(.MET_W(MET_W), .LLR_W(LLR_W)) u_out (
    .alpha(al_reg), .beta(b_rd), .lc(al_lc), .le(le));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      al_reg    <= '0;
      out_valid <= 1'b0;
      out_le    <= '0;
      out_lapp  <= '0;
    end else begin
      out_valid <= al_on;
      if (!active)                  al_reg <= in_valid ? al_nxt : '0;
      else if (slot == '0 || al_on) al_reg <= al_nxt;
      if (al_on) begin
        out_le   <= LLR_W'(sat(int'(le), LLR_W));
        out_lapp <= LLR_W'(sat(int'(le) + int'(al_lu), LLR_W));
      end
    end
  end

endmodule
