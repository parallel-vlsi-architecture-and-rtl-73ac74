// turbo_dec_par: parallel MAP turbo decoder. M SISOs decode one tailbiting block of N
// bits together, each on its own sub-block of k = N/M symbols.
//
// Every half-iteration ("pass") all SISOs run in lock-step. SISO j first receives the
// tail window (the last WL symbols of sub-block j-1, of sub-block M-1 for j=0) to
// start its forward metrics, then its own sub-block; its backward metrics at the end
// of the sub-block start from the boundary beta computed by SISO j+1. Each lane's
// input is the systematic value plus the a-priori value (adder) and the parity value,
// C1 in the natural-order stage and C2 in the interleaved stage. The M extrinsic
// outputs of each cycle go through the parallel interleaver (a double-buffered
// finite permutation network of delay D followed by addressed writes into the M
// interleaver memories), which interleaves after the natural-order stage and
// de-interleaves after the interleaved stage, using two address sets from the
// interleaver addressing memory. NI iterations are two passes each; a pass takes
// about k + 5*WL + D + 4 cycles.
//
// Interfaces:
//   load port (ld_*)  writes, for one address t of all M lanes at once, the
//                     channel values u, c1 (natural order) and c2 (interleaved order,
//                     as produced by the second encoder);
//   am_* port         writes the interleaver addressing memory, one (set, cycle,
//                     lane) entry per cycle: FIS select address and SIS write address;
//   start/busy/done   start a decoding; done stays high until the next start;
//   res_addr/res_llr  after done, the a-posteriori LLR of natural position
//                     j*k + res_addr is res_llr[j]; its sign bit is the decision
//                     (positive means 1).
// The block structure follows the document's parallel architecture; the pre-pass that
// builds an interleaved copy of U, the double-banked interleaver memory and the
// load/result ports are this design's choices.
module turbo_dec_par #(
  parameter int N     = 4096,  // block size
  parameter int M     = 16,    // number of SISOs (parallelism level m)
  parameter int D     = 2,     // FIS delay d
  parameter int WL    = 32,    // sliding-window length
  parameter int NI    = 10,    // decoding iterations
  parameter int LLR_W = 8,     // soft value width
  parameter int MET_W = 12     // state metric width
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // channel data load
  input  logic                          ld_valid,
  input  logic [$clog2(N/M)-1:0]        ld_addr,
  input  logic [M-1:0][LLR_W-1:0]       ld_u,
  input  logic [M-1:0][LLR_W-1:0]       ld_c1,
  input  logic [M-1:0][LLR_W-1:0]       ld_c2,
  // interleaver addressing memory load
  input  logic                          am_we,
  input  logic                          am_set,
  input  logic [$clog2(N/M)-1:0]        am_cycle,
  input  logic [$clog2(M)-1:0]          am_lane,
  input  logic [$clog2(M*D)-1:0]        am_fis,
  input  logic [$clog2(N/M)-1:0]        am_sis,
  // control
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  // results
  input  logic [$clog2(N/M)-1:0]        res_addr,
  output logic [M-1:0][LLR_W-1:0]       res_llr
);
  import turbo_pkg::*;

  localparam int KD = N / M;
  localparam int K  = KD / WL;
  localparam int SW = $clog2(KD);

  initial begin
    assert (KD * M == N && K * WL == KD) else $error("turbo_dec_par: N/M must be a multiple of WL");
    assert (KD % D == 0) else $error("turbo_dec_par: D must divide N/M");
  end

  // ------------------------------------------------------------ control
  phase_e          phase;
  logic            pi_clear, feed_valid, feed_tail, stage, zero_apriori, last_pass;
  logic            ext_rbank, pi_done;
  logic [SW-1:0]   feed_addr;
  logic [$clog2(NI+1)-1:0] iter;

  dec_ctrl #(.KD(KD), .WL(WL), .NI(NI)) u_ctrl (
    .clk, .rst_n, .start, .pi_done, .phase, .pi_clear, .feed_valid, .feed_tail,
    .feed_addr, .stage, .zero_apriori, .last_pass, .ext_rbank, .iter, .busy, .done);

  // ------------------------------------------------------------ memories
  logic [M-1:0][SW-1:0]    rd_addr;
  logic [M-1:0][LLR_W-1:0] u_rd, c1_rd, c2_rd, e_rd;
  logic                    pi_wr_en;
  logic [M-1:0][SW-1:0]    pi_wr_addr;
  logic [M-1:0][LLR_W-1:0] pi_wr_data;
  logic                    u_we_pi, e_we;

  assign u_we_pi = pi_wr_en && (phase == PH_UINT);
  assign e_we    = pi_wr_en && (phase == PH_RUN);
  // all memories are read at the same address; the results read at done use res_addr
  assign rd_addr = (phase == PH_DONE || phase == PH_IDLE) ? {M{res_addr}} : {M{feed_addr}};

  lane_mem #(.LANES(M), .DEPTH(KD), .W(LLR_W), .BANKS(2)) u_mem_u (
    .clk,
    .we(u_we_pi ? '1 : {M{ld_valid}}),
    .wbank(u_we_pi),
    .waddr(u_we_pi ? pi_wr_addr : {M{ld_addr}}),
    .wdata(u_we_pi ? pi_wr_data : ld_u),
    .rbank(stage), .raddr(rd_addr), .rdata(u_rd));

  lane_mem #(.LANES(M), .DEPTH(KD), .W(LLR_W), .BANKS(1)) u_mem_c1 (
    .clk, .we({M{ld_valid}}), .wbank(1'b0), .waddr({M{ld_addr}}), .wdata(ld_c1),
    .rbank(1'b0), .raddr(rd_addr), .rdata(c1_rd));

  lane_mem #(.LANES(M), .DEPTH(KD), .W(LLR_W), .BANKS(1)) u_mem_c2 (
    .clk, .we({M{ld_valid}}), .wbank(1'b0), .waddr({M{ld_addr}}), .wdata(ld_c2),
    .rbank(1'b0), .raddr(rd_addr), .rdata(c2_rd));

  lane_mem #(.LANES(M), .DEPTH(KD), .W(LLR_W), .BANKS(2)) u_mem_e (
    .clk, .we({M{e_we}}), .wbank(~ext_rbank), .waddr(pi_wr_addr), .wdata(pi_wr_data),
    .rbank(ext_rbank), .raddr(rd_addr), .rdata(e_rd));

  assign res_llr = e_rd;

  // ------------------------------------------------------------ lane routing and adders
  // During the tail window SISO j reads lane j-1 (lane M-1 for SISO 0).
  logic [M-1:0][LLR_W-1:0] u_in, c_in, e_in, lu_in;
  always_comb begin
    for (int j = 0; j < M; j++) begin
      int src;
      src     = feed_tail ? ((j + M - 1) % M) : j;
      u_in[j] = u_rd[src];
      c_in[j] = stage ? c2_rd[src] : c1_rd[src];
      e_in[j] = e_rd[src];
    end
  end

  apriori_adder #(.LANES(M), .W(LLR_W)) u_add (
    .u(u_in), .e(e_in), .zero_e(zero_apriori), .y(lu_in));

  // ------------------------------------------------------------ SISOs
  logic [M-1:0][NSTATES-1:0][MET_W-1:0] bnd;
  logic [M-1:0]                         s_valid, s_busy;
  logic [M-1:0][LLR_W-1:0]              s_le, s_lapp;
  logic                                 siso_in_valid;

  assign siso_in_valid = feed_valid && (phase == PH_RUN);

  for (genvar j = 0; j < M; j++) begin : g_siso
    siso #(.WL(WL), .K(K), .LLR_W(LLR_W), .MET_W(MET_W)) u_siso (
      .clk, .rst_n, .in_valid(siso_in_valid), .in_lu(lu_in[j]), .in_lc(c_in[j]),
      .bnd_beta_in(bnd[(j + 1) % M]), .bnd_beta_out(bnd[j]),
      .out_valid(s_valid[j]), .out_le(s_le[j]), .out_lapp(s_lapp[j]), .busy(s_busy[j]));
  end

  // ------------------------------------------------------------ parallel interleaver
  logic                    pi_in_valid;
  logic [M-1:0][LLR_W-1:0] pi_in_data;

  assign pi_in_valid = (phase == PH_UINT) ? feed_valid : s_valid[0];
  assign pi_in_data  = (phase == PH_UINT) ? u_rd : (last_pass ? s_lapp : s_le);

  parallel_interleaver #(.M(M), .D(D), .KD(KD), .W(LLR_W)) u_pi (
    .clk, .rst_n, .clear(pi_clear), .mode(stage),
    .in_valid(pi_in_valid), .in_data(pi_in_data),
    .ld_we(am_we), .ld_set(am_set), .ld_cycle(am_cycle), .ld_lane(am_lane),
    .ld_fis(am_fis), .ld_sis(am_sis),
    .wr_en(pi_wr_en), .wr_addr(pi_wr_addr), .wr_data(pi_wr_data), .done(pi_done));

  // all SISOs run in lock-step
  assert property (@(posedge clk) disable iff (!rst_n) s_valid == '0 || s_valid == '1)
    else $error("turbo_dec_par: SISOs out of step");
endmodule
