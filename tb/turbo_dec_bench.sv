// turbo_dec_bench: end-to-end bench of the parallel turbo decoder, shared by the
// reduced-size and the full-size testbench.
//
// It builds a random interleaver that the parallel interleaver can realise in both
// directions (per delay packet a random FIS permutation; SIS addresses that move whole
// packets by one packet permutation common to all lanes and shuffle the D rows inside
// each packet per lane), derives the interleaving and de-interleaving address sets,
// encodes random blocks with two tailbiting 13/17 encoders, loads the channel values
// and runs decodings:
//   1. noiseless channel values;
//   2. channel values with deterministic noise that flips some hard decisions;
// and checks every decoded bit, the interleaved copy of the systematic values made by
// the pre-pass, and the length of every pass against k + 5*WL plus a small fixed
// overhead (the document's per-half-iteration latency N/m + c*WL with c = 5).
// Mechanisms counted, each must occur: tail-window feeds, FIS buffer switches in both
// directions of interleaving, a-priori-free first pass, a-posteriori write in the last
// pass, boundary-beta hand-over between neighbouring SISOs, corrected channel errors.
module turbo_dec_bench #(
  parameter int  N        = 64,
  parameter int  M        = 4,
  parameter int  D        = 2,
  parameter int  WL       = 8,
  parameter int  NI       = 4,
  parameter bit  DEFAULTS = 1'b0,   // instantiate the decoder with its own defaults
  parameter int  RUNS     = 2
) ();
  import turbo_pkg::*;

  localparam int KD = N / M;
  localparam int SW = $clog2(KD);
  localparam int LLR_W = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                          ld_valid = 0;
  logic [SW-1:0]                 ld_addr = '0;
  logic [M-1:0][LLR_W-1:0]       ld_u = '0, ld_c1 = '0, ld_c2 = '0;
  logic                          am_we = 0, am_set = 0;
  logic [SW-1:0]                 am_cycle = '0;
  logic [$clog2(M)-1:0]          am_lane = '0;
  logic [$clog2(M*D)-1:0]        am_fis = '0;
  logic [SW-1:0]                 am_sis = '0;
  logic                          start = 0;
  logic                          busy, done;
  logic [SW-1:0]                 res_addr = '0;
  logic [M-1:0][LLR_W-1:0]       res_llr;

  if (DEFAULTS) begin : g_dut
    turbo_dec_par dut (.*);
  end else begin : g_dut
    turbo_dec_par #(.N(N), .M(M), .D(D), .WL(WL), .NI(NI)) dut (.*);
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // run-time copies of the sizes keep the generated simulation code compact
  int Nr = N, Mr = M, Dr = D, KDr = KD, WLr = WL, NQr = KD / D, MDr = M * D, NSr = NSTATES;

  int intl [N];      // interleaved position -> natural position
  int dint [N];      // natural position -> interleaved position
  int pperm [KD / D];
  int pinv [KD / D];
  int sigma [M * D];
  int rho [D];
  bit ub [N], uib [N], c1b [N], c2b [N];
  int lu [N], lc1 [N], lc2 [N];

  // ---------------- mechanism counters
  int n_tail = 0, n_fis_sw_a = 0, n_fis_sw_b = 0, n_zero = 0, n_last = 0, n_bnd = 0, n_fix = 0;
  always @(posedge clk) if (rst_n) begin
    if (g_dut.dut.feed_tail && g_dut.dut.feed_valid) n_tail++;
    if (g_dut.dut.u_pi.u_fis.rd_en && g_dut.dut.u_pi.u_fis.rd_row == '0 && g_dut.dut.phase == PH_RUN) begin
      if (g_dut.dut.stage) n_fis_sw_b++; else n_fis_sw_a++;
    end
    if (g_dut.dut.zero_apriori && g_dut.dut.siso_in_valid) n_zero++;
    if (g_dut.dut.last_pass && g_dut.dut.pi_wr_en) n_last++;
    if (g_dut.dut.g_siso[0].u_siso.vb_on && g_dut.dut.g_siso[0].u_siso.vb_lastwin &&
        g_dut.dut.g_siso[0].u_siso.off == '0) n_bnd++;
  end

  // ---------------- pass length
  int pass_start = -1, pass_cnt = 0, pass_max = 0, pass_min = 1 << 30;
  always @(posedge clk) if (rst_n) begin
    if (g_dut.dut.pi_clear && g_dut.dut.phase == PH_RUN) pass_start <= cyc;
    if (g_dut.dut.pi_done && g_dut.dut.phase == PH_RUN && pass_start >= 0) begin
      pass_cnt++;
      if (cyc - pass_start > pass_max) pass_max = cyc - pass_start;
      if (cyc - pass_start < pass_min) pass_min = cyc - pass_start;
    end
  end

  // ---------------- interleaver and address sets
  task automatic shuffle_sigma();
    for (int i = 0; i < MDr; i++) sigma[i] = i;
    for (int i = MDr - 1; i > 0; i--) begin
      int r, t;
      r = int'($urandom_range(0, i));
      t = sigma[i]; sigma[i] = sigma[r]; sigma[r] = t;
    end
  endtask

  task automatic shuffle_rho();
    for (int i = 0; i < Dr; i++) rho[i] = i;
    for (int i = Dr - 1; i > 0; i--) begin
      int r, t;
      r = int'($urandom_range(0, i));
      t = rho[i]; rho[i] = rho[r]; rho[r] = t;
    end
  endtask

  task automatic am_write(input int set, input int cycle, input int lane, input int f, input int s);
    @(negedge clk);
    am_we = 1; am_set = 1'(set); am_cycle = SW'(cycle); am_lane = ($clog2(M))'(lane);
    am_fis = ($clog2(M*D))'(f); am_sis = SW'(s);
    @(negedge clk);
    am_we = 0;
  endtask

  task automatic build_interleaver();
    for (int q = 0; q < NQr; q++) pperm[q] = q;
    for (int q = NQr - 1; q > 0; q--) begin
      int r, t;
      r = int'($urandom_range(0, q));
      t = pperm[q]; pperm[q] = pperm[r]; pperm[r] = t;
    end
    for (int q = 0; q < NQr; q++) pinv[pperm[q]] = q;
    // set 0: interleaving
    for (int q = 0; q < NQr; q++) begin
      shuffle_sigma();
      for (int j = 0; j < Mr; j++) begin
        shuffle_rho();
        for (int r = 0; r < Dr; r++) begin
          int e, rin, s, a;
          e   = sigma[r * Mr + j];
          rin = e / Mr;
          s   = e % Mr;
          a   = pperm[q] * Dr + rho[r];
          intl[j * KDr + a] = s * KDr + q * Dr + rin;
          am_write(0, q * Dr + r, j, e, a);
        end
      end
    end
    for (int i = 0; i < Nr; i++) dint[intl[i]] = i;
    // set 1: de-interleaving
    for (int qq = 0; qq < NQr; qq++) begin
      int q;
      q = pinv[qq];
      for (int s = 0; s < Mr; s++)
        for (int r2 = 0; r2 < Dr; r2++) begin
          int n, ip, jj, rw;
          n  = s * KDr + q * Dr + r2;
          ip = dint[n];
          jj = ip / KDr;
          rw = ip % KDr - qq * Dr;
          am_write(1, qq * Dr + r2, s, rw * Mr + jj, q * Dr + r2);
        end
    end
  endtask

  // ---------------- encoder (tailbiting) and channel
  task automatic encode(input int which);
    logic [2:0] s, s0;
    s0 = '0;
    for (int st = 0; st < NSr; st++) begin
      s = 3'(st);
      for (int p = 0; p < Nr; p++) s = trellis_next(s, which == 0 ? ub[p] : uib[p]);
      if (s == 3'(st)) s0 = 3'(st);
    end
    s = s0;
    for (int p = 0; p < Nr; p++) begin
      logic b;
      b = (which == 0) ? ub[p] : uib[p];
      if (which == 0) c1b[p] = trellis_parity(s, b); else c2b[p] = trellis_parity(s, b);
      s = trellis_next(s, b);
    end
  endtask

  function automatic int chan(input bit b, input int noise);
    return sat((b ? 16 : -16) + noise, LLR_W);
  endfunction

  // sum of four uniforms, roughly Gaussian, sigma about 12
  function automatic int noise_sample(input int amp);
    int v;
    v = 0;
    for (int i = 0; i < 4; i++) v += int'($urandom_range(0, 40)) - 20;
    return (v * amp) / 4;
  endfunction

  task automatic make_block(input int amp);
    for (int p = 0; p < Nr; p++) ub[p] = 1'($urandom_range(0, 1));
    for (int p = 0; p < Nr; p++) uib[p] = ub[intl[p]];
    encode(0);
    encode(1);
    for (int p = 0; p < Nr; p++) begin
      lu[p]  = chan(ub[p],  amp == 0 ? 0 : noise_sample(amp));
      lc1[p] = chan(c1b[p], amp == 0 ? 0 : noise_sample(amp));
      lc2[p] = chan(c2b[p], amp == 0 ? 0 : noise_sample(amp));
    end
  endtask

  task automatic load_block();
    for (int t = 0; t < KDr; t++) begin
      @(negedge clk);
      ld_valid = 1;
      ld_addr = SW'(t);
      for (int j = 0; j < Mr; j++) begin
        ld_u[j]  = LLR_W'(lu[j * KDr + t]);
        ld_c1[j] = LLR_W'(lc1[j * KDr + t]);
        ld_c2[j] = LLR_W'(lc2[j * KDr + t]);
      end
    end
    @(negedge clk);
    ld_valid = 0;
  endtask

  task automatic decode_and_check(input int run);
    int t0, hard_err, errs;
    @(negedge clk);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    // after the pre-pass, bank 1 of U holds the interleaved systematic values
    wait (g_dut.dut.phase == PH_RUN);
    @(negedge clk);
    errs = 0;
    for (int ip = 0; ip < Nr; ip++)
      if (int'($signed(g_dut.dut.u_mem_u.mem[1][ip / KDr][ip % KDr])) != lu[intl[ip]]) errs++;
    checks++;
    if (errs != 0) begin failures++; $display("FAIL: run %0d interleaved U copy, %0d wrong", run, errs); end
    wait (done);
    $display("run %0d: decoded in %0d cycles", run, cyc - t0);
    hard_err = 0;
    errs = 0;
    for (int t = 0; t < KDr; t++) begin
      @(negedge clk);
      res_addr = SW'(t);
      #1;
      for (int j = 0; j < Mr; j++) begin
        int n;
        bit dec;
        n = j * KDr + t;
        dec = !res_llr[j][LLR_W-1] && res_llr[j] != '0;
        if ((lu[n] > 0) != ub[n]) begin
          hard_err++;
          if (dec == ub[n]) n_fix++;
        end
        checks++;
        if (dec != ub[n]) begin
          errs++;
          failures++;
        end
      end
    end
    $display("run %0d: %0d channel hard-decision errors, %0d decoded bit errors", run, hard_err, errs);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_interleaver();
    for (int run = 0; run < RUNS; run++) begin
      make_block(run);
      load_block();
      decode_and_check(run);
    end
    // pass length: the document's N/m + c*WL with c = 5, plus the FIS delay and a
    // few cycles of registers and control
    checks++;
    if (pass_cnt != RUNS * 2 * NI || pass_min < KD + 5 * WL || pass_max > KD + 5 * WL + D + 6) begin
      failures++;
      $display("FAIL: %0d passes, length %0d..%0d, expected %0d..%0d", pass_cnt, pass_min, pass_max,
               KD + 5 * WL, KD + 5 * WL + D + 6);
    end else $display("pass length %0d..%0d cycles (k + 5*WL = %0d)", pass_min, pass_max, KD + 5 * WL);
    checks++;
    if (n_tail == 0 || n_fis_sw_a == 0 || n_fis_sw_b == 0 || n_zero == 0 || n_last == 0 || n_bnd == 0 ||
        (RUNS > 1 && n_fix == 0)) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("mechanisms: tail-window feeds %0d, FIS switches A %0d B %0d, a-priori-free feeds %0d, a-posteriori writes %0d, boundary-beta hand-overs %0d, corrected channel errors %0d",
             n_tail, n_fis_sw_a, n_fis_sw_b, n_zero, n_last, n_bnd, n_fix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * N * D + 100 + RUNS * (3 * N / M + 2 * NI * (N / M + 5 * WL + D + 10) + 100)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
