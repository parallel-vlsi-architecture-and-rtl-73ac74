// tb_siso: self-checking testbench of the sliding-window tailbiting SISO.
//
// The SISO is wired as the only SISO of a block (its boundary beta output fed back to
// its own input, the tail window taken from the end of the same block). Three passes:
//   1. random soft inputs, compared bit for bit with a procedural model of the same
//      window schedule (dummy alpha on the tail, dummy beta from zero over the next
//      window, valid beta, alpha and output), including the boundary beta;
//   2. a noiseless tailbiting codeword of the 13/17 code, where the a-posteriori sign
//      must equal every information bit;
//   3. the same codeword with a few systematic values flipped, corrected by the parity.
// The cycle of the first output (5*WL+1 after the first tail symbol) and the number of
// outputs (K*WL) are checked on every pass.
module tb_siso;
  import turbo_pkg::*;

  localparam int WL = 8, K = 4, LLR_W = 8, MET_W = 12;
  localparam int KS = K * WL;
  typedef logic [NSTATES-1:0][MET_W-1:0] mvec_t;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [LLR_W-1:0] in_lu = 0, in_lc = 0;
  mvec_t bnd;
  logic out_valid, busy;
  logic signed [LLR_W-1:0] out_le, out_lapp;

  siso #(.WL(WL), .K(K), .LLR_W(LLR_W), .MET_W(MET_W)) dut (
    .clk, .rst_n, .in_valid, .in_lu, .in_lc,
    .bnd_beta_in(bnd), .bnd_beta_out(bnd),
    .out_valid, .out_le, .out_lapp, .busy);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int ns_rt = NSTATES;
  int WLr = WL, Kr = K, KSr = KS, u_rt = 2;  // loop bound read at run time, keeps the model compact
  always @(posedge clk) cyc <= cyc + 1;
  int lu [KS], lc [KS];
  int ref_le [KS], ref_lapp [KS];
  mvec_t ref_bnd;

  // ---- reference model, written as plain loops over the block
  function automatic mvec_t norm(input int v [NSTATES]);
    mvec_t r;
    for (int s = 0; s < ns_rt; s++) r[s] = MET_W'(sat(v[s] - v[0], MET_W));
    return r;
  endfunction

  function automatic mvec_t fwd(input mvec_t a, input int u_l, input int c_l);
    int v [NSTATES];
    for (int ns = 0; ns < ns_rt; ns++) v[ns] = -100000;
    for (int s = 0; s < ns_rt; s++)
      for (int u = 0; u < u_rt; u++) begin
        int ns, val;
        ns  = int'(trellis_next(3'(s), u[0]));
        val = int'($signed(a[s])) + u * u_l + int'(trellis_parity(3'(s), u[0])) * c_l;
        // predecessors are visited with the oldest bit 0 first, as in the hardware
        v[ns] = (v[ns] == -100000) ? val : emax(v[ns], val);
      end
    return norm(v);
  endfunction

  function automatic mvec_t bwd(input mvec_t b, input int u_l, input int c_l);
    int v [NSTATES];
    for (int s = 0; s < ns_rt; s++) begin
      int c0, c1;
      c0 = int'($signed(b[trellis_next(3'(s), 1'b0)])) + int'(trellis_parity(3'(s), 1'b0)) * c_l;
      c1 = int'($signed(b[trellis_next(3'(s), 1'b1)])) + u_l + int'(trellis_parity(3'(s), 1'b1)) * c_l;
      v[s] = emax(c0, c1);
    end
    return norm(v);
  endfunction

  task automatic reference();
    mvec_t a, b, d, bnd_r;
    mvec_t bstore [KS];
    mvec_t dres [K];
    // dummy beta results: over window w+1 from zero
    for (int w = 0; w < Kr - 1; w++) begin
      d = '0;
      for (int p = (w + 2) * WLr - 1; p >= (w + 1) * WLr; p--) d = bwd(d, lu[p], lc[p]);
      dres[w] = d;
    end
    // valid beta over window 0 first gives the boundary beta
    b = dres[0];
    for (int p = WLr - 1; p >= 0; p--) b = bwd(b, lu[p], lc[p]);
    bnd_r = b;
    ref_bnd = bnd_r;
    for (int w = 0; w < Kr; w++) begin
      b = (w == Kr - 1) ? bnd_r : dres[w];
      for (int p = (w + 1) * WLr - 1; p >= w * WLr; p--) begin
        bstore[p] = b;
        b = bwd(b, lu[p], lc[p]);
      end
    end
    // dummy alpha over the tail (last window of the block), then alpha and outputs
    a = '0;
    for (int p = KSr - WLr; p < KSr; p++) a = fwd(a, lu[p], lc[p]);
    for (int p = 0; p < KSr; p++) begin
      int acc0, acc1, v0, v1, le;
      for (int s = 0; s < ns_rt; s++) begin
        v0 = int'($signed(a[s])) + int'(trellis_parity(3'(s), 1'b0)) * lc[p] +
             int'($signed(bstore[p][trellis_next(3'(s), 1'b0)]));
        v1 = int'($signed(a[s])) + int'(trellis_parity(3'(s), 1'b1)) * lc[p] +
             int'($signed(bstore[p][trellis_next(3'(s), 1'b1)]));
        acc0 = (s == 0) ? v0 : emax(acc0, v0);
        acc1 = (s == 0) ? v1 : emax(acc1, v1);
      end
      le = acc1 - acc0;
      ref_le[p]   = sat(le, LLR_W);
      ref_lapp[p] = sat(le + lu[p], LLR_W);
      a = fwd(a, lu[p], lc[p]);
    end
  endtask

  // the model runs in a plain event-triggered block, outside the stimulus process
  logic ref_req = 1'b0;
  always @(posedge ref_req) reference();

  // ---- one pass through the DUT; compares with ref_* and the bit vector if given
  int got_le [KS], got_lapp [KS];
  task automatic run_pass(input bit check_ref);
    int t0, tfirst, n;
    n = 0;
    tfirst = -1;
    fork
      begin
        for (int i = 0; i < (Kr + 1) * WLr; i++) begin
          int p;
          p = (i < WL) ? KS - WL + i : i - WL;
          @(negedge clk);
          in_valid = 1;
          in_lu = LLR_W'(lu[p]);
          in_lc = LLR_W'(lc[p]);
          if (i == 0) t0 = cyc;
        end
        @(negedge clk) in_valid = 0;
      end
      begin
        while (n < KS) begin
          @(posedge clk);
          #1;
          if (out_valid) begin
            if (tfirst < 0) tfirst = cyc;
            got_le[n] = int'(out_le);
            got_lapp[n] = int'(out_lapp);
            n++;
          end
        end
      end
    join
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL: more than %0d outputs", KS); end
    checks++;
    if (tfirst - t0 != 5 * WL + 1) begin
      failures++;
      $display("FAIL: first output %0d cycles after first input, expected %0d", tfirst - t0, 5 * WL + 1);
    end
    if (check_ref) begin
      for (int p = 0; p < KS; p++) begin
        checks++;
        if (got_le[p] != ref_le[p] || got_lapp[p] != ref_lapp[p]) begin
          failures++;
          if (failures < 10) $display("FAIL: pos %0d le %0d/%0d lapp %0d/%0d", p, got_le[p], ref_le[p], got_lapp[p], ref_lapp[p]);
        end
      end
      checks++;
      if (bnd != ref_bnd) begin failures++; $display("FAIL: boundary beta"); end
    end
    repeat (3) @(posedge clk);
  endtask

  // tailbiting encoder of the constituent code
  task automatic encode(input bit u [KS], output bit c [KS]);
    logic [2:0] s, s0;
    for (int st = 0; st < ns_rt; st++) begin
      s = 3'(st);
      for (int p = 0; p < KSr; p++) s = trellis_next(s, u[p]);
      if (s == 3'(st)) s0 = 3'(st);
    end
    s = s0;
    for (int p = 0; p < KSr; p++) begin
      c[p] = trellis_parity(s, u[p]);
      s = trellis_next(s, u[p]);
    end
  endtask

  initial begin
    bit ub [KS];
    bit cb [KS];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      if (pass == 0) begin
        // pass 1: random values
        for (int p = 0; p < KS; p++) begin
          lu[p] = int'($urandom_range(0, 120)) - 60;
          lc[p] = int'($urandom_range(0, 120)) - 60;
        end
      end else if (pass == 1) begin
        // pass 2: noiseless codeword
        for (int p = 0; p < KS; p++) ub[p] = 1'($urandom_range(0, 1));
        encode(ub, cb);
        for (int p = 0; p < KS; p++) begin
          lu[p] = ub[p] ? 12 : -12;
          lc[p] = cb[p] ? 12 : -12;
        end
      end else begin
        // pass 3: three weakened wrong systematic values
        lu[3] = -lu[3] / 4; lu[13] = -lu[13] / 4; lu[25] = -lu[25] / 4;
      end
      ref_req = 1'b1;
      @(posedge clk);
      ref_req = 1'b0;
      run_pass(1);
      if (pass > 0)
        for (int p = 0; p < KS; p++) begin
          checks++;
          if ((got_lapp[p] > 0) != ub[p]) begin failures++; $display("FAIL: pass %0d bit %0d", pass, p); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
