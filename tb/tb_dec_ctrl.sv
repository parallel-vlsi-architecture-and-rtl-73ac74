// tb_dec_ctrl: self-checking testbench of the decoder sequencer (KD=16, WL=8, NI=2).
// The interleaver is stood in for by a pulse on pi_done five cycles after each feed
// ends. Checked for every pass: the phase, the feed length (KD for the pre-pass,
// WL+KD otherwise), every feed address and tail flag, the stage, the zero-a-priori
// and last-pass flags, the read bank; then done, and a second decoding after it.
module tb_dec_ctrl;
  import turbo_pkg::*;
  localparam int KD = 16, WL = 8, NI = 2;

  logic clk = 0, rst_n = 0, start = 0, pi_done = 0;
  phase_e phase;
  logic pi_clear, feed_valid, feed_tail, stage, zero_apriori, last_pass, ext_rbank, busy, done;
  logic [3:0] feed_addr;
  logic [1:0] iter;

  dec_ctrl #(.KD(KD), .WL(WL), .NI(NI)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int KDr = KD, WLr = WL;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // one pass: wait for the feed, check it, then answer with pi_done
  task automatic do_pass(input int pass, input bit pre, input bit exp_stage,
                         input bit exp_zero, input bit exp_last, input bit exp_bank);
    int n;
    n = 0;
    while (!feed_valid) @(negedge clk);
    check(phase == (pre ? PH_UINT : PH_RUN), $sformatf("pass %0d phase", pass));
    while (feed_valid) begin
      int exp_addr;
      bit exp_tail;
      exp_tail = !pre && n < WLr;
      exp_addr = pre ? n : (exp_tail ? KDr - WLr + n : n - WLr);
      check(feed_tail == exp_tail && int'(feed_addr) == exp_addr,
            $sformatf("pass %0d feed %0d addr %0d tail %0d", pass, n, feed_addr, feed_tail));
      if (!pre) begin
        check(stage == exp_stage && zero_apriori == exp_zero && last_pass == exp_last &&
              ext_rbank == exp_bank, $sformatf("pass %0d flags", pass));
      end
      n++;
      @(negedge clk);
    end
    check(n == (pre ? KDr : KDr + WLr), $sformatf("pass %0d feed length %0d", pass, n));
    repeat (5) @(negedge clk);
    pi_done = 1;
    @(negedge clk);
    pi_done = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      check(busy, "busy after start");
      do_pass(0, 1, 0, 0, 0, 0);
      do_pass(1, 0, 0, 1, 0, 0);
      do_pass(2, 0, 1, 0, 0, 1);
      do_pass(3, 0, 0, 0, 0, 0);
      do_pass(4, 0, 1, 0, 1, 1);
      check(done && !busy && ext_rbank == 1'b0, "done after the last pass");
      repeat (3) @(negedge clk);
      check(done && !feed_valid, "done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
