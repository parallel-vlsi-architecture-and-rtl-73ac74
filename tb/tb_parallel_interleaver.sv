// tb_parallel_interleaver: self-checking testbench of the two-stage parallel
// interleaver (M=4, D=2, KD=16). Address set 0 gets random FIS permutations per delay
// packet and a random SIS address permutation per lane; set 1 other random values.
// A pass of KD input sets with distinct metrics is run in each mode; every memory
// write (lane, address, metric) is compared with the permutation computed here, each
// address must be written exactly once, and done must pulse with the last write.
module tb_parallel_interleaver;
  localparam int M = 4, D = 2, KD = 16, W = 8, MD = M * D;
  localparam int SW = $clog2(KD);

  logic clk = 0, rst_n = 0, clear = 0, mode = 0, in_valid = 0;
  logic [M-1:0][W-1:0] in_data = '0;
  logic ld_we = 0, ld_set = 0;
  logic [SW-1:0] ld_cycle = '0, ld_sis = '0;
  logic [$clog2(M)-1:0] ld_lane = '0;
  logic [$clog2(MD)-1:0] ld_fis = '0;
  logic wr_en, done;
  logic [M-1:0][SW-1:0] wr_addr;
  logic [M-1:0][W-1:0] wr_data;

  parallel_interleaver #(.M(M), .D(D), .KD(KD), .W(W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int Mr = M, Dr = D, KDr = KD, MDr = MD;
  int fsel [2][KD][M];
  int sadr [2][KD][M];
  int seen [M][KD];
  int expv [M][KD];
  int nwr = 0, ndone = 0;

  always @(posedge clk) begin
    if (done) ndone++;
    if (wr_en && rst_n) begin
      nwr++;
      for (int j = 0; j < M; j++) begin
        seen[j][wr_addr[j]]++;
        checks++;
        if (int'(wr_data[j]) != expv[j][wr_addr[j]]) begin
          failures++;
          if (failures < 10) $display("FAIL: lane %0d addr %0d got %0d expected %0d", j, wr_addr[j], wr_data[j], expv[j][wr_addr[j]]);
        end
      end
    end
  end

  task automatic shuffle(inout int a [MD], input int n);
    for (int i = 0; i < n; i++) a[i] = i;
    for (int i = n - 1; i > 0; i--) begin
      int r, t;
      r = int'($urandom_range(0, i));
      t = a[i]; a[i] = a[r]; a[r] = t;
    end
  endtask

  initial begin
    int tmp [MD];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < 2; set++) begin
      for (int q = 0; q < KDr / Dr; q++) begin
        shuffle(tmp, MDr);
        for (int r = 0; r < Dr; r++)
          for (int j = 0; j < Mr; j++) fsel[set][q * Dr + r][j] = tmp[r * Mr + j];
      end
      for (int j = 0; j < Mr; j++) begin
        int perm [MD];
        int big [KD];
        for (int t = 0; t < KDr; t++) big[t] = t;
        for (int t = KDr - 1; t > 0; t--) begin
          int r, x;
          r = int'($urandom_range(0, t));
          x = big[t]; big[t] = big[r]; big[r] = x;
        end
        for (int t = 0; t < KDr; t++) sadr[set][t][j] = big[t];
      end
      for (int t = 0; t < KDr; t++)
        for (int j = 0; j < Mr; j++) begin
          @(negedge clk);
          ld_we = 1; ld_set = 1'(set); ld_cycle = SW'(t); ld_lane = 2'(j);
          ld_fis = 3'(fsel[set][t][j]); ld_sis = SW'(sadr[set][t][j]);
        end
      @(negedge clk) ld_we = 0;
    end
    for (int set = 0; set < 2; set++) begin
      // expected contents: input metric of lane s, cycle t is 16*s + t + 64*set
      for (int t = 0; t < KDr; t++)
        for (int j = 0; j < Mr; j++) begin
          int e, q, s, tin;
          q   = t / Dr;
          e   = fsel[set][t][j];
          s   = e % Mr;
          tin = q * Dr + e / Mr;
          expv[j][sadr[set][t][j]] = 16 * s + tin + 64 * set;
          seen[j][sadr[set][t][j]] = 0;
        end
      nwr = 0; ndone = 0;
      @(negedge clk);
      mode = 1'(set); clear = 1;
      @(negedge clk);
      clear = 0;
      for (int t = 0; t < KDr; t++) begin
        @(negedge clk);
        in_valid = 1;
        for (int s = 0; s < Mr; s++) in_data[s] = W'(16 * s + t + 64 * set);
      end
      @(negedge clk) in_valid = 0;
      repeat (8) @(posedge clk);
      checks++;
      if (nwr != KD || ndone != 1) begin failures++; $display("FAIL: %0d writes, %0d done", nwr, ndone); end
      for (int j = 0; j < Mr; j++)
        for (int a = 0; a < KDr; a++) begin
          checks++;
          if (seen[j][a] != 1) begin failures++; $display("FAIL: lane %0d addr %0d written %0d times", j, a, seen[j][a]); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
