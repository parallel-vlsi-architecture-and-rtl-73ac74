// tb_pi_addr_mem: self-checking testbench of the interleaver addressing memory
// (M=4, D=2, KD=16). Every entry of both sets is written with random addresses,
// then both read ports are swept over both sets and compared with a copy kept here.
module tb_pi_addr_mem;
  localparam int M = 4, D = 2, KD = 16;
  logic clk = 0;
  logic ld_we = 0, ld_set = 0, rd_set = 0;
  logic [3:0] ld_cycle = '0, ld_sis = '0, rd_fis_cycle = '0, rd_sis_cycle = '0;
  logic [1:0] ld_lane = '0;
  logic [2:0] ld_fis = '0;
  logic [M-1:0][2:0] rd_fis;
  logic [M-1:0][3:0] rd_sis;

  pi_addr_mem #(.M(M), .D(D), .KD(KD)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int f [2][KD][M], s [2][KD][M];
  int Mr = M, KDr = KD;

  initial begin
    for (int st = 0; st < 2; st++)
      for (int c = 0; c < KDr; c++)
        for (int j = 0; j < Mr; j++) begin
          @(negedge clk);
          f[st][c][j] = int'($urandom_range(0, 7));
          s[st][c][j] = int'($urandom_range(0, 15));
          ld_we = 1; ld_set = 1'(st); ld_cycle = 4'(c); ld_lane = 2'(j);
          ld_fis = 3'(f[st][c][j]); ld_sis = 4'(s[st][c][j]);
        end
    @(negedge clk) ld_we = 0;
    for (int st = 0; st < 2; st++)
      for (int c = 0; c < KDr; c++) begin
        @(negedge clk);
        rd_set = 1'(st); rd_fis_cycle = 4'(c); rd_sis_cycle = 4'(KDr - 1 - c);
        #1;
        for (int j = 0; j < Mr; j++) begin
          checks += 2;
          if (int'(rd_fis[j]) != f[st][c][j]) begin failures++; $display("FAIL: fis set %0d cycle %0d lane %0d", st, c, j); end
          if (int'(rd_sis[j]) != s[st][KDr - 1 - c][j]) begin failures++; $display("FAIL: sis set %0d cycle %0d lane %0d", st, KDr - 1 - c, j); end
        end
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
