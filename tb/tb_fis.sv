// tb_fis: self-checking testbench of the First Interleaving Stage (M=4, D=2).
// The first delay packet is the document's example (inputs m1..m8 over two cycles,
// outputs m1 m6 m8 m3 then m5 m7 m2 m4); then 40 continuous packets with random
// permutations, then a gap and a lone packet. Every output metric, the output count
// and the delay (first output D+1 cycles after the first input) are checked.
module tb_fis;
  localparam int M = 4, D = 2, W = 8, MD = M * D;
  localparam int NP = 42;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [M-1:0][W-1:0] in_data = '0;
  logic [15:0] rd_cycle;
  logic rd_en, out_valid;
  logic [M-1:0][$clog2(MD)-1:0] sel;
  logic [M-1:0][W-1:0] out_data;

  fis #(.M(M), .D(D), .W(W), .CW(16)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int perm [NP][MD];       // output slot r*M+j of packet p takes element perm[p][r*M+j]
  int data [NP][MD];       // element e = row*M + lane of packet p
  int NPr = NP, MDr = MD, Mr = M, Dr = D;

  // select addresses looked up from the output cycle number
  always_comb begin
    for (int j = 0; j < M; j++)
      sel[j] = ($clog2(MD))'(perm[int'(rd_cycle) / D % NP][(int'(rd_cycle) % D) * M + j]);
  end

  int nout = 0, t_first_in = -1, t_first_out = -1;
  always @(posedge clk) begin
    if (in_valid && t_first_in < 0) t_first_in <= cyc;
    if (out_valid && rst_n) begin
      int p, r;
      if (t_first_out < 0) t_first_out = cyc;
      p = nout / D;
      r = nout % D;
      for (int j = 0; j < M; j++) begin
        checks++;
        if (int'(out_data[j]) != data[p][perm[p][r * M + j]]) begin
          failures++;
          if (failures < 10) $display("FAIL: packet %0d row %0d out %0d = %0d expected %0d",
                                      p, r, j, out_data[j], data[p][perm[p][r * M + j]]);
        end
      end
      nout++;
    end
  end

  initial begin
    // document example: m1..m8 are 1..8
    int ex [MD] = '{0, 5, 7, 2, 4, 6, 1, 3};
    for (int e = 0; e < MDr; e++) begin
      perm[0][e] = ex[e];
      data[0][e] = e + 1;
    end
    for (int p = 1; p < NPr; p++) begin
      for (int e = 0; e < MDr; e++) begin
        perm[p][e] = e;
        data[p][e] = int'($urandom_range(0, 255));
      end
      for (int e = MDr - 1; e > 0; e--) begin
        int r, t;
        r = int'($urandom_range(0, e));
        t = perm[p][e]; perm[p][e] = perm[p][r]; perm[p][r] = t;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPr; p++) begin
      if (p == NPr - 1) begin
        @(negedge clk) in_valid = 0;
        repeat (6) @(negedge clk);
      end
      for (int r = 0; r < Dr; r++) begin
        @(negedge clk);
        in_valid = 1;
        for (int j = 0; j < Mr; j++) in_data[j] = W'(data[p][r * M + j]);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != NP * D) begin failures++; $display("FAIL: %0d output sets, expected %0d", nout, NP * D); end
    checks++;
    if (t_first_out - t_first_in != D + 1) begin
      failures++;
      $display("FAIL: delay %0d, expected %0d", t_first_out - t_first_in, D + 1);
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
