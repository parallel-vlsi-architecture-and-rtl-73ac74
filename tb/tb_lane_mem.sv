// tb_lane_mem: self-checking testbench of the lane memory array (4 lanes, depth 16,
// two banks). Random per-lane writes into both banks, mirrored in a model here, then
// random per-lane reads of both banks compared with the model.
module tb_lane_mem;
  localparam int L = 4, DP = 16, W = 8;
  logic clk = 0;
  logic [L-1:0] we = '0;
  logic wbank = 0, rbank = 0;
  logic [L-1:0][3:0] waddr = '0, raddr = '0;
  logic [L-1:0][W-1:0] wdata = '0, rdata;

  lane_mem #(.LANES(L), .DEPTH(DP), .W(W), .BANKS(2)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model [2][L][DP];
  int Lr = L, DPr = DP;

  initial begin
    // fill everything once, then random overwrites
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DPr; a++) begin
        @(negedge clk);
        wbank = 1'(b); we = '1;
        for (int j = 0; j < Lr; j++) begin
          waddr[j] = 4'(a);
          wdata[j] = 8'($urandom_range(0, 255));
          model[b][j][a] = int'(wdata[j]);
        end
      end
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      wbank = 1'($urandom_range(0, 1));
      for (int j = 0; j < Lr; j++) begin
        we[j] = 1'($urandom_range(0, 1));
        waddr[j] = 4'($urandom_range(0, 15));
        wdata[j] = 8'($urandom_range(0, 255));
        if (we[j]) model[wbank][j][waddr[j]] = int'(wdata[j]);
      end
    end
    @(negedge clk) we = '0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      rbank = 1'($urandom_range(0, 1));
      for (int j = 0; j < Lr; j++) raddr[j] = 4'($urandom_range(0, 15));
      #1;
      for (int j = 0; j < Lr; j++) begin
        checks++;
        if (int'(rdata[j]) != model[rbank][j][raddr[j]]) begin
          failures++;
          if (failures < 10) $display("FAIL: bank %0d lane %0d addr %0d", rbank, j, raddr[j]);
        end
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
