// tb_apriori_adder: self-checking testbench of the per-lane a-priori adders (8 lanes,
// 8 bits). Random and extreme operands, with and without zero_e; each lane is
// compared with a saturated sum computed here.
module tb_apriori_adder;
  localparam int L = 8, W = 8;
  logic [L-1:0][W-1:0] u, e, y;
  logic zero_e;

  apriori_adder #(.LANES(L), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  int Lr = L;

  initial begin
    for (int i = 0; i < 300; i++) begin
      zero_e = (i % 5 == 0);
      for (int j = 0; j < Lr; j++) begin
        int a, b;
        a = (i < 20) ? ((j % 2) ? 127 : -128) : int'($urandom_range(0, 255)) - 128;
        b = (i < 20) ? ((j % 3) ? 127 : -128) : int'($urandom_range(0, 255)) - 128;
        u[j] = W'(a);
        e[j] = W'(b);
      end
      #1;
      for (int j = 0; j < Lr; j++) begin
        int s;
        s = int'($signed(u[j])) + (zero_e ? 0 : int'($signed(e[j])));
        if (s > 127) s = 127;
        if (s < -128) s = -128;
        checks++;
        if (int'($signed(y[j])) != s) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d + %0d -> %0d, expected %0d", $signed(u[j]), $signed(e[j]), $signed(y[j]), s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
