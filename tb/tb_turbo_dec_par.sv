// tb_turbo_dec_par: end-to-end test of the parallel turbo decoder at a reduced size
// (N=128, 4 SISOs, d=2, WL=8, 4 iterations), one noiseless and two noisy blocks.
// See turbo_dec_bench for what is checked.
module tb_turbo_dec_par;
  turbo_dec_bench #(.N(128), .M(4), .D(2), .WL(8), .NI(4), .DEFAULTS(1'b0), .RUNS(3)) bench ();
endmodule
