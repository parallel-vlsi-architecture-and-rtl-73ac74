// tb_turbo_dec_par_full: end-to-end test of the parallel turbo decoder with all its
// default parameters (N=4096, 16 SISOs, d=2, WL=32, 10 iterations), one noiseless and two
// noisy blocks. See turbo_dec_bench for what is checked.
module tb_turbo_dec_par_full;
  turbo_dec_bench #(.N(4096), .M(16), .D(2), .WL(32), .NI(10), .DEFAULTS(1'b1), .RUNS(3)) bench ();
endmodule
