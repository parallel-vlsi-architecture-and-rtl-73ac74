// pi_addr_mem: the parallel interleaver addressing memory.
//
// For every output cycle t of a pass (0..KD-1) and every lane j it holds the FIS select
// address (which of the M*D buffered metrics output j takes) and the SIS write address
// (where in memory j that metric is stored). Two address sets are kept: set 0 for
// interleaving (after the natural-order SISO pass) and set 1 for de-interleaving
// (after the interleaved-order pass). The contents come from the off-line interleaver
// design and are written through the load port, one lane entry per cycle. Reads are
// combinational. The memory's role follows the document; its organisation, two sets
// and load port are this design's choices.
module pi_addr_mem #(
  parameter int M  = 16,
  parameter int D  = 2,
  parameter int KD = 256   // output cycles per pass, k = N/m
) (
  input  logic                          clk,
  input  logic                          ld_we,
  input  logic                          ld_set,
  input  logic [$clog2(KD)-1:0]         ld_cycle,
  input  logic [$clog2(M)-1:0]          ld_lane,
  input  logic [$clog2(M*D)-1:0]        ld_fis,
  input  logic [$clog2(KD)-1:0]         ld_sis,
  input  logic                          rd_set,
  input  logic [$clog2(KD)-1:0]         rd_fis_cycle,
  output logic [M-1:0][$clog2(M*D)-1:0] rd_fis,
  input  logic [$clog2(KD)-1:0]         rd_sis_cycle,
  output logic [M-1:0][$clog2(KD)-1:0]  rd_sis
);
  localparam int FW = $clog2(M*D);
  localparam int SW = $clog2(KD);

  logic [M-1:0][FW-1:0] fis_tab [2][KD];
  logic [M-1:0][SW-1:0] sis_tab [2][KD];

  always_ff @(posedge clk) begin
    if (ld_we) begin
      fis_tab[ld_set][ld_cycle][ld_lane] <= ld_fis;
      sis_tab[ld_set][ld_cycle][ld_lane] <= ld_sis;
    end
  end

  assign rd_fis = fis_tab[rd_set][rd_fis_cycle];
  assign rd_sis = sis_tab[rd_set][rd_sis_cycle];
endmodule
