// parallel_interleaver: the two-stage parallel interleaver (PI).
//
// M metrics per cycle enter the First Interleaving Stage (fis), a double-buffered
// finite permutation network of delay D. Each output cycle t of the FIS, output j
// carries one metric of the current delay packet, chosen by the FIS address of
// (t, j) in the addressing memory; it is written into SIS memory j at the SIS address
// of (t, j) (the Second Interleaving Stage is the addressing of the M memories, which
// sit outside this block). mode selects the address set: 0 interleave, 1 de-interleave.
//
// Timing: in_valid/in_data are the SISO outputs of the pass; wr_en, wr_addr and
// wr_data, one cycle after the FIS output register, drive the M memory write ports.
// KD output cycles make a pass; done pulses with the last write. clear restarts the
// cycle count for a new pass. The structure follows the document; the registered
// write port and the pass bookkeeping are this design's choices.
module parallel_interleaver #(
  parameter int M  = 16,
  parameter int D  = 2,
  parameter int KD = 256,
  parameter int W  = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          mode,
  input  logic                          in_valid,
  input  logic [M-1:0][W-1:0]           in_data,
  // addressing-memory load port
  input  logic                          ld_we,
  input  logic                          ld_set,
  input  logic [$clog2(KD)-1:0]         ld_cycle,
  input  logic [$clog2(M)-1:0]          ld_lane,
  input  logic [$clog2(M*D)-1:0]        ld_fis,
  input  logic [$clog2(KD)-1:0]         ld_sis,
  // SIS memory write port
  output logic                          wr_en,
  output logic [M-1:0][$clog2(KD)-1:0]  wr_addr,
  output logic [M-1:0][W-1:0]           wr_data,
  output logic                          done
);
  localparam int SW = $clog2(KD);
  localparam int CW = SW + 1;

  logic [CW-1:0]                 rd_cycle;
  logic                          rd_en;
  logic [M-1:0][$clog2(M*D)-1:0] sel;
  logic                          fis_valid;
  logic [M-1:0][W-1:0]           fis_data;
  logic [SW-1:0]                 out_cycle;
  logic [M-1:0][SW-1:0]          sis;

  fis #(.M(M), .D(D), .W(W), .CW(CW)) u_fis (
    .clk, .rst_n, .clear, .in_valid, .in_data,
    .rd_cycle, .rd_en, .sel, .out_valid(fis_valid), .out_data(fis_data));

  pi_addr_mem #(.M(M), .D(D), .KD(KD)) u_addr (
    .clk, .ld_we, .ld_set, .ld_cycle, .ld_lane, .ld_fis, .ld_sis,
    .rd_set(mode), .rd_fis_cycle(rd_cycle[SW-1:0]), .rd_fis(sel),
    .rd_sis_cycle(out_cycle), .rd_sis(sis));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_cycle <= '0;
      wr_en     <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
      done      <= 1'b0;
    end else if (clear) begin
      out_cycle <= '0;
      wr_en     <= 1'b0;
      done      <= 1'b0;
    end else begin
      wr_en <= fis_valid;
      done  <= fis_valid && (out_cycle == SW'(KD - 1));
      if (fis_valid) begin
        wr_addr   <= sis;
        wr_data   <= fis_data;
        out_cycle <= out_cycle + 1'b1;
      end
    end
  end
endmodule
