// fis: First Interleaving Stage of the parallel interleaver, built as the finite
// permutation network.
//
// Two register arrays of M*D metrics form a double buffer. Input sets of M metrics
// (one per SISO) are written row by row: the set of the r-th cycle of a delay packet
// goes to row r (a counter mod D selects the row), so element e = r*M + lane. After D
// sets the buffers switch: the full one is read during the next D cycles while the
// other fills. On each read cycle every output j takes the element named by its
// select address sel[j] (0..M*D-1), an (M*D) x M crossbar of multiplexers. A metric
// is thus delayed by D to 2*D-1 cycles, and any permutation of the M*D metrics of a
// delay packet can be applied.
//
// Timing: out_valid/out_data are registered; rd_cycle gives the output cycle number
// within the pass (0,1,2,...) one cycle ahead, so select addresses can be looked up
// from it combinationally. The input must arrive in whole delay packets; a packet is
// read out as soon as it is complete, with or without further input. clear resets
// the counters between passes. The structure follows the document; the register
// reset and the cycle numbering are this design's choices.
module fis #(
  parameter int M = 16,  // inputs/outputs (number of SISOs)
  parameter int D = 2,   // FIS delay, sets per delay packet
  parameter int W = 8,   // metric width
  parameter int CW = 16  // width of the output cycle counter
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          in_valid,
  input  logic [M-1:0][W-1:0]           in_data,
  output logic [CW-1:0]                 rd_cycle,
  output logic                          rd_en,
  input  logic [M-1:0][$clog2(M*D)-1:0] sel,
  output logic                          out_valid,
  output logic [M-1:0][W-1:0]           out_data
);
  localparam int RW = (D > 1) ? $clog2(D) : 1;

  logic [M*D-1:0][W-1:0] bank [2];
  logic [RW-1:0] wr_row, rd_row;
  logic          wr_bank, rd_bank;
  logic [1:0]    full;
  logic [CW-1:0] rd_cnt;

  assign rd_en    = full[rd_bank];
  assign rd_cycle = rd_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_row    <= '0;
      rd_row    <= '0;
      wr_bank   <= 1'b0;
      rd_bank   <= 1'b0;
      full      <= '0;
      rd_cnt    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (clear) begin
      wr_row    <= '0;
      rd_row    <= '0;
      wr_bank   <= 1'b0;
      rd_bank   <= 1'b0;
      full      <= '0;
      rd_cnt    <= '0;
      out_valid <= 1'b0;
    end else begin
      // write side
      if (in_valid) begin
        for (int j = 0; j < M; j++) bank[wr_bank][int'(wr_row) * M + j] <= in_data[j];
        if (wr_row == RW'(D - 1)) begin
          wr_row        <= '0;
          wr_bank       <= ~wr_bank;
          full[wr_bank] <= 1'b1;
        end else begin
          wr_row <= wr_row + 1'b1;
        end
      end
      // read side
      out_valid <= rd_en;
      if (rd_en) begin
        for (int j = 0; j < M; j++) out_data[j] <= bank[rd_bank][sel[j]];
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_row == RW'(D - 1)) begin
          rd_row        <= '0;
          rd_bank       <= ~rd_bank;
          full[rd_bank] <= 1'b0;
        end else begin
          rd_row <= rd_row + 1'b1;
        end
      end
    end
  end

  // a packet may not be written into a buffer that is still being read
  assert property (@(posedge clk) disable iff (!rst_n || clear)
                   in_valid |-> !full[wr_bank])
    else $error("fis: buffer overrun");
endmodule
