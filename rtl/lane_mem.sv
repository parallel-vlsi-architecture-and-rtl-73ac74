// lane_mem: an array of LANES memories of DEPTH words each, optionally in BANKS banks.
//
// One instance holds one of the decoder's memory blocks: the systematic (U), parity
// (C1, C2) channel memories and the interleaver/de-interleaver memory, whose M lanes
// are the Second Interleaving Stage memories Mem(1)..Mem(m) of depth k = N/m. Each
// lane has its own write enable, write address and data; all lanes write the same
// bank. Reads are combinational, one address per lane, from the bank rbank.
// Organisation into lanes of depth k follows the document; banks, combinational
// reads and the absence of reset (contents are written before they are read) are this
// design's choices.
module lane_mem #(
  parameter int LANES = 16,
  parameter int DEPTH = 256,
  parameter int W     = 8,
  parameter int BANKS = 1
) (
  input  logic                                 clk,
  input  logic [LANES-1:0]                     we,
  input  logic [(BANKS>1?$clog2(BANKS):1)-1:0] wbank,
  input  logic [LANES-1:0][$clog2(DEPTH)-1:0]  waddr,
  input  logic [LANES-1:0][W-1:0]              wdata,
  input  logic [(BANKS>1?$clog2(BANKS):1)-1:0] rbank,
  input  logic [LANES-1:0][$clog2(DEPTH)-1:0]  raddr,
  output logic [LANES-1:0][W-1:0]              rdata
);
  logic [W-1:0] mem [BANKS][LANES][DEPTH];

  always_ff @(posedge clk) begin
    for (int j = 0; j < LANES; j++)
      if (we[j]) mem[(BANKS > 1) ? int'(wbank) : 0][j][waddr[j]] <= wdata[j];
  end

  always_comb begin
    for (int j = 0; j < LANES; j++)
      rdata[j] = mem[(BANKS > 1) ? int'(rbank) : 0][j][raddr[j]];
  end
endmodule
