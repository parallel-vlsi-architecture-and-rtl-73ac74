// dec_ctrl: sequencing of the parallel turbo decoder.
//
// A decoding is a sequence of passes over the block, each feeding all M SISOs in
// lock-step, one symbol per cycle:
//   UINT  the systematic values are streamed once through the parallel interleaver
//         (interleaving addresses) into the second bank of the U memory, so that an
//         interleaved copy exists for the second stage (KD cycles of feed);
//   A     "interleaving stage": natural order, parity C1, a-priori from the memory
//         (zero in the first pass), results interleaved (address set 0);
//   B     "de-interleaving stage": interleaved order, parity C2, results
//         de-interleaved (address set 1).
// A and B alternate NI times. An A or B pass feeds WL+KD cycles: first the tail window
// (addresses KD-WL..KD-1 of the preceding lane, feed_tail=1), then the sub-block
// (addresses 0..KD-1). A pass ends when the interleaver reports its last write
// (pi_done); the next pass starts with a one-cycle pi_clear. The interleaver memory
// is double-banked: passes read bank ext_rbank and write the other, and the banks
// swap after each pass. In the last B pass last_pass=1 makes the SISOs' a-posteriori
// values be written instead of the extrinsic ones. done stays high until the next
// start; the a-posteriori values are then in bank ext_rbank.
// The stage structure follows the document; the U pre-pass, the bank swapping and the
// one-cycle gaps are this design's choices.
module dec_ctrl #(
  parameter int KD = 256,  // sub-block length k = N/m
  parameter int WL = 32,   // window length
  parameter int NI = 10    // decoding iterations
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  pi_done,
  output turbo_pkg::phase_e     phase,
  output logic                  pi_clear,
  output logic                  feed_valid,
  output logic                  feed_tail,
  output logic [$clog2(KD)-1:0] feed_addr,
  output logic                  stage,        // 0: A (C1, interleave), 1: B (C2, de-interleave)
  output logic                  zero_apriori,
  output logic                  last_pass,
  output logic                  ext_rbank,
  output logic [$clog2(NI+1)-1:0] iter,
  output logic                  busy,
  output logic                  done
);
  import turbo_pkg::*;
  localparam int SW = $clog2(KD);
  localparam int FW = $clog2(KD + WL + 1);

  logic          clr;      // first cycle of a pass
  logic          feeding;
  logic [FW-1:0] fc;
  logic [FW-1:0] feed_len;

  assign feed_len     = (phase == PH_UINT) ? FW'(KD) : FW'(KD + WL);
  assign pi_clear     = clr;
  assign feed_valid   = feeding && !clr;
  assign feed_tail    = (phase == PH_RUN) && (fc < FW'(WL));
  assign feed_addr    = (phase != PH_RUN) ? SW'(fc) :
                        feed_tail ? SW'(fc + FW'(KD - WL)) : SW'(fc - FW'(WL));
  assign zero_apriori = (iter == '0) && (stage == 1'b0);
  assign last_pass    = (iter == ($clog2(NI+1))'(NI - 1)) && (stage == 1'b1);
  assign busy         = (phase == PH_UINT) || (phase == PH_RUN);
  assign done         = (phase == PH_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_IDLE;
      clr       <= 1'b0;
      feeding   <= 1'b0;
      fc        <= '0;
      stage     <= 1'b0;
      iter      <= '0;
      ext_rbank <= 1'b0;
    end else begin
      clr <= 1'b0;
      if (feed_valid) begin
        if (fc == feed_len - 1'b1) feeding <= 1'b0;
        fc <= fc + 1'b1;
      end
      unique case (phase)
        PH_IDLE, PH_DONE: if (start) begin
          phase     <= PH_UINT;
          clr       <= 1'b1;
          feeding   <= 1'b1;
          fc        <= '0;
          stage     <= 1'b0;
          iter      <= '0;
          ext_rbank <= 1'b0;
        end
        PH_UINT: if (pi_done) begin
          phase   <= PH_RUN;
          clr     <= 1'b1;
          feeding <= 1'b1;
          fc      <= '0;
        end
        PH_RUN: if (pi_done) begin
          ext_rbank <= ~ext_rbank;
          if (last_pass) begin
            phase <= PH_DONE;
          end else begin
            clr     <= 1'b1;
            feeding <= 1'b1;
            fc      <= '0;
            stage   <= ~stage;
            if (stage) iter <= iter + 1'b1;
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  // a pass must not end while symbols are still being fed
  assert property (@(posedge clk) disable iff (!rst_n) pi_done |-> !feeding)
    else $error("dec_ctrl: interleaver finished before the feed");
endmodule
