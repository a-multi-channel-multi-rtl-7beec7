// elink_prbs7_checker: bit-error counter for a PRBS7 test pattern.
//
// The pattern is the PRBS7 sequence x^7 + x^6 + 1 (each bit is the XOR of the
// bits received 7 and 6 bits earlier).  The checker is self-synchronising: it
// shifts every received bit into a 7-bit history and compares the bit with
// the prediction from that history, so after 7 error-free bits it is aligned
// to any phase of the sequence.  A single wrong bit counts up to three
// errors (once as itself and twice as part of a later prediction), the usual
// behaviour of such checkers.  An all-zero history is not a PRBS state; its
// bits are counted as errors so that a dead input never reads as error free.
//
//   clk, rst_n   clock and asynchronous active-low reset
//   en           one cycle per received bit
//   din          received bit
//   clear        restarts both counters
//   bit_cnt      bits checked (saturating)
//   err_cnt      bits that disagreed with the prediction (saturating)
//
// The description names an internal PRBS7 checker behind each group; the
// polynomial, the self-synchronising structure and the counters are this
// design's choices.
`timescale 1ps/1ps
module elink_prbs7_checker #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             din,
  input  logic             clear,
  output logic [CNT_W-1:0] bit_cnt,
  output logic [CNT_W-1:0] err_cnt
);

  logic [6:0] hist;
  logic       predict;
  logic       bad;

  assign predict = hist[6] ^ hist[5];
  assign bad     = (din != predict) || (hist == 7'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist    <= '0;
      bit_cnt <= '0;
      err_cnt <= '0;
    end else begin
      // the history keeps following the input while the counters are cleared
      if (en) hist <= {hist[5:0], din};
      if (clear) begin
        bit_cnt <= '0;
        err_cnt <= '0;
      end else if (en) begin
        if (bit_cnt != '1) bit_cnt <= bit_cnt + 1'b1;
        if (bad && err_cnt != '1) err_cnt <= err_cnt + 1'b1;
      end
    end
  end

endmodule
