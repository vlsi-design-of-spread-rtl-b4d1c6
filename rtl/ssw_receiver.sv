// ssw_receiver: watermark decoder for 8x8 blocks.
//
// The received (watermarked) block goes through the forward Walsh transform
// (divide by 64). The correlator replays the four PN patterns and sums, per
// pattern, the coefficients where the pattern is 1. The mean of the four
// correlations is the decision threshold: a correlation at or above it
// decodes as 0, below it as 1. The decoder needs no copy of the original
// image (blind detection).
//
// Interface and timing. Offer a block when ready_o is high: word 0 with
// in_valid, then 63 more on consecutive cycles. wm_valid pulses in cycle 705
// when word 0 arrived in cycle 1; wm_o and mean_o hold until the next block's
// result. A new block may start in cycle 705.
module ssw_receiver
  import ssw_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  word_t            din,
  output logic             ready_o,
  output logic             wm_valid,
  output logic [NBITS-1:0] wm_o,
  output word_t            mean_o
);

  logic  accept, coef_valid, coef_last;
  word_t coef;
  word_t corr [NBITS];

  assign accept = in_valid && ready_o;

  walsh_transform #(.SHIFT(LOGN)) u_fwd (
    .clk, .rst_n, .in_valid, .din, .ready_o,
    .out_valid(coef_valid), .dout(coef), .out_index(), .out_last(coef_last)
  );

  correlator u_corr (
    .clk, .rst_n, .start(accept), .b_valid(coef_valid), .b_in(coef),
    .b_last(coef_last), .a_in(word_t'(0)), .corr_o(corr), .done_o(wm_valid)
  );

  mean_threshold u_thr (
    .corr, .mean_o, .bits_o(wm_o)
  );

endmodule
