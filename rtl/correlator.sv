// correlator: correlation calculation module of the decoder.
//
// Holds its own PN1 and PN2 blocks (the same generators as the embedder, so
// they replay the same four patterns P1..P4) and four accumulators. For every
// Walsh coefficient on b_in, each accumulator adds b_in if its pattern element
// is 1 and a_in if it is 0 (a MUX in front of each adder; the decoder ties
// a_in to zero). The results are
//   corr_o[i] = sum over n with P_i[n] = 1 of X[n],   i = 0..3 (Q, R, S, T).
// Timing: `start` clears the data registers and reloads the PN seeds; it must
// come before the block's first coefficient. Then one coefficient per cycle
// with b_valid; b_last marks the 64th. done_o is high for the one cycle after
// the last coefficient, when corr_o holds the final values; corr_o keeps them
// until the next `start`. Accumulation wraps at 16 bits as in the source.
module correlator
  import ssw_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  b_valid,
  input  word_t b_in,
  input  logic  b_last,
  input  word_t a_in,
  output word_t corr_o [NBITS],
  output logic  done_o
);

  logic [NBITS-1:0] pn;
  logic signed [2:0] unused_sum1, unused_sum2;

  pn_gen #(.SEED_A(PN_SEED1), .SEED_B(PN_SEED2), .POLARITY(1'b0)) u_pn1 (
    .clk, .rst_n, .restart(start), .step(b_valid), .wm(2'b00),
    .pn_o(pn[1:0]), .sum_o(unused_sum1)
  );
  pn_gen #(.SEED_A(PN_SEED3), .SEED_B(PN_SEED4), .POLARITY(1'b1)) u_pn2 (
    .clk, .rst_n, .restart(start), .step(b_valid), .wm(2'b00),
    .pn_o(pn[3:2]), .sum_o(unused_sum2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBITS; i++) corr_o[i] <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= b_valid && b_last;
      if (start) begin
        for (int i = 0; i < NBITS; i++) corr_o[i] <= '0;
      end else if (b_valid) begin
        for (int i = 0; i < NBITS; i++) corr_o[i] <= corr_o[i] + (pn[i] ? b_in : a_in);
      end
    end
  end

endmodule
