// mean_threshold: mean correlation and threshold calculation module.
//
// Three 16-bit adders sum the four correlations ((Q + R) + (S + T)), a right
// shifter divides the sum by four (arithmetic shift, rounding toward minus
// infinity) to give the mean correlation T, and four magnitude comparators
// decide each watermark bit: bit i is 0 when corr[i] >= T and 1 when
// corr[i] < T. Comparisons are signed. The adders wrap at 16 bits as in the
// source. Purely combinational.
module mean_threshold
  import ssw_pkg::*;
(
  input  word_t            corr [NBITS],
  output word_t            mean_o,
  output logic [NBITS-1:0] bits_o
);

  word_t sum01, sum23, sum_all;

  always_comb begin
    sum01   = corr[0] + corr[1];
    sum23   = corr[2] + corr[3];
    sum_all = sum01 + sum23;
    mean_o  = sum_all >>> 2;
    for (int i = 0; i < NBITS; i++) bits_o[i] = (corr[i] < mean_o);
  end

endmodule
