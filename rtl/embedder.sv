// embedder: data embedding module.
//
// Adds the spreading code to the Walsh coefficient while `en` is high (the
// MUX controlled by M4 in the transmitter), otherwise passes the coefficient
// unchanged. Because the code already carries the sign of each watermark bit,
// the single adder realises both X + kP (bit 0) and X - kP (bit 1).
// Purely combinational; the sum wraps at 16 bits like the source adder.
module embedder
  import ssw_pkg::*;
(
  input  logic  en,
  input  word_t coef,
  input  word_t code,
  output word_t coef_wm
);

  always_comb coef_wm = coef + (en ? code : word_t'(0));

endmodule
