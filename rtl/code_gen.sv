// code_gen: spreading-code generation module of the embedder.
//
// PN1 carries patterns P1, P2 (watermark bits 0, 1) and PN2 carries P3, P4
// (bits 2, 3). The PN1 sum minus the PN2 sum is the combined code
//   c[n] = sum_i s_i * P_i[n],  s_i = +1 for bit 0, -1 for bit 1,
// a value in -4..+4. The zero/one padding unit widens it to the 16-bit word:
// it sign-extends (ones above a negative value, zeros above a positive one)
// and appends K_SHIFT zeros below, i.e. multiplies by the modulation index
// k = 2**K_SHIFT. The source gives no value of k; the default k = 1 is this
// design's choice.
// Timing: code_o is combinational from the LFSR states. Pulse `restart` once
// per block before the first coefficient, then `step` once per coefficient,
// after the cycle in which code_o was used.
module code_gen
  import ssw_pkg::*;
#(
  parameter int unsigned K_SHIFT = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic             step,
  input  logic [NBITS-1:0] wm,
  output word_t            code_o,
  output logic [NBITS-1:0] pn_o
);

  logic signed [2:0] sum1, sum2;
  logic signed [3:0] diff;

  pn_gen #(.SEED_A(PN_SEED1), .SEED_B(PN_SEED2), .POLARITY(1'b0)) u_pn1 (
    .clk, .rst_n, .restart, .step, .wm(wm[1:0]), .pn_o(pn_o[1:0]), .sum_o(sum1)
  );
  pn_gen #(.SEED_A(PN_SEED3), .SEED_B(PN_SEED4), .POLARITY(1'b1)) u_pn2 (
    .clk, .rst_n, .restart, .step, .wm(wm[3:2]), .pn_o(pn_o[3:2]), .sum_o(sum2)
  );

  // subtractor, then zero/one padding
  always_comb begin
    diff   = 4'(sum1) - 4'(sum2);
    code_o = word_t'(diff) <<< K_SHIFT;
  end

endmodule
