// lfsr: Fibonacci linear feedback shift register producing one pseudo-noise bit
// per step.
//
// The state shifts right by one on each `step`; the new top bit is the XOR of
// the state bits selected by TAPS. The output is state bit 0, so the first bit
// of a sequence is the seed's bit 0. `restart` reloads SEED (it wins over
// `step`), which is how every 8x8 block reuses the same 64-element PN pattern
// at the embedder and at the decoder. Reset also loads SEED.
// PN generation with an LFSR follows the source description; width,
// polynomial and seeds are this design's choices (see ssw_pkg).
module lfsr #(
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] TAPS = 8'h1D,
  parameter logic [W-1:0] SEED = 8'h01
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  input  logic step,
  output logic bit_o
);

  logic [W-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state <= SEED;
    else if (restart) state <= SEED;
    else if (step)    state <= {^(state & TAPS), state[W-1:1]};
  end

  assign bit_o = state[0];

  initial assert (SEED != '0) else $error("lfsr: an all-zero seed locks the register");

endmodule
