// pn_gen: one PN block (PN1 or PN2) of the spreading-code generator.
//
// It holds two LFSRs and therefore two PN patterns of 64 elements (0/1). The
// raw bits go to the decoder's correlator MUXes (pn_o). For the embedder the
// two patterns are added, each with an antipodal sign picked by its watermark
// bit: a term is +p when wm bit XOR POLARITY is 0 and -p otherwise (sum_o,
// range -2..+2). PN1 uses POLARITY 0 and PN2 POLARITY 1, because the code
// generator subtracts PN2 from PN1; with watermark 0011 this gives exactly the
// plain "add inside each block, subtract the blocks" structure of the source.
// Timing: sum_o and pn_o are combinational from the LFSR state; `step`
// advances both LFSRs, `restart` reloads the seeds.
module pn_gen
  import ssw_pkg::*;
#(
  parameter logic [7:0] SEED_A   = PN_SEED1,
  parameter logic [7:0] SEED_B   = PN_SEED2,
  parameter bit         POLARITY = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  input  logic              step,
  input  logic [1:0]        wm,      // watermark bits of the two patterns
  output logic [1:0]        pn_o,    // raw PN elements {B, A}
  output logic signed [2:0] sum_o    // signed sum of both terms
);

  lfsr #(.W(LFSR_W), .TAPS(LFSR_TAPS), .SEED(SEED_A)) u_lfsr_a (
    .clk, .rst_n, .restart, .step, .bit_o(pn_o[0])
  );
  lfsr #(.W(LFSR_W), .TAPS(LFSR_TAPS), .SEED(SEED_B)) u_lfsr_b (
    .clk, .rst_n, .restart, .step, .bit_o(pn_o[1])
  );

  logic signed [2:0] term [2];

  always_comb begin
    for (int j = 0; j < 2; j++) begin
      if (!pn_o[j])                term[j] = 3'sd0;
      else if (wm[j] ^ POLARITY)   term[j] = -3'sd1;
      else                         term[j] = 3'sd1;
    end
    sum_o = term[0] + term[1];
  end

endmodule
