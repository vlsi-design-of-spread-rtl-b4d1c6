// bitrev_counter: binary address counter with bit-reversal unit.
//
// A W-bit up counter (8 bits in the source) with synchronous clear and count
// enable. count_o is its value; rev_o is its low LOGN bits in reversed order
// (bit 0 becomes bit LOGN-1), the address at which sample number count_o is
// stored so that the butterflies can run in place. The natural count
// addresses the read-out.
module bitrev_counter #(
  parameter int unsigned W    = 8,
  parameter int unsigned LOGN = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            en,
  output logic [W-1:0]    count_o,
  output logic [LOGN-1:0] rev_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count_o <= '0;
    else if (clear) count_o <= '0;
    else if (en)    count_o <= count_o + 1'b1;
  end

  always_comb begin
    for (int b = 0; b < LOGN; b++) rev_o[b] = count_o[LOGN-1-b];
  end

endmodule
