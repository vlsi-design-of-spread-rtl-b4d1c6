// wt1_index_gen: butterfly address generator (block WT1 of the Walsh unit).
//
// Produces the address pairs (I, IP) of the fast Walsh transform loops
//   for L = 0..LOGN-1:  LE1 = 2**L
//     for J = 0..LE1-1:  for I = J, J+2*LE1, ... < N:  IP = I + LE1
// in exactly that order (0-based form of the loop nest of the source
// subroutine). Each stage has N/2 butterflies. The current pair is on
// i_o/ip_o; `advance` moves to the next one, `restart` returns to the first.
// `last_o` flags the final butterfly of the final stage. The counter
// structure is this design's own; the source gives only the sequence.
module wt1_index_gen
  import ssw_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  input  logic advance,
  output idx_t i_o,
  output idx_t ip_o,
  output logic last_o
);

  logic [2:0]      stage;
  idx_t            j, i;
  logic [LOGN:0]   le1, i_next;
  logic            j_last;

  always_comb begin
    le1    = (LOGN+1)'(1) << stage;
    i_next = {1'b0, i} + (le1 << 1);
    j_last = ({1'b0, j} + 1'b1) == le1;
    i_o    = i;
    ip_o   = idx_t'({1'b0, i} + le1);
    last_o = (stage == 3'(LOGN - 1)) && j_last && i_next[LOGN];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0;
      j     <= '0;
      i     <= '0;
    end else if (restart) begin
      stage <= '0;
      j     <= '0;
      i     <= '0;
    end else if (advance) begin
      if (!i_next[LOGN]) begin
        i <= i_next[LOGN-1:0];
      end else if (!j_last) begin
        j <= j + 1'b1;
        i <= j + 1'b1;
      end else begin
        stage <= (stage == 3'(LOGN - 1)) ? 3'd0 : stage + 3'd1;
        j     <= '0;
        i     <= '0;
      end
    end
  end

endmodule
