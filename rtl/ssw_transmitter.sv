// ssw_transmitter: watermark embedder for 8x8 blocks of 8-bit grey pixels.
//
// A forward Walsh transform (divide by 64) turns the block into 64 Walsh
// coefficients X. While they stream out, the code generator produces the
// matching element of the spreading code c = sum_i s_i*k*P_i (s_i = +1 for a
// watermark bit 0, -1 for a bit 1) and the embedding adder forms X + c. The
// sums feed straight into an inverse Walsh transform (the same unit without
// the divide), whose read-out is the watermarked block in row-major pixel
// order, 16 bits per pixel, with its pixel address.
//
// Interface and timing. Offer a block when ready_o is high: pixel 0 with
// in_valid, then 63 more pixels on consecutive cycles; wm is sampled with
// pixel 0. The watermarked pixels come out on out_valid in cycles 1281..1344
// after pixel 0 arrived in cycle 1, 1344 cycles per block in total. The next
// block can start 704 cycles after the previous one: its coefficients reach
// the inverse unit exactly when that unit becomes idle again, so the two
// transforms overlap.
module ssw_transmitter
  import ssw_pkg::*;
#(
  parameter int unsigned K_SHIFT = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  word_t            pixel,
  input  logic [NBITS-1:0] wm,
  output logic             ready_o,
  output logic             out_valid,
  output word_t            out_pixel,
  output idx_t             out_index,
  output logic             out_last
);

  logic             fwd_ready, fwd_valid, inv_ready, accept;
  word_t            coef, code, coef_wm;
  idx_t             fwd_index;
  logic [NBITS-1:0] wm_q, pn_unused;

  assign accept  = in_valid && fwd_ready;
  assign ready_o = fwd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      wm_q <= '0;
    else if (accept) wm_q <= wm;
  end

  walsh_transform #(.SHIFT(LOGN)) u_fwd (
    .clk, .rst_n, .in_valid, .din(pixel), .ready_o(fwd_ready),
    .out_valid(fwd_valid), .dout(coef), .out_index(fwd_index), .out_last()
  );

  code_gen #(.K_SHIFT(K_SHIFT)) u_code (
    .clk, .rst_n, .restart(accept), .step(fwd_valid), .wm(wm_q),
    .code_o(code), .pn_o(pn_unused)
  );

  embedder u_embed (
    .en(fwd_valid), .coef, .code, .coef_wm
  );

  walsh_transform #(.SHIFT(0)) u_inv (
    .clk, .rst_n, .in_valid(fwd_valid), .din(coef_wm), .ready_o(inv_ready),
    .out_valid, .dout(out_pixel), .out_index, .out_last
  );

  // the inverse unit must be free whenever coefficients arrive
  a_inv_free: assert property (@(posedge clk) disable iff (!rst_n)
    (fwd_valid && fwd_index == '0) |-> inv_ready)
    else $error("ssw_transmitter: inverse transform busy when a block arrived");

endmodule
