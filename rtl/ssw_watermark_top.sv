// ssw_watermark_top: spread-spectrum Walsh-domain image watermarking chip.
//
// The chip holds the two halves of the scheme side by side: the transmitter
// embeds a 4-bit watermark into each 8x8 block of an image, the receiver
// recovers the 4 bits from a (possibly degraded) watermarked block. Each half
// has its own ports; a system connects tx_out to rx_in through whatever
// channel lies between them. All ports are plain signals.
//
// Timing, per 8x8 block: the transmitter takes 64 pixels on consecutive
// cycles and returns the 64 watermarked pixels 1280 cycles after the first
// pixel (1344 cycles from first pixel in to last pixel out); blocks may be
// started every 704 cycles. The receiver takes 64 words on consecutive cycles
// and reports the bits 704 cycles after the first word.
module ssw_watermark_top
  import ssw_pkg::*;
#(
  parameter int unsigned K_SHIFT = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  // transmitter
  input  logic             tx_in_valid,
  input  logic [DW-1:0]    tx_pixel,
  input  logic [NBITS-1:0] tx_wm,
  output logic             tx_ready,
  output logic             tx_out_valid,
  output logic [DW-1:0]    tx_out,
  output logic [LOGN-1:0]  tx_out_index,
  output logic             tx_out_last,
  // receiver
  input  logic             rx_in_valid,
  input  logic [DW-1:0]    rx_in,
  output logic             rx_ready,
  output logic             rx_wm_valid,
  output logic [NBITS-1:0] rx_wm,
  output logic [DW-1:0]    rx_mean
);

  ssw_transmitter #(.K_SHIFT(K_SHIFT)) u_tx (
    .clk, .rst_n, .in_valid(tx_in_valid), .pixel(tx_pixel), .wm(tx_wm),
    .ready_o(tx_ready), .out_valid(tx_out_valid), .out_pixel(tx_out),
    .out_index(tx_out_index), .out_last(tx_out_last)
  );

  ssw_receiver u_rx (
    .clk, .rst_n, .in_valid(rx_in_valid), .din(rx_in), .ready_o(rx_ready),
    .wm_valid(rx_wm_valid), .wm_o(rx_wm), .mean_o(rx_mean)
  );

endmodule
