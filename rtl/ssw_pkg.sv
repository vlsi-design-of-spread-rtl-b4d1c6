// ssw_pkg: types and constants shared by the spread-spectrum Walsh watermark
// embedder and decoder.
//
// The datapath is 16 bits wide (signed two's complement) as in the pin names
// G[15:0], D[15:0], Q..T[15:0]. A block is 8x8 = 64 samples, transformed as a
// single 64-point fast Walsh transform. Four watermark bits are carried per
// block, each by its own 64-element pseudo-noise (PN) pattern.
//
// The LFSR polynomial and seeds are this design's own choice: the seeds were
// chosen so that every PN pattern has a 0 in element 0 (the DC coefficient),
// which keeps the block's mean brightness out of the correlations.
package ssw_pkg;

  localparam int unsigned DW     = 16;  // data word width
  localparam int unsigned N      = 64;  // samples per 8x8 block
  localparam int unsigned LOGN   = 6;   // log2(N), number of butterfly stages
  localparam int unsigned NBITS  = 4;   // watermark bits per block

  typedef logic signed [DW-1:0] word_t;
  typedef logic [LOGN-1:0]      idx_t;

  // Walsh transform unit phases
  typedef enum logic [1:0] {
    WT_IDLE = 2'd0,  // waiting for the first sample of a block
    WT_LOAD = 2'd1,  // storing samples at bit-reversed addresses
    WT_BFLY = 2'd2,  // in-place butterflies, 3 cycles each
    WT_OUT  = 2'd3   // natural-order read-out through the right shifter
  } wt_state_e;

  // 8-bit Fibonacci LFSR, x^8 + x^6 + x^5 + x^4 + 1 (period 255).
  // Feedback is the XOR of state bits 0, 2, 3 and 4; the output is bit 0.
  localparam int unsigned LFSR_W    = 8;
  localparam logic [7:0]  LFSR_TAPS = 8'h1D;

  // Seeds of the four PN patterns P1..P4 (PN1 holds P1,P2; PN2 holds P3,P4)
  localparam logic [7:0] PN_SEED1 = 8'hF8;
  localparam logic [7:0] PN_SEED2 = 8'h5A;
  localparam logic [7:0] PN_SEED3 = 8'hCE;
  localparam logic [7:0] PN_SEED4 = 8'hAC;

  // Cycle budget of one transform: load + 6*32 butterflies * 3 cycles + read-out
  localparam int unsigned WT_CYCLES = N + LOGN * (N / 2) * 3 + N;  // 704

endpackage
