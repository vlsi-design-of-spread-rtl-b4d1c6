// tb_ref_pkg: reference arithmetic for the watermark testbenches.
//
// Everything here is computed straight from the definitions, not from the
// hardware's structure: the Walsh transform as a matrix product with entries
// (-1)^popcount(bitrev(k) & n), PN patterns from the linear recurrence of the
// LFSR polynomial, and the embedding and decision rules as written in the
// algorithm. Values are wrapped to 16-bit two's complement where the hardware
// datapath is 16 bits wide.
package tb_ref_pkg;

  typedef int blk_t [64];
  typedef bit pat_t [64];

  localparam logic [7:0] SEEDS [4] = '{8'hF8, 8'h5A, 8'hCE, 8'hAC};

  function automatic int wrap16(input int v);
    logic signed [15:0] t;
    t = 16'(v);
    return int'(t);
  endfunction

  function automatic int rev6(input int k);
    int r = 0;
    for (int b = 0; b < 6; b++) if (k[b]) r |= 1 << (5 - b);
    return r;
  endfunction

  // Walsh transform, then arithmetic shift right by sh (floor division)
  function automatic blk_t walsh(input blk_t x, input int sh);
    blk_t y;
    for (int k = 0; k < 64; k++) begin
      int acc = 0;
      for (int n = 0; n < 64; n++)
        acc += ($countones(rev6(k) & n) % 2) ? -x[n] : x[n];
      y[k] = wrap16(acc) >>> sh;
    end
    return y;
  endfunction

  // o[n+8] = o[n] ^ o[n+2] ^ o[n+3] ^ o[n+4], o[0..7] = seed bits 0..7
  function automatic pat_t pn_pattern(input logic [7:0] seed);
    bit o [72];
    pat_t p;
    for (int n = 0; n < 8; n++) o[n] = seed[n];
    for (int n = 0; n < 64; n++) o[n+8] = o[n] ^ o[n+2] ^ o[n+3] ^ o[n+4];
    for (int n = 0; n < 64; n++) p[n] = o[n];
    return p;
  endfunction

  // spreading code element n: sum_i s_i * P_i[n] * 2^k_shift
  function automatic int code_elem(input logic [3:0] wm, input int n, input int k_shift);
    int c = 0;
    for (int i = 0; i < 4; i++) begin
      pat_t p = pn_pattern(SEEDS[i]);
      if (p[n]) c += wm[i] ? -1 : 1;
    end
    return c * (1 << k_shift);
  endfunction

  // embedder: forward transform, add code, inverse transform
  function automatic blk_t embed(input blk_t pix, input logic [3:0] wm, input int k_shift);
    blk_t x = walsh(pix, 6);
    blk_t xe;
    for (int n = 0; n < 64; n++) xe[n] = wrap16(x[n] + code_elem(wm, n, k_shift));
    return walsh(xe, 0);
  endfunction

  // correlations of the coefficients of a received block with P1..P4
  function automatic void correlate(input blk_t y, output int mu [4]);
    blk_t z = walsh(y, 6);
    for (int i = 0; i < 4; i++) begin
      pat_t p = pn_pattern(SEEDS[i]);
      mu[i] = 0;
      for (int n = 0; n < 64; n++) if (p[n]) mu[i] = wrap16(mu[i] + z[n]);
    end
  endfunction

  // mean threshold decision
  function automatic logic [3:0] decide(input int mu [4], output int t);
    logic [3:0] b;
    t = wrap16(wrap16(mu[0] + mu[1]) + wrap16(mu[2] + mu[3])) >>> 2;
    for (int i = 0; i < 4; i++) b[i] = (mu[i] < t);
    return b;
  endfunction

  // test image: a smooth ramp with small texture, 8-bit pixels
  function automatic blk_t smooth_block(input int base, input int gx, input int gy, input int tex);
    blk_t b;
    for (int n = 0; n < 64; n++) begin
      int v = base + gx * (n % 8) + gy * (n / 8) + (tex ? ($urandom_range(4) - 2) : 0);
      b[n] = (v < 0) ? 0 : (v > 255) ? 255 : v;
    end
    return b;
  endfunction

endpackage
