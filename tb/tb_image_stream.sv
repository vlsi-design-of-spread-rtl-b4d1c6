// tb_image_stream: a whole 512x512 grey-scale image (4096 blocks of 8x8)
// watermarked and decoded at full rate with the chip at default parameters.
// Blocks enter the transmitter every 704 cycles; the transmitter output is
// wired through a channel (+-1 noise on every fourth block) straight into the
// receiver, which is free exactly when each watermarked block appears. Every
// decoded word and threshold is compared with the reference decoder; the
// embedded watermarks cycle through 0001..1110 (0000 and 1111 cannot be told
// apart by a mean threshold). Reported: recovery rate, throughput, and the
// mean squared pixel change. Set IMG to 256 for a 256x256 image.
module tb_image_stream;
  import tb_ref_pkg::*;

  localparam int IMG  = 512;
  localparam int BPR  = IMG / 8;          // blocks per row
  localparam int NBLK = BPR * BPR;

  logic clk = 0, rst_n = 0;
  logic tx_in_valid = 0, tx_ready, tx_out_valid, tx_out_last;
  logic [15:0] tx_pixel = 0, tx_out;
  logic [3:0] tx_wm = 0;
  logic [5:0] tx_out_index;
  logic rx_ready, rx_wm_valid;
  logic [15:0] rx_mean;
  logic [3:0] rx_wm;
  int noise;
  int checks = 0, failures = 0;
  int cycle = 0;
  int rx_blk = 0, tx_blk = 0;
  int first_start = -1, last_result = 0;
  longint sq_err = 0;

  // channel: every fourth block gets +-1 noise
  assign noise = ((tx_blk % 4) == 3) ? (int'(cycle * 7 % 3) - 1) : 0;

  ssw_watermark_top dut (
    .clk, .rst_n, .tx_in_valid, .tx_pixel, .tx_wm, .tx_ready, .tx_out_valid,
    .tx_out, .tx_out_index, .tx_out_last,
    .rx_in_valid(tx_out_valid), .rx_in(16'(int'($signed(tx_out)) + noise)),
    .rx_ready, .rx_wm_valid, .rx_wm, .rx_mean
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int pixel_at(input int r, input int c);
    int dr, dc, v;
    dr = r - IMG / 2;
    dc = c - IMG / 3;
    v = 30 + (r * 150) / IMG + (c * 60) / IMG;          // shaded background
    if (dr * dr + dc * dc < (IMG / 5) * (IMG / 5)) v += 40;  // bright disc
    return (v > 255) ? 255 : v;
  endfunction

  function automatic blk_t block_of(input int b);
    blk_t x;
    for (int n = 0; n < 64; n++) x[n] = pixel_at((b / BPR) * 8 + n / 8, (b % BPR) * 8 + n % 8);
    return x;
  endfunction

  function automatic logic [3:0] wm_of(input int b);
    return 4'(1 + b % 14);
  endfunction

  initial begin
    #80000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      blk_t x;
      x = block_of(b);
      while (!tx_ready) @(negedge clk);
      for (int n = 0; n < 64; n++) begin
        tx_in_valid = 1;
        tx_pixel = 16'(x[n]);
        tx_wm = wm_of(b);
        if (b == 0 && n == 0) first_start = cycle + 1;
        @(negedge clk);
      end
      tx_in_valid = 0;
    end
  end

  // transmitter output: check against the reference, keep what the receiver sees
  blk_t seen;
  always @(posedge clk) begin
    if (rst_n && tx_out_valid) begin
      seen[tx_out_index] <= int'($signed(tx_out)) + noise;
      if (tx_out_last) tx_blk <= tx_blk + 1;
    end
  end

  // receiver output
  initial begin
    int recovered;
    recovered = 0;
    wait (rst_n);
    for (int b = 0; b < NBLK; b++) begin
      blk_t x, y;
      int mu [4];
      int tm;
      logic [3:0] eb;
      @(posedge clk iff rx_wm_valid);
      x = block_of(b);
      y = embed(x, wm_of(b), 0);
      for (int n = 0; n < 64; n++) sq_err += longint'((y[n] - x[n]) * (y[n] - x[n]));
      correlate(seen, mu);
      eb = decide(mu, tm);
      check(rx_wm == eb, $sformatf("block %0d decoded %b vs reference %b", b, rx_wm, eb));
      check(int'($signed(rx_mean)) == tm, $sformatf("block %0d mean", b));
      if (rx_wm == wm_of(b)) recovered++;
      last_result = cycle + 1;
    end
    $display("image %0dx%0d: %0d blocks, watermark recovered in %0d, %0d cycles (%0d per block), mean squared pixel change %0d",
             IMG, IMG, NBLK, recovered, last_result - first_start + 1,
             (last_result - first_start + 1) / NBLK, int'(sq_err / (NBLK * 64)));
    check(recovered * 10 >= NBLK * 9, "watermark recovered in at least 90% of the blocks");
    check(last_result - first_start + 1 == (NBLK - 1) * 704 + 1280 + 704 + 1, "full-rate streaming");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
