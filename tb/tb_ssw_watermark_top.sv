// tb_ssw_watermark_top: end-to-end run of the watermarking chip at its
// default parameters. A small image of 12 blocks (8x8, 8-bit) is embedded
// block after block with back-to-back starts; each watermarked block crosses
// a channel (clean for even blocks, +-1 noise for odd ones) into the receiver.
// Checked: every watermarked pixel against the reference embedder, every
// decoded word and mean against the reference decoder, the 1344-cycle block
// latency, and that the receiver gives back the embedded watermark. Counted
// and required at least once: bit 0 (X + kP) and bit 1 (X - kP) embedding,
// a block whose forward transform overlaps the previous block's inverse,
// decoded 0s and 1s, a noisy channel block, and a correctly recovered block.
module tb_ssw_watermark_top;
  import tb_ref_pkg::*;
  import ssw_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tx_in_valid = 0, tx_ready, tx_out_valid, tx_out_last;
  logic [15:0] tx_pixel = 0, tx_out;
  logic [3:0] tx_wm = 0;
  logic [5:0] tx_out_index;
  logic rx_in_valid = 0, rx_ready, rx_wm_valid;
  logic [15:0] rx_in = 0, rx_mean;
  logic [3:0] rx_wm;
  int checks = 0, failures = 0;
  int cycle = 0;

  ssw_watermark_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NBLK = 12;
  blk_t blocks [NBLK];
  blk_t sent [NBLK];          // after the channel
  logic [3:0] wms [NBLK];
  int start_cycle [NBLK];
  int n_embed0 = 0, n_embed1 = 0, n_overlap = 0, n_dec0 = 0, n_dec1 = 0;
  int n_noisy = 0, n_recovered = 0, n_tx_blocks = 0;

  // image source: 12 blocks of a gently shaded picture
  initial begin
    for (int b = 0; b < NBLK; b++) begin
      blocks[b] = smooth_block(40 + 15 * b, (b % 5) - 2, (b % 3) - 1, 1);
      wms[b] = 4'(1 + (b * 7) % 14);
      for (int i = 0; i < 4; i++) if (wms[b][i]) n_embed1++; else n_embed0++;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      while (!tx_ready) @(negedge clk);
      // previous block still inside the inverse transform?
      if (b > 0 && n_tx_blocks < b) n_overlap++;
      for (int n = 0; n < 64; n++) begin
        tx_in_valid = 1;
        tx_pixel = 16'(blocks[b][n]);
        tx_wm = wms[b];
        if (n == 0) start_cycle[b] = cycle + 1;
        @(negedge clk);
      end
      tx_in_valid = 0;
    end
  end

  // transmitter output: check, pass through the channel, queue for the receiver
  initial begin
    wait (rst_n);
    for (int b = 0; b < NBLK; b++) begin
      blk_t ref_y;
      ref_y = embed(blocks[b], wms[b], 0);
      for (int n = 0; n < 64; n++) begin
        @(posedge clk iff tx_out_valid);
        check(int'(tx_out_index) == n, "pixel address");
        check(int'($signed(tx_out)) == ref_y[n],
              $sformatf("block %0d pixel %0d: %0d vs %0d", b, n, $signed(tx_out), ref_y[n]));
        sent[b][n] = int'($signed(tx_out)) + ((b % 2) ? int'($urandom_range(2)) - 1 : 0);
        if (n == 63) check(cycle + 2 - start_cycle[b] == 1344,
                           $sformatf("block latency %0d cycles", cycle + 2 - start_cycle[b]));
      end
      if (b % 2) n_noisy++;
      n_tx_blocks++;
    end
  end

  // receiver input: each received block as soon as it is complete
  initial begin
    for (int b = 0; b < NBLK; b++) begin
      wait (n_tx_blocks > b);
      @(negedge clk);
      while (!rx_ready) @(negedge clk);
      for (int n = 0; n < 64; n++) begin
        rx_in_valid = 1;
        rx_in = 16'(sent[b][n]);
        @(negedge clk);
      end
      rx_in_valid = 0;
    end
  end

  // receiver output
  initial begin
    wait (rst_n);
    for (int b = 0; b < NBLK; b++) begin
      int mu [4];
      int tm;
      logic [3:0] eb;
      @(posedge clk iff rx_wm_valid);
      correlate(sent[b], mu);
      eb = decide(mu, tm);
      check(rx_wm == eb, $sformatf("block %0d decoded %b vs reference %b", b, rx_wm, eb));
      check(int'($signed(rx_mean)) == tm, "mean correlation");
      for (int i = 0; i < 4; i++) if (rx_wm[i]) n_dec1++; else n_dec0++;
      if (rx_wm == wms[b]) n_recovered++;
    end
    $display("embed0=%0d embed1=%0d overlap=%0d dec0=%0d dec1=%0d noisy=%0d recovered=%0d/%0d",
             n_embed0, n_embed1, n_overlap, n_dec0, n_dec1, n_noisy, n_recovered, NBLK);
    check(n_embed0 > 0, "bit 0 embedded");
    check(n_embed1 > 0, "bit 1 embedded");
    check(n_overlap > 0, "forward/inverse overlap");
    check(n_dec0 > 0, "decoded 0");
    check(n_dec1 > 0, "decoded 1");
    check(n_noisy > 0, "noisy channel");
    check(n_recovered >= NBLK - 1, "watermark recovered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
