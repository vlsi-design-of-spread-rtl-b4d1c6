// tb_ssw_transmitter: embeds random watermarks into smooth and random 8x8
// blocks sent back to back; compares every watermarked pixel and its address
// with the reference (forward transform, add the code, inverse transform) and
// checks the timing: 1344 cycles from the first pixel in to the last pixel
// out, one block every 704 cycles.
module tb_ssw_transmitter;
  import tb_ref_pkg::*;
  import ssw_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, ready_o, out_valid, out_last;
  word_t pixel = 0, out_pixel;
  logic [NBITS-1:0] wm = 0;
  idx_t out_index;
  int checks = 0, failures = 0;
  int cycle = 0;

  ssw_transmitter dut (.*);

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
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NBLK = 5;
  blk_t blocks [NBLK];
  logic [3:0] wms [NBLK];
  int start_cycle [NBLK];

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      wms[b] = 4'($urandom);
      if (b % 2) for (int n = 0; n < 64; n++) blocks[b][n] = int'($urandom_range(255));
      else blocks[b] = smooth_block(int'($urandom_range(200)), int'($urandom_range(8)) - 4, int'($urandom_range(8)) - 4, 1);
    end
    wms[0] = 4'b0011;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      while (!ready_o) @(negedge clk);
      for (int n = 0; n < 64; n++) begin
        in_valid = 1;
        pixel = word_t'(blocks[b][n]);
        wm = (n == 0) ? wms[b] : 4'($urandom);   // only sampled with pixel 0
        if (n == 0) start_cycle[b] = cycle + 1;
        @(negedge clk);
      end
      in_valid = 0;
    end
  end

  initial begin
    wait (rst_n);
    for (int b = 0; b < NBLK; b++) begin
      blk_t ref_y;
      ref_y = embed(blocks[b], wms[b], 0);
      for (int n = 0; n < 64; n++) begin
        @(posedge clk iff out_valid);
        check(int'(out_index) == n, "pixel address");
        check(int'(out_pixel) == ref_y[n], $sformatf("block %0d pixel %0d: %0d vs %0d", b, n, out_pixel, ref_y[n]));
        check(out_last == (n == 63), "out_last");
        if (n == 0)  check(cycle + 1 - start_cycle[b] == 1280, $sformatf("first pixel out in cycle %0d", cycle + 2 - start_cycle[b]));
        if (n == 63) check(cycle + 2 - start_cycle[b] == 1344, $sformatf("last pixel out in cycle %0d", cycle + 2 - start_cycle[b]));
      end
      if (b > 0) check(start_cycle[b] - start_cycle[b-1] == 704, "one block every 704 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
