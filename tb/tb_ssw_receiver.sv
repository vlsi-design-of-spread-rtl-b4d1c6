// tb_ssw_receiver: decodes watermarked blocks made by the reference embedder,
// some with a little added noise; checks the four bits and the mean against
// the reference correlation and decision, that smooth blocks give back the
// embedded watermark, and the timing: result in cycle 705 after word 0 in
// cycle 1.
module tb_ssw_receiver;
  import tb_ref_pkg::*;
  import ssw_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, ready_o, wm_valid;
  word_t din = 0, mean_o;
  logic [NBITS-1:0] wm_o;
  int checks = 0, failures = 0;
  int cycle = 0;

  ssw_receiver dut (.*);

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

  localparam int NBLK = 8;
  blk_t rx [NBLK];
  logic [3:0] wms [NBLK];
  int start_cycle [NBLK];

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      blk_t img;
      wms[b] = 4'(1 + $urandom_range(13));   // neither 0000 nor 1111
      img = smooth_block(int'($urandom_range(200)), int'($urandom_range(6)) - 3, int'($urandom_range(6)) - 3, 1);
      rx[b] = embed(img, wms[b], 0);
      if (b >= 4) for (int n = 0; n < 64; n++) rx[b][n] += int'($urandom_range(2)) - 1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      while (!ready_o) @(negedge clk);
      for (int n = 0; n < 64; n++) begin
        in_valid = 1;
        din = word_t'(rx[b][n]);
        if (n == 0) start_cycle[b] = cycle + 1;
        @(negedge clk);
      end
      in_valid = 0;
    end
  end

  initial begin
    int recovered;
    recovered = 0;
    wait (rst_n);
    for (int b = 0; b < NBLK; b++) begin
      int mu [4];
      int tm;
      logic [3:0] eb;
      correlate(rx[b], mu);
      eb = decide(mu, tm);
      @(posedge clk iff wm_valid);
      check(cycle + 1 - start_cycle[b] == 704, $sformatf("result in cycle %0d", cycle + 2 - start_cycle[b]));
      check(wm_o == eb, $sformatf("block %0d bits %b vs %b", b, wm_o, eb));
      check(int'(mean_o) == tm, $sformatf("block %0d mean %0d vs %0d", b, mean_o, tm));
      if (wm_o == wms[b]) recovered++;
    end
    check(recovered >= NBLK - 1, $sformatf("watermark recovered in %0d of %0d blocks", recovered, NBLK));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
