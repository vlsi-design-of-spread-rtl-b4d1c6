// tb_correlator: random coefficient blocks (small and near-full-scale values)
// through the four accumulators; checks Q, R, S, T against the pattern sums,
// the done pulse one cycle after the last coefficient, the hold of the
// results, the clearing by start, and gaps in b_valid.
module tb_correlator;
  import tb_ref_pkg::*;
  import ssw_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, b_valid = 0, b_last = 0, done_o;
  word_t b_in = 0, a_in = 0;
  word_t corr_o [NBITS];
  int checks = 0, failures = 0;

  correlator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pat_t p [4];
    for (int i = 0; i < 4; i++) p[i] = pn_pattern(SEEDS[i]);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 8; blk++) begin
      int x [64];
      int exp [4];
      for (int n = 0; n < 64; n++)
        x[n] = (blk % 2) ? int'($urandom_range(2000)) - 1000 : int'($urandom_range(510)) - 255;
      for (int i = 0; i < 4; i++) begin
        exp[i] = 0;
        for (int n = 0; n < 64; n++) if (p[i][n]) exp[i] = wrap16(exp[i] + x[n]);
      end
      start = 1;
      @(negedge clk);
      start = 0;
      for (int n = 0; n < 64; n++) begin
        if (blk >= 4 && $urandom_range(3) == 0) begin
          b_valid = 0;
          b_in = 16'h7fff;        // ignored while b_valid is low
          @(negedge clk);
        end
        b_valid = 1;
        b_in = word_t'(x[n]);
        b_last = (n == 63);
        @(negedge clk);
      end
      b_valid = 0;
      b_last = 0;
      check(done_o, "done one cycle after the last coefficient");
      for (int i = 0; i < 4; i++)
        check(int'(corr_o[i]) == exp[i], $sformatf("block %0d corr %0d: %0d vs %0d", blk, i, corr_o[i], exp[i]));
      @(negedge clk);
      check(!done_o, "done is a single pulse");
      for (int i = 0; i < 4; i++) check(int'(corr_o[i]) == exp[i], "results hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
