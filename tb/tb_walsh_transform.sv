// tb_walsh_transform: forward Walsh unit (divide by 64). Runs random and
// extreme 8-bit blocks, compares every coefficient and its index with the
// matrix definition, and checks the cycle budget: coefficients in cycles
// 641..704 after sample 0 in cycle 1, ready again in cycle 705. Two blocks
// are sent back to back (the second starts the cycle ready returns).
module tb_walsh_transform;
  import tb_ref_pkg::*;
  import ssw_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, ready_o, out_valid, out_last;
  word_t din = 0, dout;
  idx_t out_index;
  int checks = 0, failures = 0;
  int cycle = 0;

  walsh_transform dut (.*);

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
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NBLK = 6;
  blk_t blocks [NBLK];
  int start_cycle [NBLK];

  // driver: blocks back to back whenever ready
  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int n = 0; n < 64; n++)
        blocks[b][n] = (b == 0) ? 255 : (b == 1) ? ((n % 2) ? 255 : 0) : int'($urandom_range(255));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      while (!ready_o) @(negedge clk);
      for (int n = 0; n < 64; n++) begin
        in_valid = 1;
        din = word_t'(blocks[b][n]);
        if (n == 0) start_cycle[b] = cycle + 1;   // the coming edge
        @(negedge clk);
      end
      in_valid = 0;
    end
  end

  // monitor
  initial begin
    wait (rst_n);
    for (int b = 0; b < NBLK; b++) begin
      blk_t ref_c;
      ref_c = walsh(blocks[b], 6);
      for (int n = 0; n < 64; n++) begin
        @(posedge clk iff out_valid);
        check(int'(out_index) == n, $sformatf("block %0d index %0d vs %0d", b, out_index, n));
        check(int'(dout) == ref_c[n], $sformatf("block %0d coef %0d: %0d vs %0d", b, n, dout, ref_c[n]));
        check(out_last == (n == 63), "out_last");
        if (n == 0)  check(cycle + 1 - start_cycle[b] == 640, $sformatf("first coefficient after %0d cycles", cycle + 1 - start_cycle[b]));
        if (n == 63) check(cycle + 1 - start_cycle[b] == WT_CYCLES - 1, "last coefficient in cycle 704");
      end
      if (b > 0) check(start_cycle[b] - start_cycle[b-1] == WT_CYCLES, $sformatf("block interval %0d", start_cycle[b] - start_cycle[b-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
