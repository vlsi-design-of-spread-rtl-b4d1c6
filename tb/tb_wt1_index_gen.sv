// tb_wt1_index_gen: the (I, IP) sequence against the loop nest of the fast
// transform, the last-butterfly flag, stalls and restart.
module tb_wt1_index_gen;
  logic clk = 0, rst_n = 0, restart = 0, advance = 0;
  logic [5:0] i_o, ip_o;
  logic last_o;
  int checks = 0, failures = 0;

  wt1_index_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      int cnt;
      cnt = 0;
      for (int l = 0; l < 6; l++) begin
        int le1;
        le1 = 1 << l;
        for (int j = 0; j < le1; j++) begin
          for (int i = j; i < 64; i += 2 * le1) begin
            check(int'(i_o) == i && int'(ip_o) == i + le1,
                  $sformatf("pass %0d l=%0d: got (%0d,%0d) expected (%0d,%0d)", pass, l, i_o, ip_o, i, i + le1));
            check(last_o == (l == 5 && j == 31), "last flag");
            cnt++;
            if ($urandom_range(3) == 0) @(negedge clk);   // stall
            advance = 1;
            @(negedge clk);
            advance = 0;
          end
        end
      end
      check(cnt == 192, "192 butterflies");
      // mid-sequence restart
      repeat (5) begin
        advance = 1;
        @(negedge clk);
      end
      advance = 0;
      restart = 1;
      @(negedge clk);
      restart = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
