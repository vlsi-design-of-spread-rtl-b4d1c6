// tb_code_gen: checks the spreading code c[n] = k * sum_i s_i P_i[n] for all
// 16 watermarks, with k = 1 (default) and k = 4 (K_SHIFT = 2), and the raw
// PN bits.
module tb_code_gen;
  import tb_ref_pkg::*;
  import ssw_pkg::word_t;

  logic clk = 0, rst_n = 0, restart = 0, step = 0;
  logic [3:0] wm = 0, pn_a, pn_b;
  word_t code_a, code_b;
  int checks = 0, failures = 0;

  code_gen dut_a (.clk, .rst_n, .restart, .step, .wm, .code_o(code_a), .pn_o(pn_a));
  code_gen #(.K_SHIFT(2)) dut_b (.clk, .rst_n, .restart, .step, .wm, .code_o(code_b), .pn_o(pn_b));

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
    for (int w = 0; w < 16; w++) begin
      wm = 4'(w);
      restart = 1;
      @(negedge clk);
      restart = 0;
      for (int n = 0; n < 64; n++) begin
        check(int'(code_a) == code_elem(wm, n, 0),
              $sformatf("k=1 wm=%0d n=%0d: %0d vs %0d", w, n, code_a, code_elem(wm, n, 0)));
        check(int'(code_b) == code_elem(wm, n, 2),
              $sformatf("k=4 wm=%0d n=%0d: %0d vs %0d", w, n, code_b, code_elem(wm, n, 2)));
        check(pn_a == {p[3][n], p[2][n], p[1][n], p[0][n]}, "raw PN bits");
        step = 1;
        @(negedge clk);
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
