// tb_pn_gen: checks both PN bits of a PN block against the recurrence and the
// signed sum for every watermark pair and both polarities.
module tb_pn_gen;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, restart = 0, step = 0;
  logic [1:0] wm = 0;
  logic [1:0] pn0, pn1;
  logic signed [2:0] sum0, sum1;
  int checks = 0, failures = 0;

  pn_gen #(.SEED_A(8'hF8), .SEED_B(8'h5A), .POLARITY(1'b0)) dut0 (
    .clk, .rst_n, .restart, .step, .wm, .pn_o(pn0), .sum_o(sum0));
  pn_gen #(.SEED_A(8'hCE), .SEED_B(8'hAC), .POLARITY(1'b1)) dut1 (
    .clk, .rst_n, .restart, .step, .wm, .pn_o(pn1), .sum_o(sum1));

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
    pat_t p [4];
    for (int i = 0; i < 4; i++) p[i] = pn_pattern(SEEDS[i]);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 4; w++) begin
      wm = 2'(w);
      restart = 1;
      @(negedge clk);
      restart = 0;
      for (int n = 0; n < 64; n++) begin
        int e0, e1;
        // PN1: +p for bit 0, -p for bit 1; PN2: +p for bit 1, -p for bit 0
        e0 = (p[0][n] ? (wm[0] ? -1 : 1) : 0) + (p[1][n] ? (wm[1] ? -1 : 1) : 0);
        e1 = (p[2][n] ? (wm[0] ? 1 : -1) : 0) + (p[3][n] ? (wm[1] ? 1 : -1) : 0);
        check(pn0 == {p[1][n], p[0][n]}, $sformatf("PN1 bits n=%0d", n));
        check(pn1 == {p[3][n], p[2][n]}, $sformatf("PN2 bits n=%0d", n));
        check(int'(sum0) == e0, $sformatf("PN1 sum w=%0d n=%0d: %0d vs %0d", w, n, sum0, e0));
        check(int'(sum1) == e1, $sformatf("PN2 sum w=%0d n=%0d: %0d vs %0d", w, n, sum1, e1));
        step = 1;
        @(negedge clk);
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
