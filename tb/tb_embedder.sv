// tb_embedder: random coefficients and codes, enabled and disabled, with
// 16-bit wrap-around.
module tb_embedder;
  import tb_ref_pkg::*;
  import ssw_pkg::word_t;

  logic en;
  word_t coef, code, coef_wm;
  int checks = 0, failures = 0;

  embedder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int exp;
      en   = 1'($urandom);
      coef = word_t'($urandom);
      code = (t % 2) ? word_t'($urandom) : word_t'(int'($urandom_range(8)) - 4);
      #1;
      exp = en ? wrap16(int'(coef) + int'(code)) : int'(coef);
      checks++;
      if (int'(coef_wm) != exp) begin
        failures++;
        $display("FAIL: en=%0d %0d + %0d -> %0d, expected %0d", en, coef, code, coef_wm, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
