// tb_mean_threshold: random and hand-picked correlation sets, including ties
// with the mean (decoded as 0) and negative values; checks the mean and the
// four decided bits.
module tb_mean_threshold;
  import tb_ref_pkg::*;
  import ssw_pkg::*;

  word_t corr [NBITS];
  word_t mean_o;
  logic [NBITS-1:0] bits_o;
  int checks = 0, failures = 0;

  mean_threshold dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int mu [4];
      int tm;
      logic [3:0] eb;
      for (int i = 0; i < 4; i++) begin
        case (t)
          0: mu[i] = 100;                          // all equal: every bit 0
          1: mu[i] = (i == 2) ? 40 : 20;          // one above
          2: mu[i] = -10 * i;                      // negative
          default: mu[i] = (t % 3 == 0) ? int'($urandom_range(8000)) - 4000
                                        : int'($urandom_range(600)) - 300;
        endcase
        corr[i] = word_t'(mu[i]);
      end
      eb = decide(mu, tm);
      #1;
      checks++;
      if (int'(mean_o) != tm || bits_o != eb) begin
        failures++;
        $display("FAIL: mu %0d %0d %0d %0d: mean %0d bits %b, expected %0d %b",
                 mu[0], mu[1], mu[2], mu[3], mean_o, bits_o, tm, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
