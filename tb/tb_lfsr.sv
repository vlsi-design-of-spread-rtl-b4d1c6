// tb_lfsr: checks the LFSR output against the polynomial's linear recurrence,
// the seed reload on restart, hold without step, and the 255-step period.
module tb_lfsr;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, restart = 0, step = 0, bit_o;
  int checks = 0, failures = 0;

  lfsr #(.W(8), .TAPS(8'h1D), .SEED(8'h5A)) dut (.*);

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
    pat_t p;
    bit first [300];
    p = pn_pattern(8'h5A);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int n = 0; n < 64; n++) begin
        @(negedge clk);
        check(bit_o == p[n], $sformatf("pass %0d element %0d", pass, n));
        if (n % 13 == 5) begin
          // one cycle without step must hold the element
          @(negedge clk);
          check(bit_o == p[n], $sformatf("hold at element %0d", n));
        end
        step = 1;
        @(negedge clk);
        step = 0;
      end
      restart = 1;
      @(negedge clk);
      restart = 0;
      check(bit_o == p[0], "restart reloads the seed");
    end
    // period 255: sample 300 bits, compare with a 255 shift
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      first[n] = bit_o;
      step = 1;
    end
    @(negedge clk) step = 0;
    begin
      int mism = 0;
      for (int n = 0; n < 45; n++) if (first[n] != first[n+255]) mism++;
      check(mism == 0, "period of 255");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
