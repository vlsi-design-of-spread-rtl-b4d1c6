// tb_bitrev_counter: counting, enable, clear, wrap of the 8-bit counter and
// the bit-reversed low 6 bits.
module tb_bitrev_counter;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [7:0] count_o;
  logic [5:0] rev_o;
  int checks = 0, failures = 0;
  int model = 0;

  bitrev_counter dut (.*);

  always #5 clk = ~clk;

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
    for (int t = 0; t < 1500; t++) begin
      checks++;
      if (count_o != 8'(model) || int'(rev_o) != rev6(model % 64)) begin
        failures++;
        $display("FAIL: t=%0d count %0d rev %0d, expected %0d %0d", t, count_o, rev_o, model, rev6(model % 64));
      end
      clear = ($urandom_range(99) == 0);
      en    = ($urandom_range(9) != 0);
      @(negedge clk);
      if (clear)   model = 0;
      else if (en) model = (model + 1) % 256;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
