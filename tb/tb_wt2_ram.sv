// tb_wt2_ram: random writes and asynchronous reads over all 96 words,
// including a read of a word in the cycle it is written.
module tb_wt2_ram;
  logic clk = 0, we = 0;
  logic [6:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [96];
  int checks = 0, failures = 0;

  wt2_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 96; a++) begin
      @(negedge clk);
      we = 1; waddr = 7'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 3000; t++) begin
      raddr = 7'($urandom_range(95));
      we    = 1'($urandom);
      waddr = (t % 5 == 0) ? raddr : 7'($urandom_range(95));
      wdata = 16'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin
        failures++;
        $display("FAIL: read %0d got %h expected %h", raddr, rdata, model[raddr]);
      end
      @(negedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
