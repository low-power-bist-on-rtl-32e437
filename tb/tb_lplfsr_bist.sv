// tb_lplfsr_bist - self-checking test of the multiplier BIST with the
// low-power LFSR and a random non-zero seed. Both copies of the multiplier
// are fault free, so after reset the
// test must report test_pass, and never test_fail, in every cycle from the
// first cycle after reset onwards (one clock of comparator latency).
// Two full LFSR cycles (126 patterns) are covered, then a reset in the
// middle of the run must clear the flags.
module tb_lplfsr_bist;
  logic clk = 1'b0;
  logic rst;
  logic [7:0] seed;
  logic test_pass, test_fail;
  int checks = 0, failures = 0, n_pass = 0;

  lplfsr_bist dut (.seed(seed), .clk(clk), .rst(rst), .test_pass(test_pass), .test_fail(test_fail));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seed = 8'($urandom_range(1, 255));
    rst = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (test_pass || test_fail) begin failures++; $display("FAIL: flags during reset"); end
    rst = 1'b0;
    for (int i = 1; i <= 126; i++) begin
      @(negedge clk);
      checks++;
      if (!test_pass || test_fail) begin
        failures++;
        $display("FAIL: cycle %0d pass=%b fail=%b", i, test_pass, test_fail);
      end
      n_pass += int'(test_pass);
    end
    seed = 8'($urandom_range(1, 255));
    rst = 1'b1;
    @(negedge clk);
    checks++;
    if (test_pass || test_fail) begin failures++; $display("FAIL: flags after second reset"); end
    $display("passes=%0d", n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
