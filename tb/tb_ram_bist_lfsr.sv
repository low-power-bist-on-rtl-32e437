// tb_ram_bist_lfsr - self-checking test of the RAM BIST with the plain
// LFSR. With two fault-free RAMs every comparison must pass: test_pass
// must be 1 exactly in the 64 cycles that carry a compared read word
// (cycles 66..129 of each 128-cycle round after reset, counting the first
// clock after reset as cycle 1) and test_fail must never be 1. Three
// rounds are run.
module tb_ram_bist_lfsr;
  logic clk = 1'b0;
  logic rst;
  logic test_pass, test_fail;
  int checks = 0, failures = 0, n_pass = 0;

  ram_bist_lfsr dut (.clk(clk), .rst(rst), .test_pass(test_pass), .test_fail(test_fail));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 3 * 128 + 2; k++) begin
      // A read issued in cycle j (64 <= j mod 128 < 128) is flagged in j+2.
      exp = (k >= 66) && (((k - 2) % 128) >= 64);
      checks++;
      if (test_pass != exp || test_fail) begin
        failures++;
        $display("FAIL: cycle %0d pass=%b fail=%b want pass=%b", k, test_pass, test_fail, exp);
      end
      n_pass += int'(test_pass);
      @(negedge clk);
    end
    checks++;
    if (n_pass != 3 * 64) begin failures++; $display("FAIL: %0d passes, want %0d", n_pass, 3 * 64); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
