// tb_bist_comparator - self-checking test of the response comparator.
//
// Random response pairs, about half of them equal, with random valid; the
// flags must show equal / not equal of the previous cycle and be 0 when
// valid was 0 or during reset.
module tb_bist_comparator;
  logic       clk = 1'b0;
  logic       rst, valid;
  logic [7:0] ra, rb;
  logic       test_pass, test_fail;
  int checks = 0, failures = 0;
  int n_pass = 0, n_fail = 0;

  bist_comparator #(.W(8)) dut (.clk(clk), .rst(rst), .valid(valid), .resp_a(ra), .resp_b(rb),
                                .test_pass(test_pass), .test_fail(test_fail));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_p, exp_f;
    rst = 1'b1; valid = 1'b1; ra = 8'h12; rb = 8'h12;
    repeat (2) @(negedge clk);
    checks++;
    if (test_pass || test_fail) begin failures++; $display("FAIL: flags during reset"); end
    rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      valid = ($urandom_range(0, 3) != 0);
      ra    = 8'($urandom);
      rb    = ($urandom_range(0, 1) != 0) ? ra : 8'($urandom);
      exp_p = valid && (ra == rb);
      exp_f = valid && (ra != rb);
      @(negedge clk);
      checks++;
      if (test_pass !== exp_p || test_fail !== exp_f) begin
        failures++;
        $display("FAIL: step %0d pass=%b fail=%b want %b %b", i, test_pass, test_fail, exp_p, exp_f);
      end
      n_pass += int'(test_pass);
      n_fail += int'(test_fail);
    end
    checks++;
    if (n_pass == 0 || n_fail == 0) begin failures++; $display("FAIL: both outcomes not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
