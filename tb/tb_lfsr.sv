// tb_lfsr - self-checking test of the 8-stage LFSR.
//
// A reference register, written here from the shift-and-feedback rule,
// predicts every state. The test checks the reset value, 300 consecutive
// states, that no state is zero and that the default taps give a cycle of
// exactly 63 clocks. A watchdog ends the run if it hangs.
module tb_lfsr;
  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] temp;
  int checks = 0, failures = 0;

  lfsr dut (.clk(clk), .rst(rst), .temp(temp));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ref_s;
    int period;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    ref_s = 8'h01;
    check(temp == ref_s, "reset value");
    period = 0;
    for (int i = 1; i <= 300; i++) begin
      @(negedge clk);
      ref_s = {ref_s[6:0], ref_s[0] ^ ref_s[7]};
      check(temp == ref_s, $sformatf("state %0d: got %02h want %02h", i, temp, ref_s));
      check(temp != 8'h00, "zero state");
      if (period == 0 && temp == 8'h01) period = i;
    end
    check(period == 63, $sformatf("period %0d, want 63", period));
    // A second reset restarts the sequence.
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check(temp == 8'h01, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
