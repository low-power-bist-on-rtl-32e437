// tb_lp_lfsr - self-checking test of the low-power (bit-swapping) LFSR.
//
// For several seeds, including zero, a reference LFSR and the swap rule
// (pairs (6,5), (4,3), (2,1) exchanged when stage 8 is 1) predict the state
// and the pattern of 200 clocks. The test also checks that both swapped and
// unswapped patterns occur.
module tb_lp_lfsr;
  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] seed, pattern, lfsr_state;
  int checks = 0, failures = 0;
  int swapped = 0, plain = 0;

  lp_lfsr dut (.clk(clk), .rst(rst), .seed(seed), .pattern(pattern), .lfsr_state(lfsr_state));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] expect_pattern(input logic [7:0] s);
    if (!s[7]) return s;
    return {s[7], s[5], s[6], s[3], s[4], s[1], s[2], s[0]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seeds [5] = '{8'h01, 8'hA5, 8'h00, 8'hFF, 8'h3C};
    logic [7:0] ref_s;
    foreach (seeds[k]) begin
      @(negedge clk);
      rst  = 1'b1;
      seed = seeds[k];
      @(negedge clk);
      rst  = 1'b0;
      seed = ~seeds[k];   // the seed only matters during reset
      ref_s = (seeds[k] == 8'h00) ? 8'h01 : seeds[k];
      for (int i = 0; i < 200; i++) begin
        check(lfsr_state == ref_s, $sformatf("seed %02h step %0d state %02h want %02h", seeds[k], i, lfsr_state, ref_s));
        check(pattern == expect_pattern(ref_s), $sformatf("seed %02h step %0d pattern %02h want %02h", seeds[k], i, pattern, expect_pattern(ref_s)));
        if (ref_s[7] && pattern != ref_s) swapped++;
        if (!ref_s[7]) plain++;
        @(negedge clk);
        ref_s = {ref_s[6:0], ref_s[0] ^ ref_s[7]};
      end
    end
    check(swapped > 0, "no swapped pattern seen");
    check(plain > 0, "no plain pattern seen");
    $display("swapped=%0d plain=%0d", swapped, plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
