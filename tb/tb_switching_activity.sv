// tb_switching_activity - compares the switching activity of the plain LFSR
// and the low-power LFSR, the quantity behind the power comparison of the
// two generators.
//
// Both generators start from seed 8'h01 and run one full cycle of their
// LFSR (63 clocks with the default taps). The test counts the bit toggles
// between consecutive patterns at the generator outputs and at the product
// of the 4-bit multiplier they drive, and checks the counts against a
// reference computed here from the LFSR rule and the swap rule. It also
// checks that the low-power generator toggles fewer pattern bits than the
// plain one, and prints both counts.
module tb_switching_activity;
  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] pat_pl, pat_lp, state_lp, prod_pl, prod_lp;
  int checks = 0, failures = 0;

  lfsr    u_pl (.clk(clk), .rst(rst), .temp(pat_pl));
  lp_lfsr u_lp (.clk(clk), .rst(rst), .seed(8'h01), .pattern(pat_lp), .lfsr_state(state_lp));
  mult4   u_m_pl (.a(pat_pl[7:4]), .b(pat_pl[3:0]), .p(prod_pl));
  mult4   u_m_lp (.a(pat_lp[7:4]), .b(pat_lp[3:0]), .p(prod_lp));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] swap(input logic [7:0] s);
    return s[7] ? {s[7], s[5], s[6], s[3], s[4], s[1], s[2], s[0]} : s;
  endfunction

  function automatic logic [7:0] prod(input logic [7:0] p);
    return 8'(p[7:4] * p[3:0]);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tog_pl = 0, tog_lp = 0, ptog_pl = 0, ptog_lp = 0;
    int ref_pl = 0, ref_lp = 0, rref_pl = 0, rref_lp = 0;
    logic [7:0] last_pl, last_lp, lastp_pl, lastp_lp, s, s_next;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    last_pl = pat_pl; last_lp = pat_lp; lastp_pl = prod_pl; lastp_lp = prod_lp;
    s = 8'h01;
    for (int i = 1; i <= 63; i++) begin
      @(negedge clk);
      tog_pl  += $countones(pat_pl ^ last_pl);
      tog_lp  += $countones(pat_lp ^ last_lp);
      ptog_pl += $countones(prod_pl ^ lastp_pl);
      ptog_lp += $countones(prod_lp ^ lastp_lp);
      last_pl = pat_pl; last_lp = pat_lp; lastp_pl = prod_pl; lastp_lp = prod_lp;
      s_next  = {s[6:0], s[0] ^ s[7]};
      ref_pl  += $countones(s_next ^ s);
      ref_lp  += $countones(swap(s_next) ^ swap(s));
      rref_pl += $countones(prod(s_next) ^ prod(s));
      rref_lp += $countones(prod(swap(s_next)) ^ prod(swap(s)));
      s = s_next;
    end
    check(s == 8'h01 && pat_pl == 8'h01, "one full LFSR cycle");
    check(tog_pl == ref_pl && tog_lp == ref_lp, "pattern toggle counts");
    check(ptog_pl == rref_pl && ptog_lp == rref_lp, "product toggle counts");
    check(tog_lp < tog_pl, "LP-LFSR toggles fewer pattern bits");
    $display("pattern toggles per cycle of 63: LFSR=%0d LP-LFSR=%0d", tog_pl, tog_lp);
    $display("multiplier output toggles:       LFSR=%0d LP-LFSR=%0d", ptog_pl, ptog_lp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
