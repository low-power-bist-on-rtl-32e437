// lplfsr_bist - BIST of a 4-bit multiplier driven by the low-power LFSR.
//
// Same structure as lfsr_bist, with the bit-swapping LP-LFSR as the pattern
// generator. Its 8-bit pattern gives the operands a = pattern[7:4] and
// b = pattern[3:0] of two multiplier copies, whose products the comparator
// checks every clock.
//
// Interface: seed[7:0] (loaded into the generator during reset), clk, rst
// (synchronous, active high), test_pass, test_fail.
// Timing: the flags of the pattern present in cycle t appear in cycle t+1.
module lplfsr_bist
  import bist_pkg::*;
(
  input  logic [DATA_W-1:0] seed,
  input  logic              clk,
  input  logic              rst,
  output logic              test_pass,
  output logic              test_fail
);

  logic [DATA_W-1:0] pattern;
  logic [DATA_W-1:0] lfsr_state;
  logic [DATA_W-1:0] prod_1, prod_2;

  lp_lfsr u_lplfsr (
    .clk        (clk),
    .rst        (rst),
    .seed       (seed),
    .pattern    (pattern),
    .lfsr_state (lfsr_state)
  );

  mult4 u_cut1 (.a(pattern[7:4]), .b(pattern[3:0]), .p(prod_1));
  mult4 u_cut2 (.a(pattern[7:4]), .b(pattern[3:0]), .p(prod_2));

  bist_comparator #(.W(DATA_W)) u_ora (
    .clk       (clk),
    .rst       (rst),
    .valid     (1'b1),
    .resp_a    (prod_1),
    .resp_b    (prod_2),
    .test_pass (test_pass),
    .test_fail (test_fail)
  );

endmodule
