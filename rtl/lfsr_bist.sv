// lfsr_bist - BIST of a 4-bit multiplier driven by the plain LFSR.
//
// The 8-bit LFSR pattern is split into two 4-bit operands (a = pattern[7:4],
// b = pattern[3:0]) that feed two copies of the multiplier. The comparator
// checks the two products every clock and raises test_pass when they agree
// and test_fail when they differ. Generator, two circuits under test and
// comparator are the structure of the multiplier BIST; the operand split and
// the registered flags are this design's choice.
//
// Interface: clk, rst (synchronous, active high), test_pass, test_fail.
// Timing: the flags of the pattern present in cycle t appear in cycle t+1;
// they are both 0 during reset and in the first cycle after it.
module lfsr_bist
  import bist_pkg::*;
(
  input  logic clk,
  input  logic rst,
  output logic test_pass,
  output logic test_fail
);

  logic [DATA_W-1:0] pattern;
  logic [DATA_W-1:0] prod_1, prod_2;

  lfsr u_lfsr (
    .clk  (clk),
    .rst  (rst),
    .temp (pattern)
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
