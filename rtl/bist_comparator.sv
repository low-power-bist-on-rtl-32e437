// bist_comparator - output response analyser of the BISTs.
//
// It compares the responses of the two copies of the circuit under test.
// When a comparison is due (valid = 1) it raises test_pass if the responses
// are equal and test_fail otherwise; with valid = 0 both flags are 0. The
// flags are registered, so they show the comparison of the previous cycle.
// The equal/not-equal output follows the description; the valid
// qualification and the output register are this design's choice.
//
// Interface: clk, rst (synchronous, clears both flags), valid, resp_a,
// resp_b, test_pass, test_fail. Latency: one clock.
module bist_comparator #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         valid,
  input  logic [W-1:0] resp_a,
  input  logic [W-1:0] resp_b,
  output logic         test_pass,
  output logic         test_fail
);

  logic equal;
  assign equal = (resp_a == resp_b);

  always_ff @(posedge clk) begin
    if (rst) begin
      test_pass <= 1'b0;
      test_fail <= 1'b0;
    end else begin
      test_pass <= valid &  equal;
      test_fail <= valid & ~equal;
    end
  end

endmodule
