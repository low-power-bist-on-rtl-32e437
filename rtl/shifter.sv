// shifter - 8-bit scan shifter of the memory interface BIST.
//
// With shift = 1 the register moves one place towards the MSB every clock,
// taking si into bit 0; so is the MSB, so shifters chain serially. With
// shift = 0 it captures the parallel input d. q is the parallel output.
// The ports (d, Shift, Si, q, So, clk) are those of the shifter blocks; the
// shift direction and the capture on shift = 0 are this design's choice.
//
// Interface: clk, rst (synchronous, active high, clears q), shift, si,
// d[7:0], q[7:0], so. Timing: one shift or capture per clock.
module shifter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift,
  input  logic         si,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         so
);

  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (shift) q <= {q[W-2:0], si};
    else            q <= d;
  end

  assign so = q[W-1];

endmodule
