// lp_lfsr - low-power LFSR: an 8-stage LFSR followed by a row of 2:1
// multiplexers that swap neighbouring bits of the pattern.
//
// The select line of all multiplexers is the last stage of the LFSR (stage 8,
// state[7]). When it is 1 the bit pairs (6,5), (4,3) and (2,1) of the pattern
// are swapped; when it is 0 the pattern is the LFSR state unchanged. Stage 8
// (the select bit) and stage 1 pass straight through, so the select value
// can be recovered from the pattern. The swapped patterns lie between the
// plain LFSR patterns and spread the switching over the test. Which pairs are
// swapped is this design's choice; the select by the last bit follows the
// description of the generator.
//
// Interface: clk, rst (synchronous, active high), seed[7:0] loaded into the
// LFSR on reset (a zero seed is replaced by 1, since an all-zero XOR LFSR
// never leaves zero), pattern[7:0] out, and lfsr_state[7:0] for observation.
// Timing: one pattern per clock, as the plain LFSR.
module lp_lfsr
  import bist_pkg::*;
#(
  parameter int unsigned  W    = DATA_W,
  parameter logic [W-1:0] TAPS = LFSR_TAPS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] seed,
  output logic [W-1:0] pattern,
  output logic [W-1:0] lfsr_state
);

  logic [W-1:0] state;
  logic         sel;

  always_ff @(posedge clk) begin
    if (rst) state <= (seed == '0) ? W'(1) : seed;
    else     state <= {state[W-2:0], ^(state & TAPS)};
  end

  assign sel = state[W-1];

  // Swap multiplexers on pairs (2k+2, 2k+1); the end bits pass through.
  always_comb begin
    pattern = state;
    if (sel) begin
      for (int k = 1; k + 1 < W; k += 2) begin
        pattern[k]   = state[k+1];
        pattern[k+1] = state[k];
      end
    end
  end

  assign lfsr_state = state;

endmodule
