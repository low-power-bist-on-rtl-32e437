// lfsr - 8-stage Fibonacci linear feedback shift register, the plain test
// pattern generator of the BIST designs.
//
// The stages form one shift chain: every clock, stage k+1 takes the value of
// stage k and stage 1 takes the XOR of the tapped stages. The default taps
// are stage 1 and stage 8, as drawn for the 8-bit generator; with them the
// register walks a cycle of 63 non-zero states from the default seed. TAPS
// may be set to a primitive polynomial for a 255-state sequence.
//
// Interface: clk, rst (synchronous, active high, loads SEED) and the
// parallel pattern temp[7:0] (temp[0] = stage 1 ... temp[7] = stage 8).
// Timing: one new pattern per clock; temp equals SEED in the cycle after
// reset is released.
module lfsr
  import bist_pkg::*;
#(
  parameter int unsigned       W    = DATA_W,
  parameter logic [W-1:0]      TAPS = LFSR_TAPS,
  parameter logic [W-1:0]      SEED = LFSR_SEED
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] temp
);

  logic [W-1:0] state;
  logic         feedback;

  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (rst) state <= SEED;
    else     state <= {state[W-2:0], feedback};
  end

  assign temp = state;

endmodule
