// dfa_matcher - deterministic finite automaton that finds the strings
// "HIS", "HERS" and "SHE" in a stream of characters, one character per clock.
//
// Each state stands for the longest tail of the input seen so far that is
// also the start of one of the strings (S0 = none, S1 = S, S2 = SH,
// S3 = SHE, S4 = H, S5 = HE, S6 = HER, S7 = HERS, S8 = HI, S9 = HIS). A
// character that continues the current string moves to the next state of
// that string; any other character follows a failure edge to the state of
// the longest tail that still begins a string, which is S1 after "S", S4
// after "H" and S0 when no string begins that way. S3, S7 and S9 are the
// end states: reaching one reports a match. Overlapping matches are found,
// e.g. "SHERS" reports SHE and then HERS. State names, strings and end
// states follow the automaton described for the memory interfacing logic;
// the failure edges are filled in by the longest-tail rule, and the
// character code (upper-case ASCII, other characters treated alike) is this
// design's choice.
//
// Interface: clk, rst (synchronous, active high, to S0), ch_valid, ch[7:0],
// state, match, match_id. Timing: the state after a character is visible
// the cycle after it is presented; match and match_id follow the state
// directly (Moore outputs).
module dfa_matcher
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ch_valid,
  input  logic [7:0] ch,
  output dfa_state_e state,
  output logic       match,
  output match_e     match_id
);

  localparam logic [7:0] CH_S = 8'h53;
  localparam logic [7:0] CH_H = 8'h48;
  localparam logic [7:0] CH_E = 8'h45;
  localparam logic [7:0] CH_R = 8'h52;
  localparam logic [7:0] CH_I = 8'h49;

  dfa_state_e state_next;

  always_comb begin
    // Failure edges shared by every state: a string start or the root.
    if      (ch == CH_S) state_next = DFA_S1;
    else if (ch == CH_H) state_next = DFA_S4;
    else                 state_next = DFA_S0;
    // Forward edges and the failure edges that land inside a string.
    unique case (state)
      DFA_S1: if (ch == CH_H) state_next = DFA_S2;
      DFA_S2: if (ch == CH_E) state_next = DFA_S3;
              else if (ch == CH_I) state_next = DFA_S8;
      DFA_S3: if (ch == CH_R) state_next = DFA_S6;
      DFA_S4: if (ch == CH_E) state_next = DFA_S5;
              else if (ch == CH_I) state_next = DFA_S8;
      DFA_S5: if (ch == CH_R) state_next = DFA_S6;
      DFA_S6: if (ch == CH_S) state_next = DFA_S7;
      DFA_S7: if (ch == CH_H) state_next = DFA_S2;
      DFA_S8: if (ch == CH_S) state_next = DFA_S9;
      DFA_S9: if (ch == CH_H) state_next = DFA_S2;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)           state <= DFA_S0;
    else if (ch_valid) state <= state_next;
  end

  always_comb begin
    unique case (state)
      DFA_S3:  match_id = MATCH_SHE;
      DFA_S7:  match_id = MATCH_HERS;
      DFA_S9:  match_id = MATCH_HIS;
      default: match_id = MATCH_NONE;
    endcase
  end

  assign match = (match_id != MATCH_NONE);

endmodule
