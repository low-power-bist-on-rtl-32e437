// Shared constants and types of the low-power BIST designs.
//
// The 8-bit pattern width and the 64-word by 8-bit memory follow the design
// description; the FSM state encodings are this implementation's own choice.
package bist_pkg;

  // Width of every test pattern and memory word.
  localparam int unsigned DATA_W = 8;
  // Address width of the 64-location memories.
  localparam int unsigned ADDR_W = 6;

  // Reset value of the plain LFSR; any non-zero value is a legal seed.
  localparam logic [DATA_W-1:0] LFSR_SEED = 8'h01;
  // Feedback taps of the 8-stage register: bit i set means stage i+1 feeds
  // the feedback gate. Stage 1 and stage 8 are tapped.
  localparam logic [DATA_W-1:0] LFSR_TAPS = 8'b1000_0001;

  // States of the memory read/write controller.
  typedef enum logic [2:0] {
    RW_IDLE = 3'd0,
    RW_R1   = 3'd1,
    RW_R2   = 3'd2,
    RW_W1   = 3'd3,
    RW_W2   = 3'd4
  } rw_state_e;

  // States of the string-matching automaton. The comment gives the input
  // suffix that each state stands for.
  typedef enum logic [3:0] {
    DFA_S0 = 4'd0,   // (nothing)
    DFA_S1 = 4'd1,   // S
    DFA_S2 = 4'd2,   // SH
    DFA_S3 = 4'd3,   // SHE   - end state
    DFA_S4 = 4'd4,   // H
    DFA_S5 = 4'd5,   // HE
    DFA_S6 = 4'd6,   // HER
    DFA_S7 = 4'd7,   // HERS  - end state
    DFA_S8 = 4'd8,   // HI
    DFA_S9 = 4'd9    // HIS   - end state
  } dfa_state_e;

  // Which string an end state reports.
  typedef enum logic [1:0] {
    MATCH_NONE = 2'd0,
    MATCH_SHE  = 2'd1,
    MATCH_HERS = 2'd2,
    MATCH_HIS  = 2'd3
  } match_e;

endpackage
