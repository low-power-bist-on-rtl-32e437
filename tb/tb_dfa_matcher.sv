// tb_dfa_matcher - self-checking test of the HIS / HERS / SHE automaton.
//
// Random text over the letters S, H, E, R, I and X (X stands for any other
// character), with gaps in ch_valid, is fed one character per clock. The
// reference keeps the text seen so far and works out, from the strings
// alone, the longest tail that begins one of the strings (that is the
// expected state) and whether the text ends with a whole string (the
// expected match). A few fixed texts ("SHERS", "HIS", "HHERS", "SHIS")
// come first. Each string must be matched at least once.
module tb_dfa_matcher;
  import bist_pkg::*;
  logic       clk = 1'b0;
  logic       rst, ch_valid;
  logic [7:0] ch;
  dfa_state_e state;
  logic       match;
  match_e     match_id;
  int checks = 0, failures = 0;
  int n_she = 0, n_hers = 0, n_his = 0;

  dfa_matcher dut (.clk(clk), .rst(rst), .ch_valid(ch_valid), .ch(ch),
                   .state(state), .match(match), .match_id(match_id));

  always #5 clk = ~clk;

  string prefixes [10] = '{"", "S", "SH", "SHE", "H", "HE", "HER", "HERS", "HI", "HIS"};
  string text = "";

  function automatic int expect_state(string t);
    int best = 0;
    for (int s = 1; s < 10; s++) begin
      int n = prefixes[s].len();
      if (n <= t.len() && n > prefixes[best].len() && t.substr(t.len() - n, t.len() - 1) == prefixes[s])
        best = s;
    end
    return best;
  endfunction

  function automatic match_e expect_match(string t);
    if (t.len() >= 3 && t.substr(t.len() - 3, t.len() - 1) == "SHE")  return MATCH_SHE;
    if (t.len() >= 4 && t.substr(t.len() - 4, t.len() - 1) == "HERS") return MATCH_HERS;
    if (t.len() >= 3 && t.substr(t.len() - 3, t.len() - 1) == "HIS")  return MATCH_HIS;
    return MATCH_NONE;
  endfunction

  task automatic feed(input byte c, input bit v);
    ch = c; ch_valid = v;
    if (v) begin
      text = {text, string'(c)};
      if (text.len() > 8) text = text.substr(text.len() - 8, text.len() - 1);
    end
    @(negedge clk);
    checks++;
    if (int'(state) != expect_state(text) || match_id != expect_match(text) ||
        match != (expect_match(text) != MATCH_NONE)) begin
      failures++;
      $display("FAIL: text '%s' state S%0d want S%0d, match %0d want %0d",
               text, state, expect_state(text), match_id, expect_match(text));
    end
    case (match_id)
      MATCH_SHE:  n_she  += int'(v);
      MATCH_HERS: n_hers += int'(v);
      MATCH_HIS:  n_his  += int'(v);
      default: ;
    endcase
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte letters [6] = '{"S", "H", "E", "R", "I", "X"};
    string fixed = "SHERSXHISXHHERSXSHIS";
    rst = 1'b1; ch_valid = 1'b0; ch = 8'h00;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    checks++;
    if (state != DFA_S0 || match) begin failures++; $display("FAIL: reset state"); end
    for (int i = 0; i < fixed.len(); i++) feed(fixed[i], 1'b1);
    for (int i = 0; i < 5000; i++) feed(letters[$urandom_range(0, 5)], $urandom_range(0, 7) != 0);
    checks++;
    if (n_she == 0 || n_hers == 0 || n_his == 0) begin
      failures++;
      $display("FAIL: not every string matched");
    end
    $display("SHE=%0d HERS=%0d HIS=%0d", n_she, n_hers, n_his);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
