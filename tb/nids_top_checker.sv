// nids_top_checker: stimulus and reference model for the complete signature
// match circuit with Q characters per cycle.
//
// It feeds WORDS words (with random idle cycles) of a text made of rule
// characters, bytes found in no rule, random bytes and inserted copies of
// the rules (sometimes with one character changed), and compares the alarm
// outputs with a direct search of the text for every rule. Rule r is
// expected in alarm_vec one cycle after word j when an occurrence ends at
// one of the Q positions that end D_r = Q*ceil(len_r/Q) - len_r characters
// before the end of word j; alarm_id must be the lowest such rule.
//
// It also counts how often each mechanism occurred and fails a run in which
// one never did: a match of each rule, a match found by each branch, an
// idle cycle, bytes mapped to symbol 0 by every group encoder, and two rules
// reported in the same cycle.
module nids_top_checker
  import nids_pkg::*;
#(
  parameter int        Q     = 2,
  parameter int        WORDS = 4000,
  parameter rule_set_t RULES = DEFAULT_RULES,
  localparam int       NR    = int'(RULES.n_rules),
  localparam int       IW    = (NR > 1) ? $clog2(NR) : 1
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  in_valid,
  output char_t in_chars [Q],
  input  logic  alarm_valid,
  input  logic [IW-1:0] alarm_id,
  input  logic [NR-1:0] alarm_vec,
  output int    checks,
  output int    failures,
  output logic  done
);

  char_t text [$];
  char_t pending [$];
  int rule_hits [NR];
  int branch_hits [Q];
  int idle_cycles, sym0_chars, multi_alarms;

  // Copies of the rule set in plain variables, filled at time 0.
  pattern_t     rule_text [NR];
  int           rule_len  [NR];
  logic [255:0] rule_chars;   // bytes that occur in some rule

  function automatic char_t rule_char(int r, int i);
    return pattern_char(rule_text[r], rule_len[r], i);
  endfunction


  function automatic char_t next_char();
    if (pending.size() == 0 && $urandom_range(0, 4) == 0) begin
      automatic int r   = $urandom_range(0, NR - 1);
      automatic int bad = $urandom_range(0, 3) == 0 ? $urandom_range(1, rule_len[r]) : 0;
      for (int i = 1; i <= rule_len[r]; i++)
        pending.push_back(i == bad ? char_t'("Z") : rule_char(r, i));
    end
    if (pending.size() != 0) return pending.pop_front();
    case ($urandom_range(0, 3))
      0: return char_t'("Z");
      1: return char_t'($urandom);
      default: begin
        automatic int r = $urandom_range(0, NR - 1);
        return rule_char(r, $urandom_range(1, rule_len[r]));
      end
    endcase
  endfunction

  function automatic bit ends_at(int r, int e);
    if (e < rule_len[r] || e > text.size()) return 0;
    for (int i = 1; i <= rule_len[r]; i++)
      if (text[e - rule_len[r] + i - 1] != rule_char(r, i)) return 0;
    return 1;
  endfunction

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("never exercised: %s", what);
    end
  endtask

  initial begin
    logic [NR-1:0] want;
    int lowest;
    checks = 0; failures = 0; done = 0;
    in_valid = 0;
    for (int k = 0; k < Q; k++) in_chars[k] = '0;
    for (int r = 0; r < NR; r++) begin
      rule_text[r] = RULES.text[r];
      rule_len[r]  = int'(RULES.len[r]);
      rule_hits[r] = 0;
    end
    rule_chars = '0;
    for (int r = 0; r < NR; r++)
      for (int i = 1; i <= rule_len[r]; i++) rule_chars[rule_char(r, i)] = 1'b1;
    for (int b = 0; b < Q; b++) branch_hits[b] = 0;
    idle_cycles = 0; sym0_chars = 0; multi_alarms = 0;
    want = '0;
    @(posedge rst_n);
    for (int n = 0; n <= WORDS; n++) begin
      @(negedge clk);
      // Outputs of the word presented in the previous cycle.
      checks++;
      if (alarm_vec !== want || alarm_valid !== (want != 0)) begin
        failures++;
        if (failures < 10) $display("%m cycle %0d: vec=%b valid=%b id=%0d want vec=%b",
                                    n, alarm_vec, alarm_valid, alarm_id, want);
      end
      for (int r = NR - 1; r >= 0; r--)
        if (want[r]) lowest = r;
      if (want != 0) begin
        checks++;
        if (alarm_id !== IW'(lowest)) begin
          failures++;
          $display("%m cycle %0d: id=%0d want %0d", n, alarm_id, lowest);
        end
      end
      if ($countones(want) > 1) multi_alarms++;
      want = '0;
      if (n == WORDS) break;
      in_valid = ($urandom_range(0, 5) != 0);
      if (!in_valid) begin
        idle_cycles++;
        continue;
      end
      begin
        automatic int base = text.size();
        for (int k = 0; k < Q; k++) begin
          in_chars[k] = next_char();
          text.push_back(in_chars[k]);
          if (!rule_chars[in_chars[k]]) sym0_chars++;
        end
        for (int r = 0; r < NR; r++) begin
          automatic int w = (rule_len[r] + Q - 1) / Q;
          automatic int d = Q * w - rule_len[r];
          for (int b = 0; b < Q; b++)
            if (ends_at(r, base + Q - d - b)) begin
              want[r] = 1;
              rule_hits[r]++;
              branch_hits[b]++;
            end
        end
      end
    end
    in_valid = 0;
    for (int r = 0; r < NR; r++) need($sformatf("match of rule %0d", r), rule_hits[r]);
    for (int b = 0; b < Q; b++) need($sformatf("match in branch %0d", b), branch_hits[b]);
    need("idle cycle", idle_cycles);
    need("byte outside every alphabet", sym0_chars);
    need("two rules in one cycle", multi_alarms);
    begin
      automatic string msg = $sformatf("Q=%0d: %0d characters; matches per rule", Q, text.size());
      for (int r = 0; r < NR; r++) msg = {msg, $sformatf(" %0d", rule_hits[r])};
      msg = {msg, "; per branch"};
      for (int b = 0; b < Q; b++) msg = {msg, $sformatf(" %0d", branch_hits[b])};
      $display("%s; idle cycles %0d; two-rule cycles %0d", msg, idle_cycles, multi_alarms);
    end
    done = 1;
  end
endmodule
