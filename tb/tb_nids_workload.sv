// tb_nids_workload: end-to-end tests at the rule-set sizes the circuit was
// rated with, three circuits side by side on independent random texts:
//   two characters per cycle, one ROM per branch, 1568 characters;
//   two characters per cycle, one dual-port ROM per rule, 1568 characters;
//   one character per cycle, 6058 characters.
// The real signature strings are not available, so each set is generated by
// a fixed pseudo-random recipe:
//   * groups of five rules; group g draws its characters from six symbols
//     (so every group stays inside the encoder limits);
//   * the first four rules of a group are 16 random characters of the
//     group's symbols, the fifth is the last 9 characters of the fourth, so
//     two rules can end at the same character;
//   * the last rule is cut short to make the total exactly TOTAL characters.
// The text, the reference model and the mechanism counts come from
// nids_top_checker.
module tb_nids_workload;
  import nids_pkg::*;

  function automatic rule_set_t synth_rules(int total, int nsym);
    string     symbols = "abcdefghijklmnopqrstuvwxyz0123456789";
    rule_set_t rs;
    int        n     = 0;
    int        chars = 0;
    int        g     = 0;
    logic [31:0] seed = 32'h1234_5678;
    for (int r = 0; r < MAX_RULES; r++) begin
      rs.text[r]  = '0;
      rs.len[r]   = '0;
      rs.group[r] = '0;
    end
    while (chars < total && n < MAX_RULES) begin
      int k   = n % 5;
      int len = (k == 4) ? 9 : 16;
      g = n / 5;
      if (len > total - chars) len = total - chars;
      if (k == 4) begin
        for (int i = 0; i < len; i++) rs.text[n][i*8 +: 8] = rs.text[n-1][i*8 +: 8];
      end else begin
        for (int i = 0; i < len; i++) begin
          seed = seed * 32'd1103515245 + 32'd12345;
          rs.text[n][i*8 +: 8] = symbols[(g * 5 + int'(seed[23:16]) % nsym) % symbols.len()];
        end
      end
      rs.len[n]   = 8'(len);
      rs.group[n] = 8'(g);
      chars += len;
      n++;
    end
    rs.n_rules  = 16'(n);
    rs.n_groups = 16'(g + 1);
    return rs;
  endfunction

  logic clk = 0, rst_n = 0;
  int   checks [3], failures [3];
  logic done [3];

  always #5 clk = ~clk;

  for (genvar c = 0; c < 3; c++) begin : g_cfg
    localparam int        Q     = (c == 2) ? 1 : 2;
    localparam int        R     = (c == 1) ? 2 : 1;
    localparam int        TOTAL = (c == 2) ? 6058 : 1568;
    localparam int        WORDS = (c == 2) ? 160000 : 20000;
    localparam rule_set_t RULES = synth_rules(TOTAL, 6);
    localparam int        NR    = int'(RULES.n_rules);
    localparam int        IW    = (NR > 1) ? $clog2(NR) : 1;

    logic  in_valid;
    char_t in_chars [Q];
    logic  alarm_valid;
    logic [IW-1:0] alarm_id;
    logic [NR-1:0] alarm_vec;

    nids_top #(.Q(Q), .R(R), .RULES(RULES)) dut (
      .clk, .rst_n, .in_valid, .in_chars, .alarm_valid, .alarm_id, .alarm_vec
    );

    nids_top_checker #(.Q(Q), .WORDS(WORDS), .RULES(RULES)) chk (
      .clk, .rst_n, .in_valid, .in_chars, .alarm_valid, .alarm_id, .alarm_vec,
      .checks(checks[c]), .failures(failures[c]), .done(done[c])
    );

    initial begin
      automatic int n = 0;
      for (int r = 0; r < NR; r++) n += int'(RULES.len[r]);
      $display("Q=%0d R=%0d rule set: %0d rules, %0d groups, %0d characters",
               Q, R, NR, RULES.n_groups, n);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end
endmodule
