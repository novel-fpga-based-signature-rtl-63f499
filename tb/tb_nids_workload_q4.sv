// tb_nids_workload_q4: end-to-end test of the four-characters-per-cycle
// circuit with two dual-port ROMs per rule, loaded with a generated rule set
// of 1568 characters (the size this configuration was rated with; the real
// signature strings are not available). The recipe is the one of
// tb_nids_workload, with three symbols per group instead of six: the class
// table of a group is found by trying every combination of the codes its
// chunks use at each of the Q positions, (1+K)^Q tuples, which at Q = 4 and
// K = 6 makes elaboration very slow. Recipe:
//   * groups of five rules; group g draws its characters from three symbols;
//   * the first four rules of a group are 16 random characters of the
//     group's symbols, the fifth is the last 9 characters of the fourth, so
//     two rules can end at the same character;
//   * the last rule is cut short to make the total exactly 1568 characters.
// The text, the reference model and the mechanism counts come from
// nids_top_checker.
module tb_nids_workload_q4;
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

  localparam int        Q     = 4;
  localparam int        R     = 2;
  localparam int        WORDS = 20000;
  localparam rule_set_t RULES = synth_rules(1568, 3);
  localparam int        NR    = int'(RULES.n_rules);
  localparam int        IW    = (NR > 1) ? $clog2(NR) : 1;

  logic  clk = 0, rst_n = 0;
  logic  in_valid;
  char_t in_chars [Q];
  logic  alarm_valid;
  logic [IW-1:0] alarm_id;
  logic [NR-1:0] alarm_vec;
  int    checks, failures;
  logic  done;

  always #5 clk = ~clk;

  nids_top #(.Q(Q), .R(R), .RULES(RULES)) dut (
    .clk, .rst_n, .in_valid, .in_chars, .alarm_valid, .alarm_id, .alarm_vec
  );

  nids_top_checker #(.Q(Q), .WORDS(WORDS), .RULES(RULES)) chk (
    .clk, .rst_n, .in_valid, .in_chars, .alarm_valid, .alarm_id, .alarm_vec,
    .checks, .failures, .done
  );

  initial begin
    automatic int n = 0;
    for (int r = 0; r < NR; r++) n += int'(RULES.len[r]);
    $display("Q=%0d R=%0d rule set: %0d rules, %0d groups, %0d characters",
             Q, R, NR, RULES.n_groups, n);
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
