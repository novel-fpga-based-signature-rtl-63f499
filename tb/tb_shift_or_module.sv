// tb_shift_or_module: runs the matching circuit of one rule in four
// configurations against a direct string search:
//   c1: one character per cycle (basic circuit), pattern "aab";
//   c2: two characters per cycle, one ROM per branch, "cmd.exe" (odd length);
//   c3: two characters per cycle, dual-port ROM shared, "/etc/passwd";
//   c4: four characters per cycle, two dual-port ROMs, "abacab".
// Every branch of every configuration must see at least one occurrence.
module tb_shift_or_module;
  import nids_pkg::*;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;

  int c1, f1, c2, f2, c3, f3, c4, f4;
  int h1 [1], h2 [2], h3 [2], h4 [4];
  logic d1, d2, d3, d4;

  always #5 clk = ~clk;

  shift_or_module_checker #(.PATTERN("aab"), .LEN(3), .Q(1), .R(1),
    .ALPHABET(alphabet_t'({"b", "a"})), .ALPHA_SIZE(2))
    u1 (.clk, .rst_n, .checks(c1), .failures(f1), .hits(h1), .done(d1));
  shift_or_module_checker #(.PATTERN("cmd.exe"), .LEN(7), .Q(2), .R(1),
    .ALPHABET(alphabet_t'("xe.dmc")), .ALPHA_SIZE(6))
    u2 (.clk, .rst_n, .checks(c2), .failures(f2), .hits(h2), .done(d2));
  shift_or_module_checker #(.PATTERN("/etc/passwd"), .LEN(11), .Q(2), .R(2),
    .ALPHABET(alphabet_t'("dwsapcte/")), .ALPHA_SIZE(9))
    u3 (.clk, .rst_n, .checks(c3), .failures(f3), .hits(h3), .done(d3));
  shift_or_module_checker #(.PATTERN("abacab"), .LEN(6), .Q(4), .R(2),
    .ALPHABET(alphabet_t'("cba")), .ALPHA_SIZE(3))
    u4 (.clk, .rst_n, .checks(c4), .failures(f4), .hits(h4), .done(d4));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d1 && d2 && d3 && d4);
    checks   += c1 + c2 + c3 + c4;
    failures += f1 + f2 + f3 + f4;
    need("q=1 match", h1[0]);
    for (int b = 0; b < 2; b++) need($sformatf("q=2 branch %0d", b), h2[b]);
    for (int b = 0; b < 2; b++) need($sformatf("q=2 shared ROM branch %0d", b), h3[b]);
    for (int b = 0; b < 4; b++) need($sformatf("q=4 branch %0d", b), h4[b]);
    $display("hits q1=%0d q2=%0d/%0d q2s=%0d/%0d q4=%0d/%0d/%0d/%0d", h1[0], h2[0], h2[1],
             h3[0], h3[1], h4[0], h4[1], h4[2], h4[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
