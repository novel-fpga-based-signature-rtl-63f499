// tb_pattern_rom: checks every row of three pattern ROMs.
//
// u1: pattern "aab", one character per symbol, alphabet {a, b}: the rows of
//     the classes of a and b must be S_a = (0,0,1) and S_b = (1,1,0), the
//     vectors of the worked shift-or example; row 0 all ones.
// u2: "aab" with two characters per symbol and two read ports: chunks
//     (a,a) and (b,don't care).
// u3: "abacab" with four characters per symbol, alphabet {a, b, c}.
// For every symbol class the representative tuple is decoded back to
// characters and compared with the pattern string here; rows of class 0 and
// of unused addresses must be all ones.
module tb_pattern_rom;
  import nids_pkg::*;
  int checks = 0, failures = 0;

  localparam alphabet_t  AB  = alphabet_t'({"b", "a"});
  localparam alphabet_t  ABC = alphabet_t'({"c", "b", "a"});
  localparam class_set_t C1  = symbol_classes(add_chunks('0, "aab", 3, 1, AB, 2), 1);
  localparam class_set_t C2  = symbol_classes(add_chunks('0, "aab", 3, 2, AB, 2), 2);
  localparam class_set_t C3  = symbol_classes(add_chunks('0, "abacab", 6, 4, ABC, 3), 4);
  localparam int A1 = class_width(int'(C1.n));
  localparam int A2 = class_width(int'(C2.n));
  localparam int A3 = class_width(int'(C3.n));

  logic [A1-1:0] a1 [1];  logic [2:0] d1 [1];
  logic [A2-1:0] a2 [2];  logic [1:0] d2 [2];
  logic [A3-1:0] a3 [1];  logic [1:0] d3 [1];

  pattern_rom #(.PATTERN("aab"), .LEN(3), .Q(1), .ALPHABET(AB), .ALPHA_SIZE(2),
                .CLASSES(C1), .NPORTS(1)) u1 (.addr(a1), .data(d1));
  pattern_rom #(.PATTERN("aab"), .LEN(3), .Q(2), .ALPHABET(AB), .ALPHA_SIZE(2),
                .CLASSES(C2), .NPORTS(2)) u2 (.addr(a2), .data(d2));
  pattern_rom #(.PATTERN("abacab"), .LEN(6), .Q(4), .ALPHABET(ABC), .ALPHA_SIZE(3),
                .CLASSES(C3), .NPORTS(1)) u3 (.addr(a3), .data(d3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected row of class a: decode the representative's codes through the
  // alphabet string (code 0 decodes to a byte found in no pattern).
  function automatic int expect_row(string pat, string alpha, int q, class_set_t cl, int a);
    int w = (pat.len() + q - 1) / q;
    int row = 0;
    if (a == 0 || a >= int'(cl.n)) return (1 << w) - 1;
    for (int i = 0; i < w; i++) begin
      for (int k = 0; k < q; k++) begin
        int  pos  = q * i + k;                  // 0-based position in pat
        int  code = int'(cl.rep[a][k]);
        byte c    = (code >= 1 && code <= alpha.len()) ? alpha[code-1] : 8'h00;
        if (pos < pat.len() && c != pat[pos]) row |= (1 << i);
      end
    end
    return row;
  endfunction

  task automatic check(string name, int addr, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("%s addr=%0h data=%0h want %0h", name, addr, got, want);
    end
  endtask

  initial begin
    // Class numbers of 'a' and 'b' in u1, found from the representatives.
    for (int a = 1; a < int'(C1.n); a++) begin
      a1[0] = A1'(a); #1;
      if (C1.rep[a][0] == 1) check("S_a", a, int'(d1[0]), 'b100);
      if (C1.rep[a][0] == 2) check("S_b", a, int'(d1[0]), 'b011);
    end
    a1[0] = '0; #1 check("S_0", 0, int'(d1[0]), 'b111);
    checks++;
    if (C1.n != 3 || C2.n != 3 || C3.n != 3) begin
      failures++;
      $display("class counts %0d %0d %0d, want 3 3 3", C1.n, C2.n, C3.n);
    end
    for (int a = 0; a < 2**A1; a++) begin
      a1[0] = A1'(a); #1 check("u1", a, int'(d1[0]), expect_row("aab", "ab", 1, C1, a));
    end
    for (int a = 0; a < 2**A2; a++) begin
      a2[0] = A2'(a); a2[1] = A2'(2**A2 - 1 - a); #1;
      check("u2 port0", a, int'(d2[0]), expect_row("aab", "ab", 2, C2, a));
      check("u2 port1", 2**A2 - 1 - a, int'(d2[1]), expect_row("aab", "ab", 2, C2, 2**A2 - 1 - a));
    end
    for (int a = 0; a < 2**A3; a++) begin
      a3[0] = A3'(a); #1 check("u3", a, int'(d3[0]), expect_row("abacab", "abc", 4, C3, a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
