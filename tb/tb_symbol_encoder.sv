// tb_symbol_encoder: checks the symbol encoders of rule group 0 of the rule
// set (rules "cmd.exe" and "aab").
//
// One character per symbol: every one of the 256 bytes must map to a
// non-zero address exactly when it occurs in a rule of the group, and
// different rule characters to different addresses.
// Two characters per symbol: for random and rule-derived byte pairs the
// testbench works out, by string comparison with the rules, which chunks
// (aligned two-character pieces, the last one possibly half don't-care) the
// pair matches. Address 0 must mean "no chunk", and two pairs must get the
// same address exactly when they match the same chunks.
module tb_symbol_encoder;
  import nids_pkg::*;
  int checks = 0, failures = 0;

  localparam int AW1 = class_width(int'(symbol_classes(group_chunks(DEFAULT_RULES, 0, 1), 1).n));
  localparam int AW2 = class_width(int'(symbol_classes(group_chunks(DEFAULT_RULES, 0, 2), 2).n));

  char_t          c1 [1];
  char_t          c2 [2];
  logic [AW1-1:0] addr1;
  logic [AW2-1:0] addr2;

  symbol_encoder #(.NCHAR(1)) dut1 (.chars(c1), .addr(addr1));
  symbol_encoder #(.NCHAR(2)) dut2 (.chars(c2), .addr(addr2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string rules [$];
  string chars_all;

  // Chunk signature of a pair, as a string of 0/1 over all rules' chunks.
  function automatic string pair_sig(byte x, byte y);
    string s = "";
    foreach (rules[r]) begin
      for (int i = 0; i < rules[r].len(); i += 2) begin
        bit hit = (x == rules[r][i]) && (i + 1 >= rules[r].len() || y == rules[r][i+1]);
        s = {s, hit ? "1" : "0"};
      end
    end
    return s;
  endfunction

  int    seen_addr [string];   // signature -> address
  string seen_sig  [int];      // address -> signature

  initial begin
    for (int r = 0; r < int'(DEFAULT_RULES.n_rules); r++)
      if (DEFAULT_RULES.group[r] == 0) begin
        automatic string s = "";
        for (int i = 1; i <= int'(DEFAULT_RULES.len[r]); i++)
          s = {s, string'(pattern_char(DEFAULT_RULES.text[r], int'(DEFAULT_RULES.len[r]), i))};
        rules.push_back(s);
      end
    chars_all = {rules[0], rules[1], "Z"};

    // One character per symbol.
    for (int c = 0; c < 256; c++) begin
      automatic bit in_rule = 0;
      foreach (rules[r]) for (int i = 0; i < rules[r].len(); i++) if (int'(rules[r][i]) == c) in_rule = 1;
      c1[0] = char_t'(c); #1;
      checks++;
      if ((addr1 != 0) != in_rule) begin
        failures++;
        $display("byte %02h -> %0d", c, addr1);
      end
      if (in_rule) begin
        automatic string key = string'(byte'(c));
        checks++;
        if (seen_sig.exists(int'(addr1))) begin
          failures++;
          $display("byte %02h shares address %0d", c, addr1);
        end
        seen_sig[int'(addr1)] = key;
      end
    end
    seen_sig.delete();

    // Two characters per symbol.
    for (int n = 0; n < 3000; n++) begin
      automatic byte x = (n % 3 == 0) ? byte'($urandom) : chars_all[$urandom_range(0, chars_all.len() - 1)];
      automatic byte y = (n % 5 == 0) ? byte'($urandom) : chars_all[$urandom_range(0, chars_all.len() - 1)];
      automatic string sig = pair_sig(x, y);
      automatic bit none = 1;
      for (int i = 0; i < sig.len(); i++) if (sig[i] == "1") none = 0;
      c2[0] = x; c2[1] = y; #1;
      checks++;
      if ((addr2 == 0) != none) begin
        failures++;
        if (failures < 10) $display("pair %02h,%02h sig %s -> %0d", x, y, sig, addr2);
      end
      if (!none) begin
        checks++;
        if (seen_addr.exists(sig) && seen_addr[sig] != int'(addr2)) begin
          failures++;
          if (failures < 10) $display("sig %s at two addresses", sig);
        end
        if (seen_sig.exists(int'(addr2)) && seen_sig[int'(addr2)] != sig) begin
          failures++;
          if (failures < 10) $display("address %0d for two signatures", addr2);
        end
        seen_addr[sig] = int'(addr2);
        seen_sig[int'(addr2)] = sig;
      end
    end
    $display("%0d distinct non-zero two-character symbols seen", seen_sig.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
