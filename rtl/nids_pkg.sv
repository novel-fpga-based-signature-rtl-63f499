// nids_pkg: types, rule set and constant functions shared by the signature
// match circuit.
//
// The circuit holds one shift-or matcher per rule. A rule is an exact byte
// string. Rules are divided into groups; all rules of a group share one
// symbol encoder, which maps every byte that occurs in any rule of the group
// to a small index (1..K) and every other byte to symbol 0. The alphabet of a
// group is derived here from its rules, in order of first appearance, so the
// ROM contents of every matcher follow from the rule strings alone.
//
// The grouping of rules and the shared encoder follow the described
// architecture. A rule set is a rule_set_t value (rule strings, lengths,
// group numbers); nids_top takes one as a parameter. DEFAULT_RULES, built
// from RULE_TEXT, RULE_LEN and RULE_GROUP below, is an example set chosen for
// this design (the architecture is meant to be loaded with intrusion
// detection signatures). Pattern character p_1 is the leftmost character of
// the string literal.
package nids_pkg;

  typedef logic [7:0] char_t;

  // Longest rule and largest group alphabet the types can carry.
  localparam int MAX_LEN   = 16;
  localparam int MAX_ALPHA = 15;

  typedef logic [MAX_LEN*8-1:0] pattern_t;   // string literal, right aligned
  typedef char_t [MAX_ALPHA-1:0] alphabet_t; // entry k-1 holds symbol k

  // Example rule set.
  localparam int NUM_RULES  = 5;
  localparam int NUM_GROUPS = 2;
  localparam pattern_t RULE_TEXT  [NUM_RULES] = '{"cmd.exe", "/etc/passwd", "/bin/sh", "aab", "passwd"};
  localparam int       RULE_LEN   [NUM_RULES] = '{7, 11, 7, 3, 6};
  localparam int       RULE_GROUP [NUM_RULES] = '{0, 1, 1, 0, 1};

  // A rule set as one parameter value.
  localparam int MAX_RULES = 448;

  typedef struct packed {
    pattern_t [MAX_RULES-1:0]  text;
    logic [MAX_RULES-1:0][7:0] len;
    logic [MAX_RULES-1:0][7:0] group;
    logic [15:0]               n_rules;
    logic [15:0]               n_groups;
  } rule_set_t;

  function automatic rule_set_t default_rules();
    rule_set_t rs;
    for (int r = 0; r < MAX_RULES; r++) begin
      rs.text[r]  = '0;
      rs.len[r]   = '0;
      rs.group[r] = '0;
    end
    for (int r = 0; r < NUM_RULES; r++) begin
      rs.text[r]  = RULE_TEXT[r];
      rs.len[r]   = 8'(RULE_LEN[r]);
      rs.group[r] = 8'(RULE_GROUP[r]);
    end
    rs.n_rules  = 16'(NUM_RULES);
    rs.n_groups = 16'(NUM_GROUPS);
    return rs;
  endfunction

  localparam rule_set_t DEFAULT_RULES = default_rules();

  // Character p_i (1-based) of a pattern of length len.
  function automatic char_t pattern_char(pattern_t text, int len, int i);
    return text[(len-i)*8 +: 8];
  endfunction

  // Index (1..size) of character c in an alphabet, 0 if absent.
  function automatic int alpha_index(alphabet_t alpha, int size, char_t c);
    for (int k = 0; k < size; k++)
      if (alpha[k] == c) return k + 1;
    return 0;
  endfunction

  // Distinct characters of all rules of group g, in order of first appearance.
  function automatic alphabet_t group_alphabet(rule_set_t rs, int g);
    alphabet_t a = '0;
    int        n = 0;
    if (g >= int'(rs.n_groups)) return a;
    for (int r = 0; r < int'(rs.n_rules); r++) begin
      if (int'(rs.group[r]) != g) continue;
      for (int i = 1; i <= int'(rs.len[r]); i++) begin
        char_t c = pattern_char(rs.text[r], int'(rs.len[r]), i);
        if (alpha_index(a, n, c) == 0 && n < MAX_ALPHA) begin
          a[n] = c;
          n++;
        end
      end
    end
    return a;
  endfunction

  // Number of distinct characters of group g (may exceed MAX_ALPHA, which
  // the users of the alphabet then report as an error).
  function automatic int group_alpha_size(rule_set_t rs, int g);
    logic [255:0] seen = '0;
    int           n    = 0;
    if (g >= int'(rs.n_groups)) return 0;
    for (int r = 0; r < int'(rs.n_rules); r++) begin
      if (int'(rs.group[r]) != g) continue;
      for (int i = 1; i <= int'(rs.len[r]); i++) begin
        char_t c = pattern_char(rs.text[r], int'(rs.len[r]), i);
        if (!seen[c]) begin
          seen[c] = 1'b1;
          n++;
        end
      end
    end
    return n;
  endfunction

  // ---------------------------------------------------------------------
  // Multi-character symbols.
  //
  // With Q characters per symbol a pattern is cut into chunks of Q
  // characters; positions past its end are don't-care. Each character is
  // first encoded (CODE_W bits, 0 = not in the group alphabet). Two symbols
  // (Q-tuples of codes) are equivalent when they match exactly the same
  // chunks of the group; every equivalence class gets one ROM row, class 0
  // being the symbols that match no chunk (all-ones row). The classes and a
  // representative tuple of each are found at elaboration by trying, at
  // every position, code 0 and each code that a chunk requires there.
  // ---------------------------------------------------------------------
  localparam int MAX_Q       = 8;
  localparam int MAX_CHUNKS  = 64;
  localparam int MAX_CLASSES = 64;
  localparam int CODE_W      = $clog2(MAX_ALPHA + 1);

  typedef logic [MAX_Q-1:0][CODE_W-1:0] tuple_t;   // element k = k-th character

  typedef struct packed {
    logic [MAX_CHUNKS-1:0][MAX_Q-1:0][CODE_W-1:0] code;
    logic [MAX_CHUNKS-1:0][MAX_Q-1:0]             care;
    logic [7:0]                                   n;
  } chunk_set_t;

  typedef struct packed {
    logic [MAX_CLASSES-1:0][MAX_CHUNKS-1:0] sig;   // chunks matched by the class
    tuple_t [MAX_CLASSES-1:0]               rep;   // representative tuple
    logic [7:0]                             n;
  } class_set_t;

  // Adds the chunks of one pattern to a chunk set (duplicates dropped).
  function automatic chunk_set_t add_chunks(chunk_set_t cs, pattern_t text, int len, int q,
                                            alphabet_t alpha, int size);
    int w = (len + q - 1) / q;
    for (int i = 0; i < w; i++) begin
      logic [MAX_Q-1:0][CODE_W-1:0] c = '0;
      logic [MAX_Q-1:0]             m = '0;
      bit                           dup = 0;
      for (int k = 0; k < q; k++) begin
        int pos = q * i + k + 1;
        if (pos <= len) begin
          c[k] = CODE_W'(alpha_index(alpha, size, pattern_char(text, len, pos)));
          m[k] = 1'b1;
        end
      end
      for (int j = 0; j < int'(cs.n); j++)
        if (cs.code[j] == c && cs.care[j] == m) dup = 1;
      if (!dup && int'(cs.n) < MAX_CHUNKS) begin
        cs.code[cs.n] = c;
        cs.care[cs.n] = m;
        cs.n++;
      end
    end
    return cs;
  endfunction

  // All chunks of the rules of group g.
  function automatic chunk_set_t group_chunks(rule_set_t rs, int g, int q);
    chunk_set_t cs    = '0;
    alphabet_t  alpha = group_alphabet(rs, g);
    int         size  = group_alpha_size(rs, g);
    for (int r = 0; r < int'(rs.n_rules); r++)
      if (int'(rs.group[r]) == g)
        cs = add_chunks(cs, rs.text[r], int'(rs.len[r]), q, alpha, size);
    return cs;
  endfunction

  // Chunks matched by a tuple of character codes.
  function automatic logic [MAX_CHUNKS-1:0] tuple_sig(chunk_set_t cs, tuple_t t, int q);
    logic [MAX_CHUNKS-1:0] sig = '0;
    for (int j = 0; j < int'(cs.n); j++) begin
      bit hit = 1;
      for (int k = 0; k < q; k++)
        if (cs.care[j][k] && cs.code[j][k] != t[k]) hit = 0;
      sig[j] = hit;
    end
    return sig;
  endfunction

  // Equivalence classes of q-character symbols for a chunk set.
  function automatic class_set_t symbol_classes(chunk_set_t cs, int q);
    class_set_t cl = '0;
    logic [MAX_CLASSES-1:0][MAX_CHUNKS-1:0] sigs = '0;
    tuple_t [MAX_CLASSES-1:0]               reps = '0;
    int         n = 1;                 // class 0: matches nothing
    logic [MAX_Q-1:0][MAX_CHUNKS:0][CODE_W-1:0] cand  = '0;
    logic [MAX_Q-1:0][7:0]                      ncand = '0;
    logic [MAX_Q-1:0][7:0]                      idx   = '0;
    bit         last;
    for (int k = 0; k < q; k++) begin
      ncand[k] = 1;
      cand[k][0] = '0;
      for (int j = 0; j < int'(cs.n); j++) begin
        bit seen = 0;
        if (!cs.care[j][k]) continue;
        for (int v = 0; v < int'(ncand[k]); v++)
          if (cand[k][v] == cs.code[j][k]) seen = 1;
        if (!seen) begin
          cand[k][ncand[k]] = cs.code[j][k];
          ncand[k]++;
        end
      end
      idx[k] = 0;
    end
    do begin
      tuple_t t = '0;
      logic [MAX_CHUNKS-1:0] sig;
      bit found = 0;
      for (int k = 0; k < q; k++) t[k] = cand[k][idx[k]];
      sig = tuple_sig(cs, t, q);
      for (int c = 0; c < n; c++)
        if (sigs[c] == sig) found = 1;
      if (!found && n < MAX_CLASSES) begin
        sigs[n] = sig;
        reps[n] = t;
        n++;
      end
      // next tuple (mixed radix)
      last = 1;
      for (int k = 0; k < q; k++) begin
        if (int'(idx[k]) + 1 < int'(ncand[k])) begin
          idx[k]++;
          last = 0;
          break;
        end
        idx[k] = 0;
      end
    end while (!last);
    cl.sig = sigs;
    cl.rep = reps;
    cl.n   = 8'(n);
    return cl;
  endfunction

  // ROM address bits for n classes.
  function automatic int class_width(int n);
    return (n < 2) ? 1 : $clog2(n);
  endfunction

endpackage
