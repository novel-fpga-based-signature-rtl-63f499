// symbol_encoder: maps the Q characters of one branch to a ROM address.
//
// Stage 1 encodes every byte: a byte equal to alphabet entry k-1 of the rule
// group becomes code k, any other byte code 0. Stage 2 (the part that
// matters for Q > 1) compares the Q codes with every chunk of every rule of
// the group (a chunk is Q consecutive pattern characters; positions past the
// end of a pattern are don't-care) and so finds the set of chunks the symbol
// matches. That set is looked up among the group's symbol classes (symbols
// that match the same chunks share one ROM row); the class number is the
// ROM address. Class 0 is every symbol that matches no chunk: its ROM row is
// all ones in every rule. With Q = 1 the classes are simply the alphabet
// characters plus class 0.
//
// Mapping every symbol that cannot help any match to one extra symbol 0, and
// sharing the encoder among all rules of a group, follow the described
// architecture. Its internal structure (byte comparators, chunk comparators
// and class lookup) is this design's own; the classes and their numbering
// are computed in nids_pkg at elaboration.
//
// Purely combinational; no clock. chars[0] is the earliest character.
module symbol_encoder
  import nids_pkg::*;
#(
  parameter int         NCHAR      = 1,
  parameter alphabet_t  ALPHABET   = group_alphabet(DEFAULT_RULES, 0),
  parameter int         ALPHA_SIZE = group_alpha_size(DEFAULT_RULES, 0),
  parameter chunk_set_t CHUNKS     = group_chunks(DEFAULT_RULES, 0, NCHAR),
  parameter class_set_t CLASSES    = symbol_classes(CHUNKS, NCHAR),
  localparam int        AW         = class_width(int'(CLASSES.n))
) (
  input  char_t         chars [NCHAR],
  output logic [AW-1:0] addr
);

  initial begin
    if (ALPHA_SIZE > MAX_ALPHA) $error("symbol_encoder: alphabet larger than MAX_ALPHA");
    if (NCHAR > MAX_Q)          $error("symbol_encoder: NCHAR larger than MAX_Q");
    if (int'(CLASSES.n) >= MAX_CLASSES || int'(CHUNKS.n) >= MAX_CHUNKS)
      $error("symbol_encoder: class or chunk table full");
  end

  logic [CODE_W-1:0]     code [NCHAR];
  logic [MAX_CHUNKS-1:0] sig;

  always_comb begin
    for (int n = 0; n < NCHAR; n++) begin
      code[n] = '0;
      for (int k = 0; k < ALPHA_SIZE; k++)
        if (chars[n] == ALPHABET[k]) code[n] = CODE_W'(k + 1);
    end

    sig = '0;
    for (int j = 0; j < int'(CHUNKS.n); j++) begin
      sig[j] = 1'b1;
      for (int n = 0; n < NCHAR; n++)
        if (CHUNKS.care[j][n] && code[n] != CHUNKS.code[j][n]) sig[j] = 1'b0;
    end

    addr = '0;
    for (int c = 1; c < int'(CLASSES.n); c++)
      if (sig == CLASSES.sig[c]) addr = AW'(c);
  end

endmodule
