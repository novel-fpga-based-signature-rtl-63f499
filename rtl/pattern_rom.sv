// pattern_rom: the ROM of one rule, holding the shift-or bit vectors.
//
// The pattern is cut into W = ceil(LEN/Q) chunks u_i = (p_{Q(i-1)+1} ..
// p_{Qi}); chunk positions beyond the end of the pattern are don't-care. Row
// a belongs to symbol class a of the rule's group (see symbol_encoder):
// bit i-1 is 0 exactly when the symbols of that class equal chunk u_i,
// checked on the class's representative tuple of character codes. Rows of
// class numbers that do not exist, and row 0, are all ones. With Q = 1 a row
// is the vector S_k of one character, with Q > 1 the vector X_k of a
// Q-character symbol.
//
// NPORTS independent read ports let NPORTS branches share one memory
// (NPORTS = 2 is the dual-port ROM shared by two branches). Reads are
// combinational: the word of the symbol presented in a cycle reaches the OR
// gates in the same cycle. The contents are computed at elaboration from the
// pattern, the group alphabet and the group's symbol classes; the row
// definition follows the described architecture, the class numbering is
// this design's.
module pattern_rom
  import nids_pkg::*;
#(
  parameter pattern_t   PATTERN    = "aab",
  parameter int         LEN        = 3,
  parameter int         Q          = 1,
  parameter alphabet_t  ALPHABET   = alphabet_t'({"b", "a"}),
  parameter int         ALPHA_SIZE = 2,
  parameter class_set_t CLASSES    = symbol_classes(add_chunks('0, PATTERN, LEN, Q, ALPHABET,
                                                               ALPHA_SIZE), Q),
  parameter int         NPORTS     = 1,
  localparam int        W          = (LEN + Q - 1) / Q,
  localparam int        AW         = class_width(int'(CLASSES.n))
) (
  input  logic [AW-1:0] addr [NPORTS],
  output logic [W-1:0]  data [NPORTS]
);

  localparam int DEPTH = 2 ** AW;

  function automatic logic [W-1:0] rom_row(int a);
    logic [W-1:0] row = '1;
    if (a == 0 || a >= int'(CLASSES.n)) return row;
    for (int i = 1; i <= W; i++) begin
      row[i-1] = 1'b0;
      for (int k = 0; k < Q; k++) begin
        int pos = Q * (i - 1) + k + 1;
        if (pos <= LEN &&
            int'(CLASSES.rep[a][k]) != alpha_index(ALPHABET, ALPHA_SIZE, pattern_char(PATTERN, LEN, pos)))
          row[i-1] = 1'b1;
      end
    end
    return row;
  endfunction

  logic [W-1:0] rom [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) rom[a] = rom_row(a);
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) data[p] = rom[addr[p]];
  end

endmodule
