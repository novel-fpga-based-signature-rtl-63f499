// shift_or_module: the matching circuit of one rule ("module" of the
// signature match co-processor).
//
// It scans Q characters per cycle. Each of the Q branches delivered by the
// broadcast circuit (branch b holds the characters t_{Qj+1-b} ..
// t_{Qj+Q-b}) has been encoded into a ROM address (a symbol class number,
// CLASSES being the classes of the rule's group) by the group's symbol
// encoder. Q/R ROMs with R read ports each look up the bit vectors (branches
// r*R .. r*R+R-1 share ROM r) and feed one shift-or register per branch of
// W = ceil(LEN/Q) bits. Branch b finds the occurrences whose last character
// lies at t_{Qj+Q-b-(QW-LEN)}, so the Q branches together cover every end
// position. The active-low branch outputs are combined: the rule has matched
// in this cycle when any branch output is 0, i.e. when the AND of the branch
// outputs is 0.
//
// Q = 1, R = 1 is the basic one-character circuit (ROM and shift register);
// Q = 2, R = 1 the two-character circuit with two ROMs; Q = 2, R = 2 the one
// with a shared dual-port ROM; larger Q the general form. This structure
// follows the described architecture.
//
// This design's own choices: in_valid enables the shift registers, so idle
// cycles do not advance the text; a branch that is not yet primed (its
// delayed characters still hold reset values) reads an all-ones vector;
// alarm is active-high, combinational, and qualified by in_valid.
module shift_or_module
  import nids_pkg::*;
#(
  parameter pattern_t   PATTERN    = "aab",
  parameter int         LEN        = 3,
  parameter int         Q          = 1,
  parameter int         R          = 1,
  parameter alphabet_t  ALPHABET   = alphabet_t'({"b", "a"}),
  parameter int         ALPHA_SIZE = 2,
  parameter class_set_t CLASSES    = symbol_classes(add_chunks('0, PATTERN, LEN, Q, ALPHABET,
                                                               ALPHA_SIZE), Q),
  localparam int        W          = (LEN + Q - 1) / Q,
  localparam int        AW         = class_width(int'(CLASSES.n))
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [AW-1:0] br_addr   [Q],
  input  logic          br_primed [Q],
  output logic          alarm
);

  localparam int NROM = Q / R;

  initial begin
    if (Q % R != 0) $error("shift_or_module: Q=%0d is not a multiple of R=%0d", Q, R);
    if (LEN > MAX_LEN) $error("shift_or_module: LEN=%0d exceeds MAX_LEN", LEN);
  end

  logic [W-1:0] rom_data [Q];
  logic [Q-1:0] br_match_n;

  for (genvar r = 0; r < NROM; r++) begin : g_rom
    logic [AW-1:0] addr [R];
    logic [W-1:0]  data [R];

    for (genvar p = 0; p < R; p++) begin : g_port
      assign addr[p]           = br_addr[r*R + p];
      assign rom_data[r*R + p] = data[p];
    end

    pattern_rom #(
      .PATTERN(PATTERN), .LEN(LEN), .Q(Q), .ALPHABET(ALPHABET),
      .ALPHA_SIZE(ALPHA_SIZE), .CLASSES(CLASSES), .NPORTS(R)
    ) u_rom (
      .addr(addr), .data(data)
    );
  end

  for (genvar b = 0; b < Q; b++) begin : g_branch
    shift_or_register #(.W(W)) u_sr (
      .clk(clk), .rst_n(rst_n), .en(in_valid),
      .s(rom_data[b] | {W{~br_primed[b]}}),
      .match_n(br_match_n[b])
    );
  end

  assign alarm = in_valid & ~(&br_match_n);

endmodule
