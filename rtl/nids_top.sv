// nids_top: signature match co-processor for network intrusion detection.
//
// The incoming packet bytes arrive Q per cycle (in_chars[0] first in the
// text) and are broadcast to one shift-or matching module per rule. The
// broadcast circuit builds the Q offset branches; for every rule group and
// branch one symbol encoder turns the branch's characters into a ROM address
// that all rules of the group share; each rule's module looks the address up
// in its own ROM(s) and advances its shift registers; the alarm encoder
// reports which rules matched.
//
// Interface: one word per cycle whenever in_valid is high, no back-pressure
// (the circuit accepts a word every clock). An occurrence of rule r whose last
// character lies in the word presented in cycle j (or, when Q does not divide
// the rule length, up to Q-1 characters before that word) sets alarm_vec[r]
// in cycle j+1; alarm_id names the lowest such rule.
//
// Q (characters per cycle) and R (branches sharing one ROM) default to the
// two-character configuration without ROM sharing, the one with the highest
// throughput among the two-character circuits. RULES is the rule set
// (rule_set_t of nids_pkg), by default the example set DEFAULT_RULES.
module nids_top
  import nids_pkg::*;
#(
  parameter int        Q     = 2,
  parameter int        R     = 1,
  parameter rule_set_t RULES = DEFAULT_RULES,
  localparam int       NR    = int'(RULES.n_rules),
  localparam int       IW    = (NR > 1) ? $clog2(NR) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  char_t         in_chars [Q],
  output logic          alarm_valid,
  output logic [IW-1:0] alarm_id,
  output logic [NR-1:0] alarm_vec
);

  localparam int NG    = int'(RULES.n_groups);
  localparam int AWMAX = class_width(MAX_CLASSES);

  char_t br_chars  [Q][Q];
  logic  br_primed [Q];

  broadcast_circuit #(.Q(Q)) u_bcast (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_chars(in_chars),
    .br_chars(br_chars), .br_primed(br_primed)
  );

  // Shared symbol encoders: one per rule group and branch.
  logic [AWMAX-1:0] enc_addr [NG][Q];

  for (genvar g = 0; g < NG; g++) begin : g_group
    localparam alphabet_t  ALPHA   = group_alphabet(RULES, g);
    localparam int         K       = group_alpha_size(RULES, g);
    localparam chunk_set_t CHUNKS  = group_chunks(RULES, g, Q);
    localparam class_set_t CLASSES = symbol_classes(CHUNKS, Q);
    localparam int         AW      = class_width(int'(CLASSES.n));

    for (genvar b = 0; b < Q; b++) begin : g_branch
      logic [AW-1:0] addr;

      symbol_encoder #(
        .NCHAR(Q), .ALPHABET(ALPHA), .ALPHA_SIZE(K), .CHUNKS(CHUNKS), .CLASSES(CLASSES)
      ) u_enc (
        .chars(br_chars[b]), .addr(addr)
      );

      assign enc_addr[g][b] = AWMAX'(addr);
    end
  end

  // One matching module per rule.
  logic [NR-1:0] alarm;

  for (genvar r = 0; r < NR; r++) begin : g_rule
    localparam int         G       = int'(RULES.group[r]);
    localparam alphabet_t  ALPHA   = group_alphabet(RULES, G);
    localparam int         K       = group_alpha_size(RULES, G);
    localparam class_set_t CLASSES = symbol_classes(group_chunks(RULES, G, Q), Q);
    localparam int         AW      = class_width(int'(CLASSES.n));

    logic [AW-1:0] addr [Q];
    for (genvar b = 0; b < Q; b++) begin : g_addr
      assign addr[b] = enc_addr[G][b][AW-1:0];
    end

    shift_or_module #(
      .PATTERN(RULES.text[r]), .LEN(int'(RULES.len[r])), .Q(Q), .R(R),
      .ALPHABET(ALPHA), .ALPHA_SIZE(K), .CLASSES(CLASSES)
    ) u_mod (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .br_addr(addr), .br_primed(br_primed), .alarm(alarm[r])
    );
  end

  alarm_encoder #(.N(NR)) u_enc_out (
    .clk(clk), .rst_n(rst_n), .alarm(alarm),
    .alarm_valid(alarm_valid), .alarm_id(alarm_id), .alarm_vec(alarm_vec)
  );

endmodule
