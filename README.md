# Shift-or signature matcher for network intrusion detection

This is a hardware string matcher for intrusion detection. It compares a
stream of packet bytes against a fixed set of signatures ("rules", exact byte
strings such as `/etc/passwd`). It reports in which clock cycle each rule
occurs. Each rule gets its own small circuit built from the *shift-or*
(bit-parallel) string search algorithm: one ROM and one chain of OR gates and
flip-flops. Memory blocks hold the ROMs, so the logic cost per pattern
character stays near one flip-flop and one OR gate. The circuit can scan Q
characters per clock by running Q copies of the chain at staggered offsets.
The default configuration scans two characters per clock.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The rule set is
fixed when the design is elaborated. The ROM contents are computed from the
rule strings by constant functions, so no memory image files are needed.

## The shift-or recurrence

Take a pattern `P = p1 .. pm` and a text `t1 t2 ...`. Keep a bit vector `R`
with `R[i] = 0` when the last `i` text characters equal `p1 .. pi`. For every
byte value `c`, precompute a mask `S_c` with `S_c[i] = 0` when `pi = c`.
When the next character `c` arrives, the update is:

    R_new[i] = R_old[i-1] OR S_c[i]        (R[0] is always 0)

`R_new[m] = 0` means the whole pattern has just been seen. At the start, all
`R[i]` are 1.

Example: `P = aab`, text `acaab`. Here `S_a = (0,0,1)`, `S_b = (1,1,0)` and
`S_c = (1,1,1)`. `R[3]` first becomes 0 at the fifth character.
`tb_shift_or_register` checks exactly this case.

In hardware (`shift_or_register`), `S_c` is one ROM word. The update is m OR
gates. Only `R[1] .. R[m-1]` need flip-flops, because `R[m]` is used as soon
as it is computed: the output of the last OR gate is the active-low match
signal, in the same cycle as the character that completes the pattern.

## Block structure

```
 in_chars (Q bytes/clk)
      |
 broadcast_circuit ---- Q branches, branch b = text shifted back by b characters
      |
 symbol_encoder  (one per rule group and branch, shared by all rules of the group)
      |  ROM address = Q encoded characters
      v
 shift_or_module (one per rule)
   pattern_rom  x Q/R   (R read ports each)
   shift_or_register x Q
   rule fires if any branch output is 0
      |
 alarm_encoder -> alarm_valid, alarm_id, alarm_vec   (registered)
```

| Module | What it is |
|---|---|
| `nids_pkg` | character/pattern types, the rule set, group alphabets, constant functions |
| `nids_top` | the whole matcher |
| `broadcast_circuit` | delay registers that produce the Q offset branches |
| `symbol_encoder` | byte to short symbol code, per rule group |
| `pattern_rom` | per-rule ROM of shift-or masks, 1..R read ports |
| `shift_or_register` | OR/flip-flop chain of the recurrence |
| `shift_or_module` | one rule's matcher: ROMs, Q chains, output combining |
| `alarm_encoder` | reports which rules fired |

## Symbol encoding and rule groups

A ROM addressed directly by the input would be very large. With raw bytes
it has 256 rows per rule, and with Q characters per symbol it has 256^Q rows
(2^16 for Q = 2). Most of those rows hold the all-ones mask, because the
symbol occurs nowhere in the pattern. The symbol encoder maps every symbol
that cannot take part in a match to one extra symbol, class 0, whose row is
all ones. Every remaining symbol gets a small number of its own.

The encoder is logic, not memory, so all rules of a *group* share one
encoder per branch. The rules of a group should use largely the same
characters. `symbol_encoder` works in two stages:

1. **Character codes.** The K distinct characters of the group's rules get
   codes 1..K; every other byte gets code 0. This uses K byte comparators
   per character, and codes are 4 bits (`CODE_W`).
2. **Symbol classes.** The Q codes of a branch are compared with every
   *chunk* of every rule in the group. A chunk is Q consecutive pattern
   characters; positions past the end of the pattern are don't-care. The
   set of chunks the symbol matches is its signature. Symbols with the same
   signature need the same row in every ROM of the group. The signature is
   looked up in the group's class table, and the class number becomes the
   ROM address. A symbol that matches no chunk is class 0.

The class table is computed at elaboration by `symbol_classes` in
`nids_pkg`. It tries every combination of code 0 and the codes that chunks
require at each position; this covers every possible signature.

With Q = 1 the classes are just the group's characters plus class 0. With
Q = 2, the two groups of the default rule set need 7 and 14 classes, so 3-
and 4-bit ROM addresses instead of 16-bit ones. In total the ten ROMs hold
512 bits.

Each ROM row stores the shift-or mask of one class. `pattern_rom` builds the
row from the class's representative code tuple: bit i is 0 when the tuple
equals the rule's chunk i, with don't-care positions accepting anything.

## Scanning Q characters per clock

This is the least obvious part of the design.

With Q characters per clock, the pattern is cut into chunks of Q characters,
`u_i = (p_{Q(i-1)+1} .. p_{Qi})`. Positions past the end of the pattern are
*don't care*, so the last chunk may be partly empty. Each ROM row then holds
`W = ceil(m/Q)` bits: bit i is 0 when the Q-character symbol equals chunk i.
The recurrence runs over whole chunks, with one shift-or step per clock.

One chain only finds occurrences that start at a chunk boundary of its own
text alignment. So Q chains run side by side. In cycle j, the word
`t_{Qj+1} .. t_{Qj+Q}` arrives, and branch b sees the Q characters
`t_{Qj+1-b} .. t_{Qj+Q-b}`. Branch 0 is the word itself. The other branches
take their first b characters from the previous word, which
`broadcast_circuit` keeps in Q-1 delay registers.

Let `D = Q*W - m` be the number of don't-care positions. Branch b finds the
occurrences whose last character is `t_{Qj+Q-D-b}`. Together the Q branches
cover Q consecutive end positions in every cycle, so no occurrence is missed.
The branch outputs are active low, so the rule fires when their AND is 0.

Reporting time:

* When Q divides m (D = 0), an occurrence is reported in the cycle of the
  word that holds its last character.
* Otherwise, an occurrence that ends in the last D characters of a word is
  reported with the next word. All other occurrences are reported with their
  own word.
* `alarm_vec` bits appear one clock after that cycle, because the alarm
  encoder registers them.

A rule fires at most once per word, even if it ends at two positions of the
same word. The alarm does not say where in the word the match ended.

R > 1 lets R branches share one R-port ROM (Q must be a multiple of R). The
contents are identical for all branches; only the address differs. R = 2 is
the dual-port arrangement. It halves the ROM bits, but on FPGAs it may need
slower true-dual-port memory blocks.

Before the first word has been accepted, the delayed characters of branches
1..Q-1 are reset values, not text. Those branches read an all-ones mask until
then (`br_primed`), so reset contents can never complete a match.

## Interface and timing (`nids_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` | in | 1 | `in_chars` holds the next Q text bytes |
| `in_chars` | in | 8 x Q | element 0 is the earliest byte |
| `alarm_valid` | out | 1 | some rule fired for the previous word |
| `alarm_id` | out | clog2(rules) | lowest-numbered rule that fired |
| `alarm_vec` | out | rules | every rule that fired |

* There is no back-pressure: one word can be accepted every clock.
* When `in_valid` is low, nothing advances. The text is one continuous
  stream, so a match may span idle cycles. Packet boundaries are not
  modelled; to scan packets separately, pulse reset between them.
* The path from the input registers through encoder, ROM and OR chain into
  the flip-flops is one combinational stage. Register `in_chars` outside the
  block if needed.

Parameters: `Q` (characters per clock, default 2), `R` (branches per ROM,
default 1) and `RULES` (the rule set, default `DEFAULT_RULES`).

A rule set is a `rule_set_t` value from `nids_pkg`. It holds the rule strings
(string literals; the leftmost character is p1), their lengths, their group
numbers, and the numbers of rules and groups. Rule r is bit r of
`alarm_vec`. Limits:

* `MAX_RULES = 448` rules.
* `MAX_LEN = 16` characters per rule.
* `MAX_ALPHA = 15` distinct characters per group (4-bit codes).
* `MAX_CHUNKS = 64` distinct chunks per group.
* `MAX_CLASSES = 64` symbol classes per group.
* `MAX_Q = 8`.

Enlarge these in `nids_pkg` for bigger rule sets. `symbol_encoder` and
`shift_or_module` print an `$error` at time 0 for a rule set that breaks a
limit. Elaboration time grows with the square of the
number of rules, because every group's tables are computed from the whole
set: a 415-rule set takes a few minutes in Verilator. The class table of a
group is found by trying (1+K)^Q code tuples, K being the group's number of
distinct characters, so at Q = 4 groups with many characters are slow to
elaborate.

`DEFAULT_RULES` is an example of five rules in two groups: `cmd.exe`, `aab`
| `/etc/passwd`, `/bin/sh`, `passwd`. `passwd` is a suffix of `/etc/passwd`,
so two rules can fire in the same cycle. To load another set, either edit
`RULE_TEXT`, `RULE_LEN` and `RULE_GROUP` in `nids_pkg`, or pass a
`rule_set_t` built by a constant function, as `tb_nids_workload` does.

## What the reference figures say

The architecture was evaluated on an Altera Stratix EP1S40 with SNORT rule
sets. Those results are quoted here as context; this RTL has not been run
through an FPGA flow.

| Configuration | Reported clock | Reported throughput | Reported logic per pattern character |
|---|---|---|---|
| Q=1 | about 266 MHz | 2.13 Gb/s (6058-character set) | 0.96 LE |
| Q=2, R=1 | 321 MHz | 5.14 Gb/s (1568-character set) | 1.09 LE |
| Q=2, R=2 | 291 MHz | 4.65 Gb/s | 1.08 LE |
| Q=4, R=2 | about 216 MHz | 6.92 Gb/s | 4.55 LE |

Throughput is 8·Q bits per clock. The SNORT rule strings behind these
numbers are not available here. `tb_nids_workload` instead runs generated
rule sets of the same sizes: 1568 characters at Q=2 (R=1 and R=2), 1568
characters at Q=4/R=2 (`tb_nids_workload_q4`) and 6058 characters at Q=1.
These show that sets of that size elaborate and match correctly. They say
nothing about FPGA clock rates or logic use.

## Where this RTL makes its own choices

* **Symbol encoder internals.** The two-stage encoder (character codes,
  then chunk comparators and a class lookup) is one way to number the useful
  Q-character symbols. Grouping symbols by signature rather than listing
  every distinct tuple keeps ROMs small even when a pattern's last chunk
  contains don't-care positions: for example, (p_m, any byte) is one class,
  not 256 rows.
* **Alarm encoder.** It is a registered lowest-index priority encoder that
  also outputs the raw vector. Only its role, collecting module alarms, is
  given by the architecture.
* **Invented control.** The valid/enable handshake, the reset values, the
  `br_primed` gating and combinational (asynchronous) ROM reads are all
  choices made here. FPGA block RAMs usually register their address, which
  would add one pipeline stage in front of the OR chain.
* **Rule grouping.** Each rule names its group; nothing here chooses groups
  automatically.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_shift_or_register`: the `aab`/`acaab` example, then random masks
  against a bit-vector model.
* `tb_pattern_rom`: every row of three ROMs (Q = 1, 2 with two ports, 4).
* `tb_symbol_encoder`: all 256 byte values.
* `tb_broadcast_circuit`: branch offsets for Q = 4.
* `tb_shift_or_module`: four configurations (Q/R = 1/1, 2/1, 2/2, 4/2)
  against a direct string search. Uses `shift_or_module_checker`.
* `tb_alarm_encoder`: priority and latency.
* `tb_nids_top`: the default top end to end. Words arrive back to back with
  random idle cycles. Every alarm is checked one clock after its word, and
  the test counts that every rule, every branch, idle cycles, bytes outside
  all alphabets and two-rule cycles all occurred.
* `tb_nids_configs`: the same end-to-end check for Q=1, Q=2/R=2 and
  Q=4/R=2.
* `tb_nids_workload`: the same check with large generated rule sets. There
  are 108 rules (1568 characters) at Q=2/R=1 and Q=2/R=2, and 415 rules
  (6058 characters) at Q=1. Each group has five rules over six characters;
  the fifth rule is a suffix of the fourth.
* `tb_nids_workload_q4`: a 1568-character generated set at Q=4/R=2, with
  three characters per group to keep elaboration short.

The end-to-end tests share `nids_top_checker`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/nids_pkg.sv tb/tb_nids_top.sv --top-module tb_nids_top -o sim
./obj_dir/sim
```

Replace `tb_nids_top` with any other testbench name. Every test simulates
in seconds. Building `tb_nids_workload` takes about five minutes and 6 GB
of memory, mostly for elaboration, and `tb_nids_workload_q4` about two
minutes. The others build in under a minute.
