// shift_or_module_checker: drives one shift_or_module with a random text and
// compares its alarm with a direct string search.
//
// The text is built from the pattern's characters, one character that is in
// no pattern, and random bytes, with whole copies of the pattern (and
// copies with one character changed) inserted at random positions, so that
// occurrences end at every offset within a word. Words of Q characters are
// fed with random idle cycles. The branches are built here from the text and
// encoded by symbol_encoder instances. The expected alarm is found by
// direct comparison with the pattern: an
// occurrence is reported in the cycle of word j when its last character lies
// in the Q positions ending D = Q*ceil(LEN/Q) - LEN characters before the
// end of word j. hits[b] counts occurrences seen by branch b.
module shift_or_module_checker
  import nids_pkg::*;
#(
  parameter pattern_t  PATTERN    = "aab",
  parameter int        LEN        = 3,
  parameter int        Q          = 1,
  parameter int        R          = 1,
  parameter alphabet_t ALPHABET   = alphabet_t'({"b", "a"}),
  parameter int        ALPHA_SIZE = 2,
  parameter int        WORDS      = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   hits [Q],
  output logic done
);
  localparam int W = (LEN + Q - 1) / Q;
  localparam int D = Q * W - LEN;
  localparam chunk_set_t CHUNKS  = add_chunks('0, PATTERN, LEN, Q, ALPHABET, ALPHA_SIZE);
  localparam class_set_t CLASSES = symbol_classes(CHUNKS, Q);
  localparam int         AW      = class_width(int'(CLASSES.n));

  logic          in_valid;
  char_t         br_chars [Q][Q];
  logic [AW-1:0] br_addr [Q];
  logic          br_primed [Q];
  logic          alarm;

  for (genvar b = 0; b < Q; b++) begin : g_enc
    symbol_encoder #(.NCHAR(Q), .ALPHABET(ALPHABET), .ALPHA_SIZE(ALPHA_SIZE),
                     .CHUNKS(CHUNKS), .CLASSES(CLASSES))
      u_enc (.chars(br_chars[b]), .addr(br_addr[b]));
  end

  shift_or_module #(
    .PATTERN(PATTERN), .LEN(LEN), .Q(Q), .R(R), .ALPHABET(ALPHABET),
    .ALPHA_SIZE(ALPHA_SIZE), .CLASSES(CLASSES)
  ) dut (.clk, .rst_n, .in_valid, .br_addr, .br_primed, .alarm);

  char_t text [$];     // text[0] = t_1
  char_t pending [$];

  function automatic char_t next_char();
    if (pending.size() == 0 && $urandom_range(0, 5) == 0) begin
      automatic int bad = $urandom_range(0, 2) == 0 ? $urandom_range(1, LEN) : 0;
      for (int i = 1; i <= LEN; i++)
        pending.push_back(i == bad ? char_t'("z") : pattern_char(PATTERN, LEN, i));
    end
    if (pending.size() != 0) return pending.pop_front();
    case ($urandom_range(0, 3))
      0:       return char_t'("z");
      1:       return char_t'($urandom);
      default: return pattern_char(PATTERN, LEN, $urandom_range(1, LEN));
    endcase
  endfunction

  // Does an occurrence end at 1-based position e?
  function automatic bit ends_at(int e);
    if (e < LEN || e > text.size()) return 0;
    for (int i = 1; i <= LEN; i++)
      if (text[e-LEN+i-1] != pattern_char(PATTERN, LEN, i)) return 0;
    return 1;
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0; in_valid = 0;
    for (int b = 0; b < Q; b++) begin
      hits[b] = 0; br_primed[b] = 0;
      for (int k = 0; k < Q; k++) br_chars[b][k] = '0;
    end
    @(posedge rst_n);
    for (int n = 0; n < WORDS; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        automatic int base = text.size();
        automatic bit want = 0;
        for (int k = 0; k < Q; k++) text.push_back(next_char());
        for (int b = 0; b < Q; b++) begin
          br_primed[b] = (b == 0) || (base > 0);
          for (int k = 0; k < Q; k++) begin
            automatic int pos = base + k - b;
            br_chars[b][k] = (pos >= 0) ? text[pos] : char_t'(0);
          end
          if (ends_at(base + Q - D - b)) begin
            want = 1;
            hits[b]++;
          end
        end
        #1;
        checks++;
        if (alarm !== want) begin
          failures++;
          if (failures < 10) $display("%m word at %0d: alarm=%b want %b", base, alarm, want);
        end
      end else begin
        #1;
        checks++;
        if (alarm !== 1'b0) failures++;
      end
    end
    done = 1;
  end
endmodule
