// broadcast_circuit: delivers the input word to Q branches with offsets.
//
// Each cycle with in_valid a word of Q characters t_{Qj+1} .. t_{Qj+Q}
// arrives, chars[0] first in the text. Branch b (b = 0..Q-1) receives the Q
// consecutive characters t_{Qj+1-b} .. t_{Qj+Q-b}: the last b characters of
// the previous word followed by the first Q-b characters of the current one.
// The Q-1 delay registers keep characters 1..Q-1 of the previous word; they
// load on every valid word. Branch 0 is the current word unchanged.
//
// br_primed[b] is low for b > 0 until a first word has been stored, so that
// the branches that read delayed characters ignore the reset contents of the
// delay registers. That flag and the reset are this design's choice; the
// delay-and-broadcast structure follows the described circuit.
//
// Timing: br_chars is combinational from in_chars and the delay registers.
module broadcast_circuit
  import nids_pkg::*;
#(
  parameter int Q = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  char_t in_chars  [Q],
  output char_t br_chars  [Q][Q],
  output logic  br_primed [Q]
);

  char_t prev [Q];      // characters of the previous word (index 0 unused)
  logic  have_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < Q; k++) prev[k] <= '0;
      have_prev <= 1'b0;
    end else if (in_valid) begin
      for (int k = 1; k < Q; k++) prev[k] <= in_chars[k];
      prev[0]   <= '0;
      have_prev <= 1'b1;
    end
  end

  always_comb begin
    for (int b = 0; b < Q; b++) begin
      br_primed[b] = (b == 0) || have_prev;
      for (int k = 0; k < Q; k++)
        br_chars[b][k] = (k >= b) ? in_chars[k-b] : prev[Q+k-b];
    end
  end

endmodule
