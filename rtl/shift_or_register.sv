// shift_or_register: the shift-or recurrence R_{j+1}[i] = R_j[i-1] OR S_c[i].
//
// W OR gates and W-1 flip-flops. OR gate i combines bit i of the ROM word of
// the current symbol with flip-flop i-1 (R_j[0] is the constant 0, so OR gate
// 1 passes S_c[1]); flip-flop i stores the output of OR gate i for the next
// cycle. The output of OR gate W is the match check point: it is 0 in the
// cycle in which the symbol completing the pattern is presented
// (active-low, combinational from s and the flip-flops).
//
// Structure and the all-ones start value R_0[i] = 1 follow the described
// circuit. The enable input (flip-flops hold while no valid symbol is
// presented) and the asynchronous active-low reset are this design's choice.
//
// s[i-1] carries S_c[i], i = 1..W. With W = 1 (a rule no longer than Q
// characters) there are no flip-flops, so clk, rst_n and en are unused.
module shift_or_register #(
  parameter int W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] s,
  output logic         match_n
);

  logic [W:1] or_out;

  if (W == 1) begin : g_single
    assign or_out[1] = s[0];
  end else begin : g_chain
    logic [W-1:1] ff;   // ff[i] holds R_j[i]

    always_comb begin
      or_out[1] = s[0];
      for (int i = 2; i <= W; i++)
        or_out[i] = ff[i-1] | s[i-1];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  ff <= '1;
      else if (en) ff <= or_out[W-1:1];
    end
  end

  assign match_n = or_out[W];

endmodule
