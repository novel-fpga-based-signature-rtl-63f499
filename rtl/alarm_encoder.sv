// alarm_encoder: collects the alarms of the N rule modules.
//
// Every cycle the alarm lines of all modules are sampled. If any is high,
// the next cycle shows alarm_valid = 1, alarm_id = the lowest-numbered rule
// that matched, and alarm_vec = all rules that matched (so that simultaneous
// matches of several rules are not lost). With no alarm the outputs read 0.
//
// The block's role, reporting which rule raised an alarm, follows the
// described architecture; the priority encoding, the registered outputs
// (one cycle of latency) and the extra alarm vector are this design's own.
module alarm_encoder #(
  parameter int N  = 4,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  alarm,
  output logic          alarm_valid,
  output logic [IW-1:0] alarm_id,
  output logic [N-1:0]  alarm_vec
);

  logic [IW-1:0] first;

  always_comb begin
    first = '0;
    for (int i = N - 1; i >= 0; i--)
      if (alarm[i]) first = IW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alarm_valid <= 1'b0;
      alarm_id    <= '0;
      alarm_vec   <= '0;
    end else begin
      alarm_valid <= |alarm;
      alarm_id    <= first;
      alarm_vec   <= alarm;
    end
  end

endmodule
