// tb_alarm_encoder: random alarm vectors from 6 rule modules; one cycle
// later alarm_valid must be their OR, alarm_id the lowest set index and
// alarm_vec the vector itself. Single alarms of every rule and an idle
// vector are applied first.
module tb_alarm_encoder;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] alarm;
  logic alarm_valid;
  logic [2:0] alarm_id;
  logic [N-1:0] alarm_vec;

  alarm_encoder #(.N(N)) dut (.clk, .rst_n, .alarm, .alarm_valid, .alarm_id, .alarm_vec);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] last;
    alarm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    last = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // outputs now reflect the vector applied in the previous cycle
      begin
        automatic int lowest = 0;
        for (int i = N - 1; i >= 0; i--) if (last[i]) lowest = i;
        checks++;
        if (alarm_valid !== (last != 0) || alarm_vec !== last ||
            (last != 0 && alarm_id !== 3'(lowest))) begin
          failures++;
          if (failures < 10) $display("n=%0d in=%b valid=%b id=%0d vec=%b", n, last,
                                      alarm_valid, alarm_id, alarm_vec);
        end
      end
      if (n < N)       alarm = N'(1) << n;
      else if (n == N) alarm = '0;
      else             alarm = N'($urandom) & N'($urandom);
      last = alarm;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
