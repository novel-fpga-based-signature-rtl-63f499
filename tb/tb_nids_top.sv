// tb_nids_top: end-to-end test of the signature match circuit in its default
// configuration (two characters per cycle, one ROM per branch, the rule set
// of nids_pkg). Words are applied back to back except for random idle
// cycles, so the circuit is checked at one word per clock, and every alarm
// is checked one cycle after its word.
module tb_nids_top;
  import nids_pkg::*;
  localparam int Q  = 2;   // the top's default
  localparam int IW = (DEFAULT_RULES.n_rules > 1) ? $clog2(DEFAULT_RULES.n_rules) : 1;

  logic  clk = 0, rst_n = 0;
  logic  in_valid;
  char_t in_chars [Q];
  logic  alarm_valid;
  logic [IW-1:0] alarm_id;
  logic [DEFAULT_RULES.n_rules-1:0] alarm_vec;
  int    checks, failures;
  logic  done;

  nids_top dut (.clk, .rst_n, .in_valid, .in_chars, .alarm_valid, .alarm_id, .alarm_vec);

  nids_top_checker #(.Q(Q), .WORDS(6000)) chk (
    .clk, .rst_n, .in_valid, .in_chars, .alarm_valid, .alarm_id, .alarm_vec,
    .checks, .failures, .done
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
