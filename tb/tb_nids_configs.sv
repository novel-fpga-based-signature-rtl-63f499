// tb_nids_configs: end-to-end test of the other configurations of the
// signature match circuit, side by side on independent random texts:
//   one character per cycle (basic circuit);
//   two characters per cycle with one dual-port ROM shared by both branches;
//   four characters per cycle with two dual-port ROMs.
module tb_nids_configs;
  import nids_pkg::*;
  localparam int IW = (DEFAULT_RULES.n_rules > 1) ? $clog2(DEFAULT_RULES.n_rules) : 1;

  logic clk = 0, rst_n = 0;
  int   checks [3], failures [3];
  logic done [3];

  always #5 clk = ~clk;

  for (genvar c = 0; c < 3; c++) begin : g_cfg
    localparam int Q = (c == 0) ? 1 : (c == 1) ? 2 : 4;
    localparam int R = (c == 0) ? 1 : 2;
    logic  in_valid;
    char_t in_chars [Q];
    logic  alarm_valid;
    logic [IW-1:0] alarm_id;
    logic [DEFAULT_RULES.n_rules-1:0] alarm_vec;

    nids_top #(.Q(Q), .R(R)) dut (
      .clk, .rst_n, .in_valid, .in_chars, .alarm_valid, .alarm_id, .alarm_vec
    );

    nids_top_checker #(.Q(Q), .WORDS(5000)) chk (
      .clk, .rst_n, .in_valid, .in_chars, .alarm_valid, .alarm_id, .alarm_vec,
      .checks(checks[c]), .failures(failures[c]), .done(done[c])
    );
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end
endmodule
