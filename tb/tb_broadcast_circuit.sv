// tb_broadcast_circuit: checks the offsets of the Q = 4 branches.
//
// Random words, with random idle cycles, are fed in; the testbench keeps the
// accepted text and checks that branch b carries t_{4j+1-b} .. t_{4j+4-b}
// of the current word j, and that branches 1..3 are flagged not primed
// until a first word has been accepted.
module tb_broadcast_circuit;
  import nids_pkg::*;
  localparam int Q = 4;
  int checks = 0, failures = 0;

  logic  clk = 0, rst_n = 0, in_valid = 0;
  char_t in_chars  [Q];
  char_t br_chars  [Q][Q];
  logic  br_primed [Q];

  broadcast_circuit #(.Q(Q)) dut (.clk, .rst_n, .in_valid, .in_chars, .br_chars, .br_primed);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  char_t text [$];   // accepted characters, text[0] = t_1

  initial begin
    for (int k = 0; k < Q; k++) in_chars[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int k = 0; k < Q; k++) in_chars[k] = char_t'($urandom);
      #1;
      if (in_valid) begin
        automatic int base = text.size();   // t_{Qj} is text[base-1]
        for (int b = 0; b < Q; b++) begin
          checks++;
          if (br_primed[b] !== (b == 0 || base > 0)) begin
            failures++;
            $display("n=%0d primed[%0d]=%b", n, b, br_primed[b]);
          end
          for (int k = 0; k < Q; k++) begin
            automatic int    pos  = base + k - b;  // 0-based index into text
            automatic char_t want = (pos >= base) ? in_chars[pos-base] : text[pos];
            if (pos < 0) continue;
            checks++;
            if (br_chars[b][k] !== want) begin
              failures++;
              if (failures < 10) $display("n=%0d branch %0d char %0d = %02h want %02h",
                                          n, b, k, br_chars[b][k], want);
            end
          end
        end
        for (int k = 0; k < Q; k++) text.push_back(in_chars[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
