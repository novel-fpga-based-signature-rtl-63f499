// tb_shift_or_register: checks the shift-or chain against the recurrence.
//
// First the worked example of the shift-or algorithm: pattern "aab", text
// "acaab", bit vectors S_a = (0,0,1), S_b = (1,1,0), S_c = (1,1,1) for
// i = 1,2,3; the match output must be 0 only after the fifth character.
// Then random vectors for a 5-bit register, with random idle cycles, against
// a bit-vector model of R_{j+1} = (R_j << 1) | S kept in the testbench.
module tb_shift_or_register;
  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0] s3;
  logic [4:0] s5;
  logic m3, m5;
  int checks = 0, failures = 0;

  shift_or_register #(.W(3)) dut3 (.clk, .rst_n, .en, .s(s3), .match_n(m3));
  shift_or_register #(.W(5)) dut5 (.clk, .rst_n, .en, .s(s5), .match_n(m5));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] vec(byte c);
    case (c)
      "a":     return 3'b100;  // S[3]S[2]S[1] = 1,0,0
      "b":     return 3'b011;
      default: return 3'b111;
    endcase
  endfunction

  string text = "acaab";
  logic [5:0] model;   // model[i] = R[i], model[0] = 0

  initial begin
    s3 = '1; s5 = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1;
    for (int j = 0; j < text.len(); j++) begin
      s3 = vec(text[j]);
      #1;
      checks++;
      if (m3 !== (j == 4 ? 1'b0 : 1'b1)) begin
        failures++;
        $display("example: j=%0d match_n=%b", j + 1, m3);
      end
      @(negedge clk);
    end

    // Random test of the 5-bit chain.
    en = 0;
    model = 6'b111110;
    for (int n = 0; n < 3000; n++) begin
      automatic logic [5:0] next;
      en = ($urandom_range(0, 3) != 0);
      s5 = 5'($urandom) & 5'($urandom);   // mostly zeros so matches occur
      next[5:1] = model[4:0] | s5;
      next[0] = 1'b0;
      #1;
      checks++;
      if (m5 !== next[5]) begin
        failures++;
        if (failures < 10) $display("random n=%0d match_n=%b want %b", n, m5, next[5]);
      end
      @(negedge clk);
      if (en) model = next;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
