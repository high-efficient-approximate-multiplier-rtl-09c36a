// Exhaustive test of the modified 4-2 compressor over all 16 input patterns.
// Expected: s is the parity of the inputs; 2*c + s equals the number of ones,
// except for four ones, where the compressor yields 0. The test also checks
// that exactly one pattern of the 16 is approximate.
module tb_appr_4_2_compressor;
  logic x1, x2, x3, x4, s, c;
  int checks = 0, failures = 0, wrong = 0;

  appr_4_2_compressor dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int ones, expv;
      {x1, x2, x3, x4} = 4'(i);
      #1;
      ones = $countones(i);
      expv = (ones == 4) ? 0 : ones;
      checks++;
      if (2 * int'(c) + int'(s) != expv) begin
        failures++;
        $display("FAIL x=%04b got c=%0b s=%0b", i[3:0], c, s);
      end
      checks++;
      if (s != ^i[3:0]) begin
        failures++;
        $display("FAIL parity x=%04b s=%0b", i[3:0], s);
      end
      if (2 * int'(c) + int'(s) != ones) wrong++;
    end
    checks++;
    if (wrong != 1) begin
      failures++;
      $display("FAIL %0d approximate patterns, expected 1", wrong);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
