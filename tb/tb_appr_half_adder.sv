// Exhaustive test of the approximate half adder against its truth table:
// s = a | b, c = a & b.
module tb_appr_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;
  // expected {c, s} for inputs {a, b} = 00, 01, 10, 11
  logic [1:0] exp_tab [4] = '{2'b00, 2'b01, 2'b01, 2'b11};

  appr_half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({c, s} !== exp_tab[i]) begin
        failures++;
        $display("FAIL a=%0b b=%0b got c=%0b s=%0b", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
