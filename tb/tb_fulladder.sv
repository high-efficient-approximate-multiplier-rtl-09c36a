// Exhaustive test of the full adder: 2*cout + s must equal a + b + cin.
module tb_fulladder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  fulladder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if (2 * int'(cout) + int'(s) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b got cout=%0b s=%0b", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
