// Ripple carry adder test at the multiplier's width (W = 15): corner cases
// and random operands, sum compared with the integer sum.
module tb_ripple_carry_adder;
  localparam int W = 15;
  logic [W-1:0] x, y;
  logic [W:0]   sum;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(W)) dut (.x(x), .y(y), .sum(sum));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      case (t)
        0: begin x = '1; y = '1; end
        1: begin x = '1; y = 1;  end
        2: begin x = 0;  y = 0;  end
        default: begin x = W'($urandom); y = W'($urandom); end
      endcase
      #1;
      checks++;
      if (int'(sum) != int'(x) + int'(y)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d = %0d", x, y, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
