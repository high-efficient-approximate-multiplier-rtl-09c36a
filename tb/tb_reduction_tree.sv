// Reduction tree test over all 65536 operand pairs. The testbench forms the
// partial products and propagate/generate signals itself, and checks that
// x + y equals the arithmetic reference model, that y[0] and y[2] are 0, and
// that every product with both operands at most 14 comes out exact.
module tb_reduction_tree;
  import mult_pkg::*;
  import mult_ref_pkg::*;

  pp_matrix_t pp;
  logic [23:0] pr, g;
  logic [14:0] x, y;
  int checks = 0, failures = 0;

  int pm [24] = '{3,2, 4,3, 5,4,3, 6,5,4, 7,6,5,4, 7,6,5, 7,6,5, 7,6, 7,6};
  int pn [24] = '{0,1, 0,1, 0,1,2, 0,1,2, 0,1,2,3, 1,2,3, 2,3,4, 3,4, 4,5};

  reduction_tree dut (.pp(pp), .pr(pr), .g(g), .x(x), .y(y));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        int got;
        for (int m = 0; m < 8; m++)
          for (int n = 0; n < 8; n++)
            pp[m][n] = 1'(((a >> m) & (b >> n)) & 1);
        for (int i = 0; i < 24; i++) begin
          pr[i] = pp[pm[i]][pn[i]] | pp[pn[i]][pm[i]];
          g[i]  = pp[pm[i]][pn[i]] & pp[pn[i]][pm[i]];
        end
        #1;
        got = int'(x) + int'(y);
        checks++;
        if (got != ref_product(a, b) || y[0] || y[2]) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d x %0d: x+y=%0d expected %0d", a, b, got, ref_product(a, b));
        end
        if (a <= 14 && b <= 14) begin
          checks++;
          if (got != a * b) begin
            failures++;
            $display("FAIL small operands %0d x %0d = %0d", a, b, got);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
