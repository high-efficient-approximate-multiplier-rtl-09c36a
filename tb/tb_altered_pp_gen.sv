// Altered partial product test. The 24 converted pairs are listed here by
// hand, column by column (columns 3..11, falling m), and pr/g are checked
// against the OR/AND of the mirrored partial products for random operands.
// The generate vectors of a short operand sequence are also compared with
// known values (e.g. 15 x 10 -> g = 8, 14 x 14 -> g = 74).
module tb_altered_pp_gen;
  import mult_pkg::*;

  pp_matrix_t pp;
  logic [23:0] pr, g;
  int checks = 0, failures = 0;

  int pm [24] = '{3,2, 4,3, 5,4,3, 6,5,4, 7,6,5,4, 7,6,5, 7,6,5, 7,6, 7,6};
  int pn [24] = '{0,1, 0,1, 0,1,2, 0,1,2, 0,1,2,3, 1,2,3, 2,3,4, 3,4, 4,5};

  altered_pp_gen dut (.pp(pp), .pr(pr), .g(g));

  task automatic apply(input logic [7:0] a, input logic [7:0] b);
    for (int m = 0; m < 8; m++)
      for (int n = 0; n < 8; n++)
        pp[m][n] = a[m] & b[n];
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fa [10] = '{15, 14, 14, 14, 13, 13, 12, 11, 11, 9};
    int fb [10] = '{10, 14, 13, 11, 13, 11, 11, 11, 10, 9};
    int fg [10] = '{ 8, 74, 64,  8, 65,  1,  0,  9,  8, 1};

    checks++;
    if (NUM_PAIRS != 24) begin
      failures++;
      $display("FAIL NUM_PAIRS=%0d", NUM_PAIRS);
    end

    for (int t = 0; t < 3000; t++) begin
      logic [7:0] a, b;
      a = 8'($urandom);
      b = 8'($urandom);
      apply(a, b);
      for (int i = 0; i < 24; i++) begin
        logic amn, anm;
        amn = a[pm[i]] & b[pn[i]];
        anm = a[pn[i]] & b[pm[i]];
        checks++;
        if (pr[i] != (amn | anm) || g[i] != (amn & anm)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d pair %0d", a, b, i);
        end
      end
    end

    for (int i = 0; i < 10; i++) begin
      apply(8'(fa[i]), 8'(fb[i]));
      checks++;
      if (int'(g) != fg[i]) begin
        failures++;
        $display("FAIL %0d x %0d: g=%0d expected %0d", fa[i], fb[i], g, fg[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
