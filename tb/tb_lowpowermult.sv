// End-to-end test of lowpowermult at its default size.
//
// All 65536 operand pairs are applied, one per clock; the product of the pair
// applied before a rising edge must appear on p right after that edge (one
// clock of latency, one product per clock). Every product is compared with
// the arithmetic reference model. Further checks:
//  - every product with both operands at most 14 is exact;
//  - an operand sequence with known results (15x10 = 150, 14x13 = 182, ...);
//  - each approximation mechanism occurs at least once: a column with two or
//    more generates merged by the OR gate, an approximate half adder with
//    both inputs at 1, and a 4-2 compressor with all four inputs at 1.
// The error statistics over all pairs are printed.
module tb_lowpowermult;
  import mult_ref_pkg::*;

  logic        clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_gen_merge = 0, n_ha_both = 0, n_cmp_four = 0;
  int n_wrong = 0;
  longint sum_err = 0;
  int max_err = 0;

  lowpowermult dut (.clk(clk), .a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pair(input int av, input int bv, input int expv);
    int cyc;
    @(negedge clk);
    a = 8'(av);
    b = 8'(bv);
    @(posedge clk);
    #1;
    checks++;
    if (int'(p) != expv) begin
      failures++;
      if (failures < 20) $display("FAIL %0d x %0d: p=%0d expected %0d", av, bv, p, expv);
    end
  endtask

  initial begin
    int fa [17] = '{15, 14, 14, 14, 13, 13, 13, 12, 12, 11, 11, 9, 9, 8, 8, 8, 8};
    int fb [17] = '{10, 13, 12, 11, 13, 12, 11, 12, 11, 11, 10, 9, 8, 8, 7, 6, 5};

    a = 0;
    b = 0;
    // Latency: a product is visible exactly one edge after its operands.
    @(negedge clk);
    a = 8'd200; b = 8'd3;
    @(negedge clk);
    a = 8'd7;   b = 8'd9;
    checks++;
    if (int'(p) != ref_product(200, 3)) begin
      failures++;
      $display("FAIL latency: p=%0d after one edge", p);
    end
    @(posedge clk);
    #1;
    checks++;
    if (int'(p) != 63) begin
      failures++;
      $display("FAIL latency: p=%0d for 7 x 9", p);
    end

    // Known sequence.
    for (int i = 0; i < 17; i++) check_pair(fa[i], fb[i], fa[i] * fb[i]);

    // Exhaustive sweep.
    for (int av = 0; av < 256; av++)
      for (int bv = 0; bv < 256; bv++) begin
        int r, e;
        r = ref_product(av, bv);
        check_pair(av, bv, r);
        if (av <= 14 && bv <= 14) begin
          checks++;
          if (int'(p) != av * bv) begin
            failures++;
            $display("FAIL small operands %0d x %0d = %0d", av, bv, p);
          end
        end
        if (ev_gen_merge(av, bv)) n_gen_merge++;
        if (ev_ha_both(av, bv))   n_ha_both++;
        if (ev_cmp_four(av, bv))  n_cmp_four++;
        e = int'(p) - av * bv;
        if (e < 0) e = -e;
        if (e != 0) n_wrong++;
        sum_err += e;
        if (e > max_err) max_err = e;
      end

    $display("mechanisms: generate OR merge %0d, half adder 1+1 %0d, compressor four ones %0d",
             n_gen_merge, n_ha_both, n_cmp_four);
    $display("error statistics: %0d of 65536 products inexact, mean error distance %0d.%03d, max %0d",
             n_wrong, int'(sum_err / 65536), int'((sum_err * 1000 / 65536) % 1000), max_err);
    checks++;
    if (n_gen_merge == 0 || n_ha_both == 0 || n_cmp_four == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
