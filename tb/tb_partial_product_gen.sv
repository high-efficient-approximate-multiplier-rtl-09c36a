// Partial product generator test: random and corner operands, every one of
// the 64 bits compared with a[m] & b[n] computed bit by bit.
module tb_partial_product_gen;
  logic [7:0] a, b;
  logic [7:0][7:0] pp;
  int checks = 0, failures = 0;

  partial_product_gen #(.N(8)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      if (t == 0)      begin a = 8'hFF; b = 8'hFF; end
      else if (t == 1) begin a = 8'h00; b = 8'hFF; end
      else if (t == 2) begin a = 8'h81; b = 8'h42; end
      else             begin a = 8'($urandom); b = 8'($urandom); end
      #1;
      for (int m = 0; m < 8; m++)
        for (int n = 0; n < 8; n++) begin
          checks++;
          if (pp[m][n] != ((a >> m) & (b >> n) & 8'd1)) begin
            failures++;
            if (failures < 10) $display("FAIL a=%0d b=%0d m=%0d n=%0d", a, b, m, n);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
