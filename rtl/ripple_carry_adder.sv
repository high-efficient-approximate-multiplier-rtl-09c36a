// Ripple carry adder: the final carry-propagate stage of the multiplier.
//
// A chain of W full adders adds the two rows left by the reduction tree. The
// carry into bit 0 is 0 and the carry out of bit W-1 becomes sum[W], so the
// result is exact and W+1 bits wide. Purely combinational; the delay grows
// linearly with W.
//
// Ports: x, y (W bits) -> sum (W+1 bits) = x + y.
module ripple_carry_adder #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W:0]   sum
);

  logic [W:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    fulladder u_fa (
      .a   (x[i]),
      .b   (y[i]),
      .cin (carry[i]),
      .s   (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign sum[W] = carry[W];

endmodule
