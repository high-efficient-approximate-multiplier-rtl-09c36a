// Partial product generator: the AND array of an N x N unsigned multiplier.
//
// Every multiplicand bit a[m] is ANDed with every multiplier bit b[n]; the
// result pp[m][n] has weight 2^(m+n). This is the first stage of the
// multiplier and follows the design directly. Purely combinational.
//
// Ports: a, b (N-bit operands) -> pp (N x N matrix, pp[m][n] = a[m] & b[n]).
module partial_product_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  output logic [N-1:0][N-1:0]   pp
);

  always_comb begin
    for (int m = 0; m < int'(N); m++)
      for (int n = 0; n < int'(N); n++)
        pp[m][n] = a[m] & b[n];
  end

endmodule
