// lowpowermult: 8x8 unsigned approximate multiplier with a registered product.
//
// Four combinational stages, then one register:
//   1. partial_product_gen : 64 partial products a[m] & b[n]
//   2. altered_pp_gen      : mirrored pairs in columns 3..11 become
//                            propagate (OR) and generate (AND) signals
//   3. reduction_tree      : generates OR-merged per column; two stages of
//                            approximate half adders, full adders and
//                            modified 4-2 compressors leave two rows x, y
//   4. ripple_carry_adder  : x + y, exact, 16-bit result
// The product is registered on the rising edge of clk, so p shows the product
// of the a, b present at the previous rising edge (latency one clock, one new
// product every clock). There is no reset: p holds an arbitrary value until
// the first edge.
//
// Ports follow the design's top-level view (clk, a[7:0], b[7:0], p[15:0]).
// The output register and its timing are this implementation's choice: the
// design shows a clock port but does not say what it times.
//
// Accuracy: the product is exact for every operand pair up to 14 x 14
// (and for many larger ones); errors come from columns with two or more
// active generate signals, approximate half adders with both inputs at 1, and
// compressors with all four inputs at 1.
module lowpowermult
  import mult_pkg::*;
(
  input  logic              clk,
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  output logic [PROD_W-1:0] p
);

  pp_matrix_t              pp;
  logic [NUM_PAIRS-1:0]    pr, g;
  logic [ROW_W-1:0]        x, y;
  logic [PROD_W-1:0]       prod;

  partial_product_gen #(.N(N)) u_pp (
    .a (a),
    .b (b),
    .pp(pp)
  );

  altered_pp_gen u_alt (
    .pp(pp),
    .pr(pr),
    .g (g)
  );

  reduction_tree u_tree (
    .pp(pp),
    .pr(pr),
    .g (g),
    .x (x),
    .y (y)
  );

  ripple_carry_adder #(.W(ROW_W)) u_rca (
    .x  (x),
    .y  (y),
    .sum(prod)
  );

  always_ff @(posedge clk) p <= prod;

endmodule
