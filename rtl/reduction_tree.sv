// Approximate reduction tree of the 8x8 multiplier.
//
// Input: the partial product matrix pp[m][n] (weight 2^(m+n)) and the
// propagate/generate signals pr, g of the 24 converted pairs (see mult_pkg).
// Output: two rows x[14:0] and y[14:0] whose exact sum is the approximate
// product. y[0] and y[2] are always 0. Purely combinational.
//
// Generates: all generate signals of a column k (3 .. 11) are merged into one
// bit G[k] by an OR gate. A column holds at most four generates, so one gate
// per column suffices. Two or more active generates in a column count once.
//
// Stage 1 (one cell per column, column k produces S[k] at weight 2^k and
// C[k] at weight 2^(k+1)):
//   col 12  approx HA  a75 a57
//   col 11  approx HA  P74 P65
//   col 10  FA         P73 P64 a55
//   col  9  FA         P72 P63 P54
//   col  8  4-2 comp   P71 P62 P53 a44
//   col  7  4-2 comp   P70 P61 P52 P43
//   col  6  4-2 comp   P60 P51 P42 a33
//   col  5  FA         P50 P41 P32
//   col  4  approx HA  P40 P31          (a22 passes to stage 2)
// Stage 2 (full adders, column k: sum -> x[k], carry -> y[k+1]):
//   col 13  a76 a67 C12        col 12  S12 C11 a66
//   col k = 5 .. 11: S[k] G[k] C[k-1]
//   col  4  S4 a22 G4          col  3  P30 P21 G3        col 2  a20 a02 a11
// Columns 14, 1 and 0 pass through: x14 = a77, x1 = a10, y1 = a01, x0 = a00.
//
// The cell placement follows the design's reduction diagram. The full adders
// are the exact two-XOR/multiplexer cell, the half adders are the OR-sum
// approximate cell and the compressors are the modified 4-2 compressor.
module reduction_tree
  import mult_pkg::*;
(
  input  pp_matrix_t            pp,
  input  logic [NUM_PAIRS-1:0]  pr,
  input  logic [NUM_PAIRS-1:0]  g,
  output logic [ROW_W-1:0]      x,
  output logic [ROW_W-1:0]      y
);

  // Propagate and generate signals back in matrix form, P[m][n] / Gm[m][n].
  logic [N-1:0][N-1:0] P, Gm;
  // One OR-merged generate bit per column.
  logic [ROW_W-1:0]    G;
  // Stage 1 sums and carries, indexed by the column they come from (4 .. 12).
  logic [12:4]         S, C;

  for (genvar m = 0; m < N; m++) begin : g_m
    for (genvar n = 0; n < N; n++) begin : g_n
      if (is_alt_pair(m, n)) begin : g_pair
        assign P[m][n]  = pr[pair_index(m, n)];
        assign Gm[m][n] = g[pair_index(m, n)];
      end else begin : g_none
        assign P[m][n]  = 1'b0;
        assign Gm[m][n] = 1'b0;
      end
    end
  end

  always_comb begin
    G = '0;
    for (int k = 0; k < int'(ROW_W); k++)
      for (int m = 0; m < int'(N); m++)
        if (is_alt_pair(m, k - m)) G[k] = G[k] | Gm[m][k-m];
  end

  // ---------------------------------------------------------------- stage 1
  appr_half_adder     s1_c12 (.a(pp[7][5]), .b(pp[5][7]), .s(S[12]), .c(C[12]));
  appr_half_adder     s1_c11 (.a(P[7][4]),  .b(P[6][5]),  .s(S[11]), .c(C[11]));
  fulladder           s1_c10 (.a(P[7][3]),  .b(P[6][4]),  .cin(pp[5][5]), .s(S[10]), .cout(C[10]));
  fulladder           s1_c9  (.a(P[7][2]),  .b(P[6][3]),  .cin(P[5][4]),  .s(S[9]),  .cout(C[9]));
  appr_4_2_compressor s1_c8  (.x1(P[7][1]), .x2(P[6][2]), .x3(P[5][3]), .x4(pp[4][4]), .s(S[8]), .c(C[8]));
  appr_4_2_compressor s1_c7  (.x1(P[7][0]), .x2(P[6][1]), .x3(P[5][2]), .x4(P[4][3]),  .s(S[7]), .c(C[7]));
  appr_4_2_compressor s1_c6  (.x1(P[6][0]), .x2(P[5][1]), .x3(P[4][2]), .x4(pp[3][3]), .s(S[6]), .c(C[6]));
  fulladder           s1_c5  (.a(P[5][0]),  .b(P[4][1]),  .cin(P[3][2]),  .s(S[5]),  .cout(C[5]));
  appr_half_adder     s1_c4  (.a(P[4][0]),  .b(P[3][1]),  .s(S[4]),  .c(C[4]));

  // ---------------------------------------------------------------- stage 2
  assign x[14] = pp[7][7];
  assign x[1]  = pp[1][0];
  assign x[0]  = pp[0][0];
  assign y[2]  = 1'b0;
  assign y[1]  = pp[0][1];
  assign y[0]  = 1'b0;

  fulladder s2_c13 (.a(pp[7][6]), .b(pp[6][7]), .cin(C[12]),   .s(x[13]), .cout(y[14]));
  fulladder s2_c12 (.a(S[12]),    .b(C[11]),    .cin(pp[6][6]), .s(x[12]), .cout(y[13]));

  for (genvar k = 5; k <= 11; k++) begin : g_s2
    fulladder u_fa (.a(S[k]), .b(G[k]), .cin(C[k-1]), .s(x[k]), .cout(y[k+1]));
  end

  fulladder s2_c4 (.a(S[4]),     .b(pp[2][2]), .cin(G[4]),     .s(x[4]), .cout(y[5]));
  fulladder s2_c3 (.a(P[3][0]),  .b(P[2][1]),  .cin(G[3]),     .s(x[3]), .cout(y[4]));
  fulladder s2_c2 (.a(pp[2][0]), .b(pp[0][2]), .cin(pp[1][1]), .s(x[2]), .cout(y[3]));

endmodule
