// Altered partial product generator.
//
// In every column that holds more than three partial products, each mirrored
// pair a[m][n], a[n][m] (m > n, same weight 2^(m+n)) is replaced by
//   propagate  pr = a[m][n] | a[n][m]
//   generate   g  = a[m][n] & a[n][m]
// so that pr + 2*g equals the exact pair sum a[m][n] + a[n][m] read in the
// same column (the generate counts twice). The 24 pairs are packed column by
// column as described in mult_pkg. Diagonal terms a[k][k] and the columns with
// three or fewer terms are passed on untouched by the caller. Purely
// combinational; the equations are the design's, the packing order is chosen
// to match the generate vector it shows in simulation.
//
// Ports: pp (partial product matrix) -> pr, g (NUM_PAIRS bits each).
module altered_pp_gen
  import mult_pkg::*;
(
  input  pp_matrix_t             pp,
  output logic [NUM_PAIRS-1:0]   pr,
  output logic [NUM_PAIRS-1:0]   g
);

  for (genvar m = 0; m < N; m++) begin : g_m
    for (genvar n = 0; n < N; n++) begin : g_n
      if (is_alt_pair(m, n)) begin : g_pair
        localparam int IDX = pair_index(m, n);
        assign pr[IDX] = pp[m][n] | pp[n][m];
        assign g[IDX]  = pp[m][n] & pp[n][m];
      end
    end
  end

endmodule
