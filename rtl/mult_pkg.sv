// Shared constants, types and index helpers of the 8x8 approximate multiplier.
//
// Operand width N is 8, as in the design; the product is 2N bits wide. A
// partial product column k (weight 2^k) holds min(k+1, 2N-1-k) terms. Only
// the columns with more than three terms (k = 3 .. 2N-5, i.e. 3 .. 11) have
// their mirrored pairs a[m][n], a[n][m] (m > n) turned into a propagate and a
// generate signal; there are 24 such pairs for N = 8.
//
// Pairs are numbered column by column, starting at column 3, and inside a
// column by falling m: index 0 is (3,0), 1 is (2,1), 2 is (4,0), 3 is (3,1),
// ... 23 is (6,5). The propagate vector pr[23:0] and the generate vector
// g[23:0] of the design follow this numbering.
package mult_pkg;

  localparam int unsigned N      = 8;
  localparam int unsigned PROD_W = 2 * N;
  // Width of the two rows left after the reduction tree (columns 0 .. 2N-2).
  localparam int unsigned ROW_W  = 2 * N - 1;

  // First and last column whose pairs are converted to propagate/generate.
  localparam int unsigned FIRST_ALT_COL = 3;
  localparam int unsigned LAST_ALT_COL  = 2 * N - 5;

  // Partial product matrix, indexed [m][n] = a[m] & b[n].
  typedef logic [N-1:0][N-1:0] pp_matrix_t;

  // True when (m, n) is a pair that the altered partial product stage converts.
  function automatic bit is_alt_pair(int m, int n);
    return (n >= 0) && (n < m) && (m < int'(N)) &&
           (m + n >= int'(FIRST_ALT_COL)) && (m + n <= int'(LAST_ALT_COL));
  endfunction

  // Position of pair (m, n) in the propagate/generate vectors, -1 if none.
  function automatic int pair_index(int m, int n);
    int idx;
    idx = 0;
    for (int col = int'(FIRST_ALT_COL); col <= int'(LAST_ALT_COL); col++) begin
      for (int mm = int'(N) - 1; mm >= 0; mm--) begin
        if (is_alt_pair(mm, col - mm)) begin
          if (mm == m && col - mm == n) return idx;
          idx++;
        end
      end
    end
    return -1;
  endfunction

  // Number of converted pairs (24 for N = 8).
  function automatic int num_pairs();
    int cnt;
    cnt = 0;
    for (int m = 0; m < int'(N); m++)
      for (int n = 0; n < int'(N); n++)
        if (is_alt_pair(m, n)) cnt++;
    return cnt;
  endfunction

  localparam int unsigned NUM_PAIRS = num_pairs();

endpackage
