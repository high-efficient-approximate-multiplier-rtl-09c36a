// Reference model of the 8x8 approximate multiplier for the testbenches.
//
// Written arithmetically, not as a gate netlist: each reduction cell is
// modelled by the value it produces (approximate half adder: a + b, except
// 1 + 1 gives 3; full adder: exact count; modified 4-2 compressor: exact count
// except four ones giving 0). Columns are summed with integer weights, so
// the model does not share structure with the RTL beyond the cell placement
// of the reduction diagram.
package mult_ref_pkg;

  function automatic int bitv(int v, int i);
    return (v >> i) & 1;
  endfunction

  function automatic int pp(int a, int b, int m, int n);
    return bitv(a, m) & bitv(b, n);
  endfunction

  function automatic int pprop(int a, int b, int m, int n);
    return pp(a, b, m, n) | pp(a, b, n, m);
  endfunction

  function automatic int pgen(int a, int b, int m, int n);
    return pp(a, b, m, n) & pp(a, b, n, m);
  endfunction

  // OR of all generates of column k (pairs m > n, m + n = k).
  function automatic int gcol(int a, int b, int k);
    int r;
    r = 0;
    for (int m = 0; m < 8; m++)
      if (k - m >= 0 && k - m < m) r |= pgen(a, b, m, k - m);
    return r;
  endfunction

  // Value (sum + 2*carry) of each cell type.
  function automatic int ha_val(int p, int q);
    return (p & q) ? 3 : p + q;
  endfunction

  function automatic int cmp_val(int x1, int x2, int x3, int x4);
    int c;
    c = x1 + x2 + x3 + x4;
    return (c == 4) ? 0 : c;
  endfunction

  // Approximate product.
  function automatic int ref_product(int a, int b);
    int v[16];   // stage-1 cell values by column (sum at k, carry at k+1)
    int tot;
    for (int k = 0; k < 16; k++) v[k] = 0;
    v[12] = ha_val(pp(a,b,7,5), pp(a,b,5,7));
    v[11] = ha_val(pprop(a,b,7,4), pprop(a,b,6,5));
    v[10] = pprop(a,b,7,3) + pprop(a,b,6,4) + pp(a,b,5,5);
    v[9]  = pprop(a,b,7,2) + pprop(a,b,6,3) + pprop(a,b,5,4);
    v[8]  = cmp_val(pprop(a,b,7,1), pprop(a,b,6,2), pprop(a,b,5,3), pp(a,b,4,4));
    v[7]  = cmp_val(pprop(a,b,7,0), pprop(a,b,6,1), pprop(a,b,5,2), pprop(a,b,4,3));
    v[6]  = cmp_val(pprop(a,b,6,0), pprop(a,b,5,1), pprop(a,b,4,2), pp(a,b,3,3));
    v[5]  = pprop(a,b,5,0) + pprop(a,b,4,1) + pprop(a,b,3,2);
    v[4]  = ha_val(pprop(a,b,4,0), pprop(a,b,3,1));
    // Stage 2 and the final adder are exact, so the rest just adds up.
    tot = 0;
    for (int k = 4; k <= 12; k++) tot += v[k] << k;
    for (int k = 3; k <= 11; k++) tot += gcol(a, b, k) << k;
    tot += (pp(a,b,7,7) << 14) + ((pp(a,b,7,6) + pp(a,b,6,7)) << 13) + (pp(a,b,6,6) << 12);
    tot += pp(a,b,2,2) << 4;
    tot += (pprop(a,b,3,0) + pprop(a,b,2,1)) << 3;
    tot += (pp(a,b,2,0) + pp(a,b,0,2) + pp(a,b,1,1)) << 2;
    tot += (pp(a,b,1,0) + pp(a,b,0,1)) << 1;
    tot += pp(a,b,0,0);
    return tot;
  endfunction

  // Mechanism detectors used for coverage counting.
  // A column with two or more active generates (OR merge loses value).
  function automatic bit ev_gen_merge(int a, int b);
    for (int k = 3; k <= 11; k++) begin
      int c;
      c = 0;
      for (int m = 0; m < 8; m++)
        if (k - m >= 0 && k - m < m) c += pgen(a, b, m, k - m);
      if (c >= 2) return 1'b1;
    end
    return 1'b0;
  endfunction

  // An approximate half adder in the tree with both inputs at 1.
  function automatic bit ev_ha_both(int a, int b);
    return (pp(a,b,7,5) & pp(a,b,5,7)) | (pprop(a,b,7,4) & pprop(a,b,6,5)) |
           (pprop(a,b,4,0) & pprop(a,b,3,1));
  endfunction

  // A 4-2 compressor with all four inputs at 1.
  function automatic bit ev_cmp_four(int a, int b);
    return (pprop(a,b,7,1) & pprop(a,b,6,2) & pprop(a,b,5,3) & pp(a,b,4,4)) |
           (pprop(a,b,7,0) & pprop(a,b,6,1) & pprop(a,b,5,2) & pprop(a,b,4,3)) |
           (pprop(a,b,6,0) & pprop(a,b,5,1) & pprop(a,b,4,2) & pp(a,b,3,3));
  endfunction

endpackage
