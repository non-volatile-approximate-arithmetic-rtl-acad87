// mg_pkg: types and elaboration-time helpers shared by the majority-gate
// compressor modules and the compressor trees built from them.
//
// cmp_kind_e names the three 4-2 compressor variants. The rest of the package
// is constant functions used while elaborating a compressor tree: every row of
// bits in a tree carries a "live" column range [lo, hi] outside which the row is
// structurally zero. A compressor is placed in a column only when at least two
// live bits (counting the horizontal carry from the column below) meet there;
// a column with one live bit passes it through. This mirrors a hand-drawn
// Dadda-style dot diagram, where no compressor is spent on empty positions.
package mg_pkg;

  typedef enum logic [1:0] {
    CMP_EC  = 2'd0,  // accurate 4-2 compressor, 5 in / 3 out
    CMP_AC1 = 2'd1,  // approximate 4-2 compressor, 5 in / 3 out, Sum' = ~Carry
    CMP_AC2 = 2'd2   // approximate 4-in / 2-out compressor, no Cin/Cout
  } cmp_kind_e;

  // Largest number of rows a tree may start with.
  localparam int MAXR = 16;
  typedef int rarr_t [MAXR];
  typedef int quad_t [4];

  // Compressor kind used in column i: approximate below napprox, accurate above.
  function automatic cmp_kind_e col_kind(int i, cmp_kind_e kind, int napprox);
    return (i < napprox) ? kind : CMP_EC;
  endfunction

  // Number of live row bits in column i of a group of four rows.
  function automatic int col_live(int i, quad_t lo, quad_t hi);
    int n = 0;
    for (int k = 0; k < 4; k++)
      if (lo[k] <= i && i <= hi[k]) n++;
    return n;
  endfunction

  // Whether column i of a compressor row holds a compressor. The horizontal
  // carry chain makes this depend on all columns below i.
  function automatic bit col_cmp(int i, quad_t lo, quad_t hi, cmp_kind_e kind, int napprox);
    bit cin_live = 1'b0;
    bit c = 1'b0;
    for (int j = 0; j <= i; j++) begin
      c = (col_live(j, lo, hi) + int'(cin_live)) >= 2;
      cin_live = c && (col_kind(j, kind, napprox) != CMP_AC2);
    end
    return c;
  endfunction

  // Live ranges of the two rows a compressor row produces, found in one pass
  // over the columns: '{sum lo, sum hi, carry lo, carry hi}. An empty range
  // has lo > hi.
  function automatic quad_t row_out(quad_t lo, quad_t hi, cmp_kind_e kind, int napprox, int w);
    quad_t r = '{w, -1, w, -1};
    bit cin_live = 1'b0;
    bit c;
    int n;
    for (int i = 0; i < w; i++) begin
      n = col_live(i, lo, hi) + int'(cin_live);
      c = n >= 2;
      if (n >= 1) begin
        if (i < r[0]) r[0] = i;
        r[1] = i;
      end
      if (c && i + 1 < w) begin
        if (i + 1 < r[2]) r[2] = i + 1;
        r[3] = i + 1;
      end
      cin_live = c && (col_kind(i, kind, napprox) != CMP_AC2);
    end
    return r;
  endfunction

  // Live range of row idx after `level` levels of 4-to-2 reduction of a tree
  // that starts with nrows rows of ranges lo0/hi0. which: 0 = lo, 1 = hi.
  function automatic int tree_range(rarr_t lo0, rarr_t hi0, int nrows, int level, int idx,
                                    cmp_kind_e kind, int napprox, int w, int which);
    rarr_t lo = lo0;
    rarr_t hi = hi0;
    rarr_t nlo;
    rarr_t nhi;
    int n = nrows;
    quad_t glo;
    quad_t ghi;
    quad_t ro;
    for (int l = 0; l < level; l++) begin
      nlo = lo;
      nhi = hi;
      for (int g = 0; g < n / 4; g++) begin
        for (int k = 0; k < 4; k++) begin
          glo[k] = lo[4*g+k];
          ghi[k] = hi[4*g+k];
        end
        ro = row_out(glo, ghi, kind, napprox, w);
        nlo[2*g]   = ro[0];
        nhi[2*g]   = ro[1];
        nlo[2*g+1] = ro[2];
        nhi[2*g+1] = ro[3];
      end
      n = n / 2;
      lo = nlo;
      hi = nhi;
    end
    return (which == 0) ? lo[idx] : hi[idx];
  endfunction

endpackage
