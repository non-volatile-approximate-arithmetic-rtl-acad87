// mg_cmp_tree: 4-to-2 compressor tree reducing N equal-width rows to two.
//
// Each level groups the rows in fours and passes every group through an
// mg_cmp_row, halving the row count; N = 4, 8 or 16 rows take 1, 2 or 3
// levels. The two rows left are the carry-save form of the total, to be added
// by a carry-propagate adder outside. Columns below NAPPROX use the approximate
// compressor KIND at every level, the rest the accurate MG-EC.
//
// LO/HI give the live column range of each input row; the ranges of the rows
// between levels are worked out at elaboration by mg_pkg::tree_range, so that
// compressors are only placed where bits exist.
//
// Interface: rows[N] in, s0/s1 out with s0 + s1 == sum of rows (mod 2^W)
// when no approximate compressor is used. Combinational.
module mg_cmp_tree
  import mg_pkg::*;
#(
  parameter int        N       = 8,
  parameter int        W       = 32,
  parameter cmp_kind_e KIND    = CMP_AC1,
  parameter int        NAPPROX = 0,
  parameter rarr_t     LO      = '{default: 0},
  parameter rarr_t     HI      = '{default: W - 1}
) (
  input  logic [N-1:0][W-1:0] rows,
  output logic [W-1:0]        s0,
  output logic [W-1:0]        s1
);

  localparam int NLEV = $clog2(N) - 1;

  if (N != 4 && N != 8 && N != 16) begin : g_bad_n
    $error("mg_cmp_tree: N must be 4, 8 or 16");
  end

  // lv[l] holds the N >> l rows entering level l.
  logic [N-1:0][W-1:0] lv [NLEV+1];

  assign lv[0] = rows;

  for (genvar l = 0; l < NLEV; l++) begin : g_lev
    for (genvar g = 0; g < (N >> l) / 4; g++) begin : g_grp
      localparam quad_t GLO = '{
        tree_range(LO, HI, N, l, 4*g+0, KIND, NAPPROX, W, 0),
        tree_range(LO, HI, N, l, 4*g+1, KIND, NAPPROX, W, 0),
        tree_range(LO, HI, N, l, 4*g+2, KIND, NAPPROX, W, 0),
        tree_range(LO, HI, N, l, 4*g+3, KIND, NAPPROX, W, 0)};
      localparam quad_t GHI = '{
        tree_range(LO, HI, N, l, 4*g+0, KIND, NAPPROX, W, 1),
        tree_range(LO, HI, N, l, 4*g+1, KIND, NAPPROX, W, 1),
        tree_range(LO, HI, N, l, 4*g+2, KIND, NAPPROX, W, 1),
        tree_range(LO, HI, N, l, 4*g+3, KIND, NAPPROX, W, 1)};

      mg_cmp_row #(
        .W(W), .KIND(KIND), .NAPPROX(NAPPROX), .LO(GLO), .HI(GHI)
      ) u_row (
        .r    ({lv[l][4*g+3], lv[l][4*g+2], lv[l][4*g+1], lv[l][4*g+0]}),
        .sum  (lv[l+1][2*g]),
        .carry(lv[l+1][2*g+1])
      );
    end
    // Rows of lv[l+1] above N >> (l+1) are unused.
    for (genvar k = N >> (l + 1); k < N; k++) begin : g_unused
      assign lv[l+1][k] = '0;
    end
  end

  assign s0 = lv[NLEV][0];
  assign s1 = lv[NLEV][1];

endmodule
