// mg_approx_mult: W x W signed multiplier with an approximate 4-2 compressor
// tree.
//
// Partial products follow the modified Baugh-Wooley scheme: row i holds
// a[j] & b[i] at column i+j, with the bits pairing exactly one sign bit
// inverted, and the two correction ones at columns W and 2W-1 merged into the
// otherwise empty top positions of rows 0 and W-1. The W rows are reduced by
// mg_cmp_tree, whose LSPP least significant columns use the approximate
// compressor KIND (MG-AC2 by default, MG-AC1 as the alternative) and whose
// other columns use the accurate MG-EC. A carry-propagate adder forms the
// 2W-bit product. With LSPP = 0 the product is exact.
//
// The grouping of rows into 4-2 compressor rows is this design's own regular
// tree; a hand-optimised Dadda tree would place compressors differently, so
// error statistics differ somewhat from a Dadda implementation.
//
// Interface: a, b signed in; p = a * b (approximately) out. Combinational.
module mg_approx_mult
  import mg_pkg::*;
#(
  parameter int        W    = 16,
  parameter int        LSPP = 15,
  parameter cmp_kind_e KIND = CMP_AC2
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  localparam int PW = 2 * W;

  // Live column range of each partial-product row.
  function automatic rarr_t pp_range(bit hi);
    rarr_t r;
    for (int i = 0; i < MAXR; i++) begin
      if (i >= W)          r[i] = hi ? -1 : PW;
      else if (!hi)        r[i] = i;
      else if (i == 0)     r[i] = W;           // holds the correction one at column W
      else if (i == W - 1) r[i] = PW - 1;      // holds the correction one at column 2W-1
      else                 r[i] = i + W - 1;
    end
    return r;
  endfunction

  logic [W-1:0][PW-1:0] pp;
  logic [PW-1:0]        s0, s1;

  always_comb begin
    pp = '0;
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++)
        pp[i][i+j] = (a[j] & b[i]) ^ ((i == W - 1) != (j == W - 1));
    pp[0][W]        = 1'b1;
    pp[W-1][PW-1]   = 1'b1;
  end

  mg_cmp_tree #(
    .N(W), .W(PW), .KIND(KIND), .NAPPROX(LSPP),
    .LO(pp_range(1'b0)), .HI(pp_range(1'b1))
  ) u_tree (
    .rows(pp),
    .s0  (s0),
    .s1  (s1)
  );

  assign p = signed'(s0 + s1);

endmodule
