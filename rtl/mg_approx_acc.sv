// mg_approx_acc: approximate multi-operand accumulator.
//
// N addends of W bits (two's complement, wrapping modulo 2^W) are reduced to
// two rows by mg_cmp_tree and added by a carry-propagate adder. The LSI least
// significant columns use the approximate compressor KIND (MG-AC1 by default,
// whose +1 and -1 errors partly cancel on inputs with evenly distributed bits),
// the others the accurate MG-EC. With LSI = 0 the sum is exact.
//
// Interface: d[N] in, s out. Combinational.
module mg_approx_acc
  import mg_pkg::*;
#(
  parameter int        N    = 8,
  parameter int        W    = 32,
  parameter int        LSI  = 18,
  parameter cmp_kind_e KIND = CMP_AC1
) (
  input  logic [N-1:0][W-1:0] d,
  output logic [W-1:0]        s
);

  function automatic rarr_t full_range(bit hi);
    rarr_t r;
    for (int i = 0; i < MAXR; i++)
      r[i] = (i >= N) ? (hi ? -1 : W) : (hi ? W - 1 : 0);
    return r;
  endfunction

  logic [W-1:0] s0, s1;

  mg_cmp_tree #(
    .N(N), .W(W), .KIND(KIND), .NAPPROX(LSI),
    .LO(full_range(1'b0)), .HI(full_range(1'b1))
  ) u_tree (
    .rows(d),
    .s0  (s0),
    .s1  (s1)
  );

  assign s = s0 + s1;

endmodule
