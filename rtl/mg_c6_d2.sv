// mg_c6_d2: approximate 6-input compressor, delay-optimised form (five gates).
//
// Same outputs as mg_c6_d1 (sum' = {0,1,3,5,6}, C0' = {2,4}, C1 = {3..6},
// C2 = {5,6}), but C0' is formed by one 5-input gate at the second stage from
// four first-stage gates, so only two gates lie on the critical path:
//   A  = {2..6}  9-input gate, x + three 1s
//   C1 = {3..6}  7-input gate, x + one 1
//   B  = {4..6}  7-input gate, x + one 0
//   C2 = {5,6}   9-input gate, x + three 0s
//   C0' = M5(A, ~C1, B, ~C2, 0): three of the four are true only for N_in 2 or 4
// The netlist is this design's own derivation from the output sets.
//
// Interface: x[5:0] in; sum, c[2:0] (C0', C1, C2) out. Combinational, critical
// path two gates and two inverters.
module mg_c6_d2 (
  input  logic [5:0] x,
  output logic       sum,
  output logic [2:0] c
);

  logic a, b;

  mg_majority #(.M(4)) u_a  (.x({x, 3'b111}), .y(a));
  mg_majority #(.M(3)) u_c1 (.x({x, 1'b1}), .y(c[1]));
  mg_majority #(.M(3)) u_b  (.x({x, 1'b0}), .y(b));
  mg_majority #(.M(4)) u_c2 (.x({x, 3'b000}), .y(c[2]));
  mg_majority #(.M(2)) u_c0 (.x({a, ~c[1], b, ~c[2], 1'b0}), .y(c[0]));

  assign sum = ~c[0];

endmodule
