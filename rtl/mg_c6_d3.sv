// mg_c6_d3: approximate 6-input compressor with two carry outputs (five gates).
//
// The three carries of mg_c6_d1/d2 are re-balanced into two (weight 2 each):
//   c[0] = C0' = {2..6}  9-input gate, x + three constant 1s
//   c[1] = C1  = {4,5,6} 7-input gate, x + one constant 0
// sum' keeps the set {0,1,3,5,6} of the three-carry designs. It is the
// inverted 5-input gate of mg_c6_d2, moved through the gate by inverter
// propagation: sum' = M5(~C0', P, ~C1, Q, 1) with P = {3..6} and Q = {5,6}.
// Errors as in mg_c6_d1: +1 for all zeros, -1 for all ones.
//
// Interface: x[5:0] in; sum, c[1:0] out. Combinational, critical path two
// gates and one inverter.
module mg_c6_d3 (
  input  logic [5:0] x,
  output logic       sum,
  output logic [1:0] c
);

  logic p, q;

  mg_majority #(.M(4)) u_c0 (.x({x, 3'b111}), .y(c[0]));
  mg_majority #(.M(3)) u_c1 (.x({x, 1'b0}), .y(c[1]));
  mg_majority #(.M(3)) u_p  (.x({x, 1'b1}), .y(p));
  mg_majority #(.M(4)) u_q  (.x({x, 3'b000}), .y(q));
  mg_majority #(.M(2)) u_s  (.x({~c[0], p, ~c[1], q, 1'b1}), .y(sum));

endmodule
