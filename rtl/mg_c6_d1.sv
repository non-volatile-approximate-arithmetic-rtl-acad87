// mg_c6_d1: approximate 6-input compressor, area-optimised form (four gates).
//
// Six equal-weight inputs are compressed into sum' (weight 1) and three
// carries c[0]=C0', c[1]=C1, c[2]=C2 (weight 2 each), all functions of N_in:
//   C1  = 1 for N_in in {3..6}   7-input gate, x + one constant 1
//   C2  = 1 for N_in in {5,6}    9-input gate, x + three constant 0s
//   D   = 1 for N_in in {2,4,5,6} 9-input gate, x + one 1 + two copies of ~C1
//   C0' = D and not C2 = {2,4}   3-input gate (D, ~C2, 0)
//   sum' = ~C0'                  = {0,1,3,5,6}
// Errors: all zeros reads 1 (+1), all ones reads 5 (-1).
// The gate netlist is this design's own derivation from the output sets, with
// 3-input gates at the later stages folded by rule (11) into the 9-input D.
//
// Interface: x[5:0] in; sum, c[2:0] out. Combinational, critical path three
// gates and two inverters.
module mg_c6_d1 (
  input  logic [5:0] x,
  output logic       sum,
  output logic [2:0] c
);

  logic d;

  mg_majority #(.M(3)) u_c1 (.x({x, 1'b1}), .y(c[1]));
  mg_majority #(.M(4)) u_c2 (.x({x, 3'b000}), .y(c[2]));
  mg_majority #(.M(4)) u_d  (.x({x, 1'b1, ~c[1], ~c[1]}), .y(d));
  mg_majority #(.M(1)) u_c0 (.x({d, ~c[2], 1'b0}), .y(c[0]));

  assign sum = ~c[0];

endmodule
