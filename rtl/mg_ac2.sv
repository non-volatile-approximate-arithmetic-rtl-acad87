// mg_ac2: approximate 4-input, 2-output compressor (MG-AC2).
//
// The carry input and carry output of a 4-2 compressor are dropped, leaving
// four inputs and two outputs worth at most 3:
//   carry = 1 for N_in in {2,3,4}: 5-input gate on x with one constant 1
//   sum'  = 1 for N_in in {1,3,4}: 7-input gate on x, one constant 1 and two
//           copies of ~carry (the rule M3(M7(x,1..), M5(x,0..), ~M5(x,1..))
//           folded into one gate)
// The only wrong pattern is all ones, which yields 3 instead of 4, so the error
// is always -1. With one input tied to 0 the block is an exact full adder.
//
// Interface: x[3:0] in; sum (weight 1), carry (weight 2) out.
// Combinational, critical path two gates and one inverter.
module mg_ac2 (
  input  logic [3:0] x,
  output logic       sum,
  output logic       carry
);

  mg_majority #(.M(2)) u_m5 (.x({x, 1'b1}), .y(carry));
  mg_majority #(.M(3)) u_m7 (.x({x, 1'b1, ~carry, ~carry}), .y(sum));

endmodule
