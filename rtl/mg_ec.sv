// mg_ec: accurate 4-2 compressor (MG-EC) from three majority gates.
//
// A 4-2 compressor adds five bits of equal weight (x0..x3, cin) into
// sum + 2*(carry + cout). Carry and cout have the same weight, so they may be
// swapped input case by input case; the truth table is rearranged so that all
// three outputs depend only on N_in, the number of input ones:
//   cout  = 1 for N_in in {3,4,5}   -> 5-input gate on the inputs
//   carry = 1 for N_in in {2,4,5}   -> 7-input gate, inputs + 2 x ~cout
//   sum   = 1 for N_in in {1,3,5}   -> 9-input gate, inputs + 2 x ~cout + 2 x ~carry
// Unlike the classic two-full-adder compressor, cout here depends on cin as
// well, so in a row of these compressors the cout -> cin link ripples.
//
// Interface: x[3:0], cin in; sum (weight 1), carry and cout (weight 2) out.
// Combinational, critical path three gates and two inverters.
module mg_ec (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);

  mg_majority #(.M(2)) u_m5 (.x({x, cin}), .y(cout));
  mg_majority #(.M(3)) u_m7 (.x({x, cin, ~cout, ~cout}), .y(carry));
  mg_majority #(.M(4)) u_m9 (.x({x, cin, ~cout, ~cout, ~carry, ~carry}), .y(sum));

endmodule
