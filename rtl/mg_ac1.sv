// mg_ac1: approximate 4-2 compressor (MG-AC1) from two majority gates.
//
// cout and carry are those of the accurate compressor (cout for N_in in
// {3,4,5} from a 5-input gate, carry for N_in in {2,4,5} from a 7-input gate).
// The sum is approximated by the inverted carry, i.e. 1 for N_in in {0,1,3},
// which drops the 9-input gate. Only two of the 32 input patterns are wrong:
// all zeros gives +1 and all ones gives -1.
//
// Interface: x[3:0], cin in; sum (weight 1), carry and cout (weight 2) out.
// Combinational, critical path two gates and two inverters.
module mg_ac1 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);

  mg_majority #(.M(2)) u_m5 (.x({x, cin}), .y(cout));
  mg_majority #(.M(3)) u_m7 (.x({x, cin, ~cout, ~cout}), .y(carry));

  assign sum = ~carry;

endmodule
