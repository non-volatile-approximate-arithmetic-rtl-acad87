// mg_fa: accurate full adder built from two majority gates.
//
// The carry is the 3-input majority of the inputs (set of input-one counts
// N_in in {2,3}). The sum uses a 5-input gate fed with the three inputs and two
// copies of the inverted carry: for N_in < 2 the two extra ones push the count
// to N_in+2, for N_in >= 2 they add nothing, so the gate fires for N_in in
// {1,3}. One 3-input and one 5-input gate replace the usual XOR/AND/OR network.
//
// Interface: a, b, cin in; sum, cout out. Combinational, two gate levels.
module mg_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  mg_majority #(.M(1)) u_m3 (.x({a, b, cin}), .y(cout));
  mg_majority #(.M(2)) u_m5 (.x({a, b, cin, ~cout, ~cout}), .y(sum));

endmodule
