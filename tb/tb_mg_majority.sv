// tb_mg_majority: exhaustive check of the 3-, 5-, 7- and 9-input majority
// gates. The expected output is worked out by counting ones: a (2M+1)-input
// gate must output 1 exactly when more than M inputs are 1. Also checks the
// constant-input uses of the gate: a 3-input gate with one input tied to 0 or
// 1 is a 2-input AND or OR, a 5-input gate with two inputs tied is a 3-input
// AND or OR.
module tb_mg_majority;
  int checks = 0, failures = 0;
  logic [8:0] v;
  logic y3, y5, y7, y9, and2, or2, and3, or3;

  mg_majority #(.M(1)) u_m3 (.x(v[2:0]), .y(y3));
  mg_majority #(.M(2)) u_m5 (.x(v[4:0]), .y(y5));
  mg_majority #(.M(3)) u_m7 (.x(v[6:0]), .y(y7));
  mg_majority #(.M(4)) u_m9 (.x(v[8:0]), .y(y9));
  mg_majority #(.M(1)) u_and2 (.x({v[1:0], 1'b0}), .y(and2));
  mg_majority #(.M(1)) u_or2  (.x({v[1:0], 1'b1}), .y(or2));
  mg_majority #(.M(2)) u_and3 (.x({v[2:0], 2'b00}), .y(and3));
  mg_majority #(.M(2)) u_or3  (.x({v[2:0], 2'b11}), .y(or3));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s v=%b got=%b exp=%b", what, v, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      v = 9'(i);
      #1;
      check("M3", y3, $countones(v[2:0]) > 1);
      check("M5", y5, $countones(v[4:0]) > 2);
      check("M7", y7, $countones(v[6:0]) > 3);
      check("M9", y9, $countones(v[8:0]) > 4);
      check("AND2", and2, &v[1:0]);
      check("OR2", or2, |v[1:0]);
      check("AND3", and3, &v[2:0]);
      check("OR3", or3, |v[2:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
