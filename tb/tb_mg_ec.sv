// tb_mg_ec: exhaustive check of the accurate 4-2 compressor. For each of the
// 32 input patterns the weighted output sum + 2*(carry + cout) must equal the
// number of input ones, and each output must follow its N_in set:
// cout {3,4,5}, carry {2,4,5}, sum {1,3,5}.
module tb_mg_ec;
  int checks = 0, failures = 0;
  logic [3:0] x;
  logic cin, sum, carry, cout;

  mg_ec dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%b cin=%b got=%0d exp=%0d", what, x, cin, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int i = 0; i < 32; i++) begin
      {cin, x} = 5'(i);
      #1;
      n = $countones({cin, x});
      check("value", int'(sum) + 2 * (int'(carry) + int'(cout)), n);
      check("cout", int'(cout), int'(n >= 3));
      check("carry", int'(carry), int'(n == 2 || n >= 4));
      check("sum", int'(sum), n % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
