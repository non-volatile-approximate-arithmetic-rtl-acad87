// tb_mg_ac1: exhaustive check of the approximate 4-2 compressor MG-AC1.
// Expected: the output value equals the number of input ones except for all
// zeros (+1) and all ones (-1). The testbench also accumulates the error
// metrics over all 32 patterns, weighting each pattern by its probability
// when every input is 0 with probability P0, and compares them with
// P0 = 0.5: ER 6.25 %, bias 0, MED 6.25 % and
// P0 = 0.75: ER 23.83 %, bias 23.63 %, MED 23.83 %
// (ER = 0.75^5 + 0.25^5, bias = 0.75^5 - 0.25^5).
module tb_mg_ac1;
  int checks = 0, failures = 0;
  logic [3:0] x;
  logic cin, sum, carry, cout;

  mg_ac1 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%b cin=%b got=%0d exp=%0d", what, x, cin, got, exp);
    end
  endtask

  task automatic check_r(string what, real got, real exp);
    checks++;
    if (got - exp > 0.01 || exp - got > 0.01) begin
      failures++;
      $display("FAIL %s got=%f exp=%f", what, got, exp);
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
    int n, val, err;
    real er[2], bias[2], med[2], pr, p0[2];
    p0[0] = 0.5;
    p0[1] = 0.75;
    for (int k = 0; k < 2; k++) begin
      er[k] = 0.0; bias[k] = 0.0; med[k] = 0.0;
    end
    for (int i = 0; i < 32; i++) begin
      {cin, x} = 5'(i);
      #1;
      n   = $countones({cin, x});
      val = int'(sum) + 2 * (int'(carry) + int'(cout));
      check("value", val, (n == 0) ? 1 : (n == 5) ? 4 : n);
      check("cout", int'(cout), int'(n >= 3));
      check("carry", int'(carry), int'(n == 2 || n >= 4));
      err = val - n;
      for (int k = 0; k < 2; k++) begin
        pr = (p0[k] ** (5 - n)) * ((1.0 - p0[k]) ** n);
        if (err != 0) er[k] += pr;
        bias[k] += pr * err;
        med[k]  += pr * ((err < 0) ? -err : err);
      end
    end
    check_r("ER(0.5)", 100.0 * er[0], 6.25);
    check_r("bias(0.5)", 100.0 * bias[0], 0.0);
    check_r("MED(0.5)", 100.0 * med[0], 6.25);
    check_r("ER(0.75)", 100.0 * er[1], 23.828);
    check_r("bias(0.75)", 100.0 * bias[1], 23.633);
    check_r("MED(0.75)", 100.0 * med[1], 23.828);
    $display("MG-AC1 ER %.2f/%.2f %% bias %.2f/%.2f %% MED %.2f/%.2f %%",
             100.0 * er[0], 100.0 * er[1], 100.0 * bias[0], 100.0 * bias[1],
             100.0 * med[0], 100.0 * med[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
