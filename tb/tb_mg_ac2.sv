// tb_mg_ac2: exhaustive check of the 4-input approximate compressor MG-AC2.
// Expected: carry + sum' value equals the number of input ones except all
// ones, which gives 3. Error metrics are compared with
// P0 = 0.5: ER 6.25 %, bias -6.25 %, MED 6.25 % and
// P0 = 0.75: ER 0.39 %, bias -0.39 %, MED 0.39 % (0.25^4).
module tb_mg_ac2;
  int checks = 0, failures = 0;
  logic [3:0] x;
  logic sum, carry;

  mg_ac2 dut (.x(x), .sum(sum), .carry(carry));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%b got=%0d exp=%0d", what, x, got, exp);
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
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      n   = $countones(x);
      val = int'(sum) + 2 * int'(carry);
      check("value", val, (n == 4) ? 3 : n);
      check("carry", int'(carry), int'(n >= 2));
      err = val - n;
      for (int k = 0; k < 2; k++) begin
        pr = (p0[k] ** (4 - n)) * ((1.0 - p0[k]) ** n);
        if (err != 0) er[k] += pr;
        bias[k] += pr * err;
        med[k]  += pr * ((err < 0) ? -err : err);
      end
    end
    // With one input tied to 0 the block is an exact full adder.
    for (int i = 0; i < 8; i++) begin
      x = {1'b0, 3'(i)};
      #1;
      check("full adder", int'(sum) + 2 * int'(carry), $countones(x));
    end
    check_r("ER(0.5)", 100.0 * er[0], 6.25);
    check_r("bias(0.5)", 100.0 * bias[0], -6.25);
    check_r("MED(0.5)", 100.0 * med[0], 6.25);
    check_r("ER(0.75)", 100.0 * er[1], 0.39);
    check_r("bias(0.75)", 100.0 * bias[1], -0.39);
    check_r("MED(0.75)", 100.0 * med[1], 0.39);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
