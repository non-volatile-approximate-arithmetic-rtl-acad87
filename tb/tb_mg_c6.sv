// tb_mg_c6: exhaustive check of the three approximate 6-input compressors.
// Expected outputs are the N_in sets of the transformed truth tables:
// designs 1 and 2: sum' {0,1,3,5,6}, C0' {2,4}, C1 {3..6}, C2 {5,6};
// design 3: sum' {0,1,3,5,6}, C0' {2..6}, C1 {4,5,6}.
// The weighted value sum' + 2*(carries) must equal N_in except for all zeros
// (1) and all ones (5), which gives an error rate of 2/64 = 3.13 % and
// 0.75^6 + 0.25^6 = 17.82 % when each input is 0 with probability 0.75.
module tb_mg_c6;
  int checks = 0, failures = 0;
  logic [5:0] x;
  logic s1, s2, s3;
  logic [2:0] c1, c2;
  logic [1:0] c3;

  mg_c6_d1 u_d1 (.x(x), .sum(s1), .c(c1));
  mg_c6_d2 u_d2 (.x(x), .sum(s2), .c(c2));
  mg_c6_d3 u_d3 (.x(x), .sum(s3), .c(c3));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%b got=%0d exp=%0d", what, x, got, exp);
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
    int n, expv;
    real er50, er75;
    er50 = 0.0;
    er75 = 0.0;
    for (int i = 0; i < 64; i++) begin
      x = 6'(i);
      #1;
      n    = $countones(x);
      expv = (n == 0) ? 1 : (n == 6) ? 5 : n;
      // designs 1 and 2
      check("d1 sum", int'(s1), int'(n inside {0, 1, 3, 5, 6}));
      check("d1 C0", int'(c1[0]), int'(n inside {2, 4}));
      check("d1 C1", int'(c1[1]), int'(n >= 3));
      check("d1 C2", int'(c1[2]), int'(n >= 5));
      check("d1 value", int'(s1) + 2 * $countones(c1), expv);
      check("d2 sum", int'(s2), int'(n inside {0, 1, 3, 5, 6}));
      check("d2 c", int'(c2), int'(c1));
      check("d2 value", int'(s2) + 2 * $countones(c2), expv);
      // design 3
      check("d3 sum", int'(s3), int'(n inside {0, 1, 3, 5, 6}));
      check("d3 C0", int'(c3[0]), int'(n >= 2));
      check("d3 C1", int'(c3[1]), int'(n >= 4));
      check("d3 value", int'(s3) + 2 * $countones(c3), expv);
      if (int'(s3) + 2 * $countones(c3) != n) begin
        er50 += 1.0 / 64.0;
        er75 += (0.75 ** (6 - n)) * (0.25 ** n);
      end
    end
    checks++;
    if (100.0 * er50 < 3.12 || 100.0 * er50 > 3.13) failures++;
    checks++;
    if (100.0 * er75 < 17.81 || 100.0 * er75 > 17.83) failures++;
    $display("6-input compressor ER %.2f %% / %.2f %%", 100.0 * er50, 100.0 * er75);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
