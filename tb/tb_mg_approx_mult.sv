// tb_mg_approx_mult: checks the 16x16 signed compressor-tree multiplier.
//
// Three copies are compared with the integer product a*b:
//  - LSPP = 0 (only accurate MG-EC compressors) must be exact;
//  - the default (MG-AC2 in the 15 least significant columns) may only
//    under-estimate, since every MG-AC2 error is -1, and by less than 2^19;
//  - MG-AC1 in the same 15 columns must stay within +/-2^19.
// Corner operands (0, +/-1, extremes) come first, then random ones. The error
// rate, NMED (mean error distance over the largest product 2^30) and MRED are
// printed; the MG-AC2 multiplier must have the smaller NMED and MRED, the
// ordering reported for the two compressors in multipliers.
module tb_mg_approx_mult;
  import mg_pkg::*;
  localparam int NRAND = 20000;
  int checks = 0, failures = 0;
  logic signed [15:0] a, b;
  logic signed [31:0] p_ex, p_ac2, p_ac1;

  mg_approx_mult #(.LSPP(0))                  u_exact (.a(a), .b(b), .p(p_ex));
  mg_approx_mult                              u_ac2   (.a(a), .b(b), .p(p_ac2));
  mg_approx_mult #(.KIND(CMP_AC1), .LSPP(15)) u_ac1   (.a(a), .b(b), .p(p_ac1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ref_p, e2, e1;
  int ne2 = 0, ne1 = 0;
  real med2 = 0.0, med1 = 0.0, mre2 = 0.0, mre1 = 0.0;

  task automatic apply(logic signed [15:0] va, logic signed [15:0] vb);
    a = va;
    b = vb;
    #1;
    ref_p = longint'(va) * longint'(vb);
    checks++;
    if (longint'(p_ex) != ref_p) begin
      failures++;
      $display("FAIL exact %0d*%0d got %0d", va, vb, p_ex);
    end
    e2 = longint'(p_ac2) - ref_p;
    e1 = longint'(p_ac1) - ref_p;
    checks++;
    if (e2 > 0 || e2 <= -(64'sd1 << 19)) begin
      failures++;
      $display("FAIL AC2 %0d*%0d got %0d err %0d", va, vb, p_ac2, e2);
    end
    checks++;
    if (e1 >= (64'sd1 << 19) || e1 <= -(64'sd1 << 19)) begin
      failures++;
      $display("FAIL AC1 %0d*%0d got %0d err %0d", va, vb, p_ac1, e1);
    end
    if (e2 != 0) ne2++;
    if (e1 != 0) ne1++;
    med2 += (e2 < 0) ? -real'(e2) : real'(e2);
    med1 += (e1 < 0) ? -real'(e1) : real'(e1);
    if (ref_p != 0) begin
      mre2 += ((e2 < 0) ? -real'(e2) : real'(e2)) / ((ref_p < 0) ? -real'(ref_p) : real'(ref_p));
      mre1 += ((e1 < 0) ? -real'(e1) : real'(e1)) / ((ref_p < 0) ? -real'(ref_p) : real'(ref_p));
    end
  endtask

  initial begin
    logic signed [15:0] corner [6] = '{16'sd0, 16'sd1, -16'sd1, 16'sh7fff, -16'sh8000, 16'sd12345};
    int n = 0;
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++) begin
        apply(corner[i], corner[j]);
        n++;
      end
    for (int i = 0; i < NRAND; i++) begin
      apply(16'($urandom), 16'($urandom));
      n++;
    end
    med2 /= n * real'(64'd1 << 30);
    med1 /= n * real'(64'd1 << 30);
    mre2 /= n;
    mre1 /= n;
    $display("MG-AC2-15: ER %.2f %%  NMED %.3e  MRED %.3e", 100.0 * ne2 / n, med2, mre2);
    $display("MG-AC1-15: ER %.2f %%  NMED %.3e  MRED %.3e", 100.0 * ne1 / n, med1, mre1);
    checks++;
    if (!(med2 < med1 && mre2 < mre1)) begin
      failures++;
      $display("FAIL MG-AC2 multiplier not more accurate than MG-AC1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
