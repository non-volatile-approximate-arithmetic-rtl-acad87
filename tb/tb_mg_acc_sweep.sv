// tb_mg_acc_sweep: error characteristics of the eight-operand 32-bit
// accumulator with 16 to 20 approximate least significant columns, for
// MG-AC1 and MG-AC2, on random addends whose bits are 0 or 1 with equal
// probability.
//
// For each of the ten accumulators the mean error and mean error distance are
// printed. Checks: the exact accumulator (LSI = 0) matches the integer sum;
// every error stays below 2^(LSI+4) in magnitude; the mean error distance
// grows with LSI; and MG-AC1 has the smaller mean error magnitude at every LSI,
// as its +1 and -1 errors partly cancel while MG-AC2's are all -1.
module tb_mg_acc_sweep;
  import mg_pkg::*;
  localparam int NRAND = 5000;
  localparam int NL = 5;
  int checks = 0, failures = 0;
  logic [7:0][31:0] d;
  logic [31:0] s_ex;
  logic [31:0] s1 [NL];
  logic [31:0] s2 [NL];

  mg_approx_acc #(.LSI(0)) u_exact (.d(d), .s(s_ex));

  for (genvar i = 0; i < NL; i++) begin : g_l
    mg_approx_acc #(.KIND(CMP_AC1), .LSI(16 + i)) u_ac1 (.d(d), .s(s1[i]));
    mg_approx_acc #(.KIND(CMP_AC2), .LSI(16 + i)) u_ac2 (.d(d), .s(s2[i]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ref_s;
    longint e;
    real b1 [NL], b2 [NL], m1 [NL], m2 [NL];
    for (int i = 0; i < NL; i++) begin
      b1[i] = 0.0; b2[i] = 0.0; m1[i] = 0.0; m2[i] = 0.0;
    end
    for (int n = 0; n < NRAND; n++) begin
      for (int k = 0; k < 8; k++) d[k] = $urandom;
      #1;
      ref_s = '0;
      for (int k = 0; k < 8; k++) ref_s += d[k];
      checks++;
      if (s_ex != ref_s) begin
        failures++;
        $display("FAIL exact got %h exp %h", s_ex, ref_s);
      end
      for (int i = 0; i < NL; i++) begin
        e = longint'(signed'(s1[i] - ref_s));
        checks++;
        if (e >= (64'sd1 << (20 + i)) || e <= -(64'sd1 << (20 + i))) begin
          failures++;
          $display("FAIL MG-AC1-%0d err %0d", 16 + i, e);
        end
        b1[i] += real'(e);
        m1[i] += (e < 0) ? -real'(e) : real'(e);
        e = longint'(signed'(s2[i] - ref_s));
        checks++;
        if (e >= (64'sd1 << (20 + i)) || e <= -(64'sd1 << (20 + i))) begin
          failures++;
          $display("FAIL MG-AC2-%0d err %0d", 16 + i, e);
        end
        b2[i] += real'(e);
        m2[i] += (e < 0) ? -real'(e) : real'(e);
      end
    end
    for (int i = 0; i < NL; i++) begin
      b1[i] /= NRAND; b2[i] /= NRAND; m1[i] /= NRAND; m2[i] /= NRAND;
      $display("LSI %0d: MG-AC1 mean err %10.1f MED %10.1f | MG-AC2 mean err %10.1f MED %10.1f",
               16 + i, b1[i], m1[i], b2[i], m2[i]);
      checks++;
      if (!((b1[i] < 0 ? -b1[i] : b1[i]) < (b2[i] < 0 ? -b2[i] : b2[i]))) begin
        failures++;
        $display("FAIL MG-AC1 bias not below MG-AC2 at LSI %0d", 16 + i);
      end
      if (i > 0) begin
        checks++;
        if (!(m1[i] > m1[i-1] && m2[i] > m2[i-1])) begin
          failures++;
          $display("FAIL MED does not grow from LSI %0d to %0d", 15 + i, 16 + i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
