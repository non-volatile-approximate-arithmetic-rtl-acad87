// tb_mg_approx_acc: checks the eight-operand 32-bit approximate accumulator.
//
// Three copies are compared with the wrapping 32-bit integer sum of eight
// random addends (each bit 0 or 1 with equal probability):
//  - LSI = 0 (accurate MG-EC only) must be exact;
//  - the default (MG-AC1 in the 18 least significant columns) and an MG-AC2
//    copy with the same LSI must stay within +/-2^22.
// The mean error of each is printed; MG-AC1, whose +1 and -1 errors partly
// cancel, must show a smaller mean error magnitude than MG-AC2, whose errors
// are all -1.
module tb_mg_approx_acc;
  import mg_pkg::*;
  localparam int NRAND = 20000;
  int checks = 0, failures = 0;
  logic [7:0][31:0] d;
  logic [31:0] s_ex, s_ac1, s_ac2;

  mg_approx_acc #(.LSI(0))                  u_exact (.d(d), .s(s_ex));
  mg_approx_acc                             u_ac1   (.d(d), .s(s_ac1));
  mg_approx_acc #(.KIND(CMP_AC2), .LSI(18)) u_ac2   (.d(d), .s(s_ac2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ref_s;
    int e1, e2;
    real b1 = 0.0, b2 = 0.0;
    for (int i = 0; i < NRAND + 2; i++) begin
      for (int k = 0; k < 8; k++)
        d[k] = (i == 0) ? '0 : (i == 1) ? '1 : $urandom;
      #1;
      ref_s = '0;
      for (int k = 0; k < 8; k++) ref_s += d[k];
      e1 = int'(s_ac1 - ref_s);
      e2 = int'(s_ac2 - ref_s);
      checks++;
      if (s_ex != ref_s) begin
        failures++;
        $display("FAIL exact got %h exp %h", s_ex, ref_s);
      end
      checks++;
      if (e1 >= (1 << 22) || e1 <= -(1 << 22)) begin
        failures++;
        $display("FAIL AC1 err %0d", e1);
      end
      checks++;
      if (e2 >= (1 << 22) || e2 <= -(1 << 22)) begin
        failures++;
        $display("FAIL AC2 err %0d", e2);
      end
      b1 += real'(e1);
      b2 += real'(e2);
    end
    b1 /= (NRAND + 2);
    b2 /= (NRAND + 2);
    $display("mean error: MG-AC1-18 %.1f  MG-AC2-18 %.1f", b1, b2);
    checks++;
    if (!((b1 < 0 ? -b1 : b1) < (b2 < 0 ? -b2 : b2))) begin
      failures++;
      $display("FAIL MG-AC1 accumulator bias not below MG-AC2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
