// tb_mg_mult_sweep: error characteristics of the 16x16 signed multiplier with
// 12 to 16 approximate partial-product columns, for MG-AC1 and MG-AC2.
//
// Ten multipliers (two compressor kinds x five LSPP values) and an exact one
// see the same random operands. For each, the error rate and NMED (mean error
// distance over 2^30, the largest product magnitude) are printed. Checks: the
// exact multiplier matches a*b; every error stays below 2^(LSPP+4); MG-AC2
// errors are never positive; NMED grows with LSPP for both kinds; and MG-AC2
// has the smaller NMED at every LSPP.
module tb_mg_mult_sweep;
  import mg_pkg::*;
  localparam int NRAND = 5000;
  localparam int NL = 5;
  int checks = 0, failures = 0;
  logic signed [15:0] a, b;
  logic signed [31:0] p_ex;
  logic signed [31:0] p1 [NL];
  logic signed [31:0] p2 [NL];

  mg_approx_mult #(.LSPP(0)) u_exact (.a(a), .b(b), .p(p_ex));

  for (genvar i = 0; i < NL; i++) begin : g_l
    mg_approx_mult #(.KIND(CMP_AC1), .LSPP(12 + i)) u_ac1 (.a(a), .b(b), .p(p1[i]));
    mg_approx_mult #(.KIND(CMP_AC2), .LSPP(12 + i)) u_ac2 (.a(a), .b(b), .p(p2[i]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_p, e;
    int ne1 [NL], ne2 [NL];
    real md1 [NL], md2 [NL];
    for (int i = 0; i < NL; i++) begin
      ne1[i] = 0; ne2[i] = 0; md1[i] = 0.0; md2[i] = 0.0;
    end
    for (int n = 0; n < NRAND; n++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      #1;
      ref_p = longint'(a) * longint'(b);
      checks++;
      if (longint'(p_ex) != ref_p) begin
        failures++;
        $display("FAIL exact %0d*%0d got %0d", a, b, p_ex);
      end
      for (int i = 0; i < NL; i++) begin
        e = longint'(p1[i]) - ref_p;
        checks++;
        if (e >= (64'sd1 << (16 + i)) || e <= -(64'sd1 << (16 + i))) begin
          failures++;
          $display("FAIL MG-AC1-%0d %0d*%0d err %0d", 12 + i, a, b, e);
        end
        if (e != 0) ne1[i]++;
        md1[i] += (e < 0) ? -real'(e) : real'(e);
        e = longint'(p2[i]) - ref_p;
        checks++;
        if (e > 0 || e <= -(64'sd1 << (16 + i))) begin
          failures++;
          $display("FAIL MG-AC2-%0d %0d*%0d err %0d", 12 + i, a, b, e);
        end
        if (e != 0) ne2[i]++;
        md2[i] += (e < 0) ? -real'(e) : real'(e);
      end
    end
    for (int i = 0; i < NL; i++) begin
      md1[i] /= NRAND * real'(64'd1 << 30);
      md2[i] /= NRAND * real'(64'd1 << 30);
      $display("LSPP %0d: MG-AC1 ER %6.2f %% NMED %.2e | MG-AC2 ER %6.2f %% NMED %.2e",
               12 + i, 100.0 * ne1[i] / NRAND, md1[i], 100.0 * ne2[i] / NRAND, md2[i]);
      checks++;
      if (!(md2[i] < md1[i])) begin
        failures++;
        $display("FAIL MG-AC2 not more accurate at LSPP %0d", 12 + i);
      end
      if (i > 0) begin
        checks++;
        if (!(md1[i] > md1[i-1] && md2[i] > md2[i-1])) begin
          failures++;
          $display("FAIL NMED does not grow from LSPP %0d to %0d", 11 + i, 12 + i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
