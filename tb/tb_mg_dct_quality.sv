// tb_mg_dct_quality: image quality of an 8x8 DCT followed by the inverse DCT
// when the matrix products run on approximate multipliers (MG-AC1 or MG-AC2 in
// 12 to 16 low product columns, exact accumulation) or on approximate
// accumulators (MG-AC1 or MG-AC2 in 16 to 20 low sum columns, exact
// products).
//
// A generated 16x16 grey image (four 8x8 blocks, smooth shading plus a
// pseudo-random texture, values 0..250) goes through Y = C X C^T and back
// through X' = C^T Y C, each matrix element being an 8-term dot product of
// 16-bit signed operands. Scaling: C by 2^14, pixels by 64; the four passes
// keep 15, 15, 13 and 19 fraction bits off, so every operand stays in 16 bits.
// Each configuration uses one multiplier or accumulator instance per product
// or sum, one at a time. PSNR is printed for all 21 configurations (exact,
// 2 x 5 multipliers, 2 x 5 accumulators).
//
// Checks: the exact path loses only rounding (PSNR above 40 dB); in the
// multipliers MG-AC2 gives a higher PSNR than MG-AC1 at every LSPP; in the
// accumulators MG-AC1 gives a higher PSNR than MG-AC2 at every LSI; and PSNR
// does not rise as more columns are approximated.
module tb_mg_dct_quality;
  import mg_pkg::*;
  localparam int NL = 5;
  localparam int NCFG = 1 + 4 * NL;
  localparam int IMG = 16;
  int checks = 0, failures = 0;

  // instance 0 exact, 1..NL MG-AC1, NL+1..2NL MG-AC2
  logic signed [15:0] ma, mb;
  logic signed [31:0] pm [2*NL+1];
  logic [7:0][31:0] ad;
  logic [31:0] sa [2*NL+1];

  mg_approx_mult #(.LSPP(0)) u_mx (.a(ma), .b(mb), .p(pm[0]));
  mg_approx_acc #(.LSI(0)) u_ax (.d(ad), .s(sa[0]));
  for (genvar i = 0; i < NL; i++) begin : g_l
    mg_approx_mult #(.KIND(CMP_AC1), .LSPP(12 + i)) u_m1 (.a(ma), .b(mb), .p(pm[1 + i]));
    mg_approx_mult #(.KIND(CMP_AC2), .LSPP(12 + i)) u_m2 (.a(ma), .b(mb), .p(pm[1 + NL + i]));
    mg_approx_acc #(.KIND(CMP_AC1), .LSI(16 + i)) u_a1 (.d(ad), .s(sa[1 + i]));
    mg_approx_acc #(.KIND(CMP_AC2), .LSI(16 + i)) u_a2 (.d(ad), .s(sa[1 + NL + i]));
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cm [8][8];
  int img [IMG][IMG];

  function automatic int clip16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  // One dot product through multiplier instance mi and accumulator instance ai.
  task automatic dot(input int mi, input int ai, input int va [8], input int vb [8],
                     output int r);
    for (int k = 0; k < 8; k++) begin
      ma = 16'(va[k]);
      mb = 16'(vb[k]);
      #1;
      ad[k] = pm[mi];
    end
    #1;
    r = int'(sa[ai]);
  endtask

  // DCT and inverse DCT of one 8x8 block.
  task automatic round_trip(input int mi, input int ai, input int xb [8][8],
                            output int xo [8][8]);
    int t [8][8], y [8][8], va [8], vb [8], r;
    for (int u = 0; u < 8; u++)          // T = C X
      for (int c = 0; c < 8; c++) begin
        for (int k = 0; k < 8; k++) begin va[k] = cm[u][k]; vb[k] = xb[k][c] * 64; end
        dot(mi, ai, va, vb, r);
        t[u][c] = clip16(longint'(r >>> 15));
      end
    for (int u = 0; u < 8; u++)          // Y = T C^T
      for (int v = 0; v < 8; v++) begin
        for (int k = 0; k < 8; k++) begin va[k] = t[u][k]; vb[k] = cm[v][k]; end
        dot(mi, ai, va, vb, r);
        y[u][v] = clip16(longint'(r >>> 15));
      end
    for (int x = 0; x < 8; x++)          // T = C^T Y
      for (int v = 0; v < 8; v++) begin
        for (int k = 0; k < 8; k++) begin va[k] = cm[k][x]; vb[k] = y[k][v]; end
        dot(mi, ai, va, vb, r);
        t[x][v] = clip16(longint'(r >>> 13));
      end
    for (int x = 0; x < 8; x++)          // X' = T C
      for (int c = 0; c < 8; c++) begin
        for (int k = 0; k < 8; k++) begin va[k] = t[x][k]; vb[k] = cm[k][c]; end
        dot(mi, ai, va, vb, r);
        r = (r + (1 << 18)) >>> 19;
        xo[x][c] = (r < 0) ? 0 : (r > 255) ? 255 : r;
      end
  endtask

  initial begin
    real psnr [NCFG];
    int xb [8][8], xo [8][8];
    int mi, ai, h;
    real se;
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++)
        cm[u][x] = $rtoi(16384.0 * ((u == 0) ? $sqrt(0.125) : 0.5)
                          * $cos((2.0 * x + 1.0) * u * 3.14159265358979 / 16.0)
                          + ((u == 0 || $cos((2.0 * x + 1.0) * u * 3.14159265358979 / 16.0) >= 0) ? 0.5 : -0.5));
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) begin
        h = (r * 37 + c * 101 + r * c * 13) % 29;
        img[r][c] = 30 + 6 * r + 5 * c + 2 * h + ((r / 4 + c / 4) % 2) * 40;
      end
    // configuration cfg: 0 exact, 1..2NL approximate multipliers,
    // 2NL+1..4NL approximate accumulators
    for (int cfg = 0; cfg < NCFG; cfg++) begin
      mi = (cfg >= 1 && cfg <= 2 * NL) ? cfg : 0;
      ai = (cfg > 2 * NL) ? cfg - 2 * NL : 0;
      se = 0.0;
      for (int br = 0; br < IMG; br += 8)
        for (int bc = 0; bc < IMG; bc += 8) begin
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) xb[r][c] = img[br + r][bc + c];
          round_trip(mi, ai, xb, xo);
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++)
              se += real'(xo[r][c] - xb[r][c]) * real'(xo[r][c] - xb[r][c]);
        end
      se /= IMG * IMG;
      psnr[cfg] = (se == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / se);
    end
    $display("exact: PSNR %.2f dB", psnr[0]);
    for (int i = 0; i < NL; i++)
      $display("multipliers LSPP %0d: MG-AC1 %.2f dB, MG-AC2 %.2f dB",
               12 + i, psnr[1 + i], psnr[1 + NL + i]);
    for (int i = 0; i < NL; i++)
      $display("accumulators LSI %0d: MG-AC1 %.2f dB, MG-AC2 %.2f dB",
               16 + i, psnr[1 + 2 * NL + i], psnr[1 + 3 * NL + i]);
    checks++;
    if (psnr[0] < 40.0) begin
      failures++;
      $display("FAIL exact round trip only %.2f dB", psnr[0]);
    end
    for (int i = 0; i < NL; i++) begin
      checks += 2;
      if (!(psnr[1 + NL + i] > psnr[1 + i])) begin
        failures++;
        $display("FAIL multipliers: MG-AC2 not above MG-AC1 at LSPP %0d", 12 + i);
      end
      if (!(psnr[1 + 2 * NL + i] > psnr[1 + 3 * NL + i])) begin
        failures++;
        $display("FAIL accumulators: MG-AC1 not above MG-AC2 at LSI %0d", 16 + i);
      end
      if (i > 0) begin
        for (int g = 0; g < 4; g++) begin
          checks++;
          if (psnr[1 + g * NL + i] > psnr[g * NL + i] + 0.01) begin
            failures++;
            $display("FAIL PSNR rises with more approximate columns (set %0d, step %0d)", g, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
