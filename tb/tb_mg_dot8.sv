// tb_mg_dot8: end-to-end test of the multiply-accumulate unit at its default
// sizes (eight 16x16 products, MG-AC2 in 15 product columns, MG-AC1 in 18
// accumulator columns).
//
// Part 1 streams random operand sets with random idle cycles. Every result
// must appear exactly one cycle after its operands, y must hold during idle
// cycles, and y must lie within 2^23 of the exact dot product (eight products
// each low by less than 2^19, plus an accumulator error below 2^22).
// Part 2 runs a two-dimensional 8x8 DCT of a smooth test image block
// (Y = C X C^T with a 2^14-scaled cosine matrix C, pixels scaled by 2^6,
// intermediate results by 2^-15, so that operands fill the 16-bit range) through the unit as 128 dot
// products, and reports the relative error against the exact integer result.
// Part 3 drives the stand-alone 6-input compressors and the full adder
// exhaustively; part 4 streams all 32 operand sets through the pipelined
// non-volatile MG-EC and holds it with its compute phases gated.
// Counted mechanisms, each of which must occur: results lower and higher than
// exact (approximation in both directions), results equal to exact,
// back-to-back operand sets, idle cycles holding y, the two approximate
// input patterns of the 6-input compressors, and the gated hold of the
// non-volatile MG-EC.
module tb_mg_dot8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [7:0][15:0] a, b;
  logic out_valid;
  logic signed [31:0] y;
  logic [5:0] c6_x;
  logic c6_d1_sum, c6_d2_sum, c6_d3_sum, fa_sum, fa_cout;
  logic [2:0] c6_d1_c, c6_d2_c, fa_x;
  logic [1:0] c6_d3_c;
  logic nv_en = 1'b0, nv_in_valid = 1'b0, nv_cin = 1'b0;
  logic nv_in_ready, nv_out_valid, nv_sum, nv_carry, nv_cout;
  logic [3:0] nv_x = '0;

  mg_dot8 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .y(y),
    .c6_x(c6_x), .c6_d1_sum(c6_d1_sum), .c6_d1_c(c6_d1_c),
    .c6_d2_sum(c6_d2_sum), .c6_d2_c(c6_d2_c), .c6_d3_sum(c6_d3_sum), .c6_d3_c(c6_d3_c),
    .fa_x(fa_x), .fa_sum(fa_sum), .fa_cout(fa_cout),
    .nv_en(nv_en), .nv_in_valid(nv_in_valid), .nv_in_ready(nv_in_ready), .nv_x(nv_x),
    .nv_cin(nv_cin), .nv_out_valid(nv_out_valid), .nv_sum(nv_sum), .nv_carry(nv_carry),
    .nv_cout(nv_cout)
  );

  always #5 clk = ~clk;

  int n_low = 0, n_high = 0, n_exact = 0, n_b2b = 0, n_hold = 0, n_c6err = 0;
  int n_nv = 0, n_nvhold = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint dot(logic signed [7:0][15:0] va, logic signed [7:0][15:0] vb);
    longint s = 0;
    for (int k = 0; k < 8; k++) s += longint'(signed'(va[k])) * longint'(signed'(vb[k]));
    return s;
  endfunction

  // Apply one operand set (or an idle cycle) and check the cycle after.
  longint last_exact;
  logic signed [31:0] last_y;
  logic prev_valid = 1'b0;

  task automatic step(bit v, logic signed [7:0][15:0] va, logic signed [7:0][15:0] vb,
                      output logic signed [31:0] res);
    longint ex, e;
    a = va;
    b = vb;
    in_valid = v;
    ex = dot(va, vb);
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("FAIL out_valid=%b expected %b", out_valid, v);
    end
    if (v) begin
      if (prev_valid) n_b2b++;
      // compare modulo 2^32, as the unit wraps
      e = longint'(signed'(32'(y - 32'(ex))));
      checks++;
      if (e >= (64'sd1 << 23) || e <= -(64'sd1 << 23)) begin
        failures++;
        $display("FAIL y=%0d exact=%0d", y, ex);
      end
      if (e < 0) n_low++;
      else if (e > 0) n_high++;
      else n_exact++;
      last_y = y;
    end else begin
      n_hold++;
      checks++;
      if (y !== last_y) begin
        failures++;
        $display("FAIL y changed while idle");
      end
    end
    prev_valid = v;
    res = y;
  endtask

  initial begin
    logic signed [7:0][15:0] va, vb, zero;
    logic signed [31:0] r;
    int cm [8][8];
    int xb [8][8];
    longint t1 [8][8];
    int t1q [8][8];
    longint yex, yap;
    real num, den;
    zero = '0;
    c6_x = '0;
    fa_x = '0;
    a = '0;
    b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    checks++;
    if (out_valid !== 1'b0 || y !== 32'sd0) begin
      failures++;
      $display("FAIL reset state");
    end
    last_y = y;

    // Part 1: random operand sets and idle cycles
    for (int i = 0; i < 400; i++) begin
      for (int k = 0; k < 8; k++) begin
        va[k] = 16'($urandom);
        vb[k] = 16'($urandom);
        if (i % 4 == 1) va[k] = 16'(signed'(int'($urandom_range(0, 255)) - 128));
        if (i % 4 == 2) vb[k] = 16'(int'($urandom_range(0, 4095)));
      end
      if (i == 5) begin va = zero; vb = zero; end
      step(($urandom_range(0, 3) != 0), va, vb, r);
    end

    // Part 2: 8x8 two-dimensional DCT, Y = C X C^T, through the unit.
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++)
        cm[u][x] = $rtoi(16384.0 * ((u == 0) ? $sqrt(0.125) : 0.5)
                          * $cos((2.0 * x + 1.0) * u * 3.14159265358979 / 16.0)
                          + ((u == 0 || $cos((2.0 * x + 1.0) * u * 3.14159265358979 / 16.0) >= 0) ? 0.5 : -0.5));
    for (int r0 = 0; r0 < 8; r0++)
      for (int c0 = 0; c0 < 8; c0++)
        xb[r0][c0] = (64 + 12 * r0 + 9 * c0 + ((r0 * c0) % 5) * 3) * 64;
    // T1 = C X (columns transformed), rescaled by 2^-15 to 16 bits
    for (int u = 0; u < 8; u++)
      for (int c0 = 0; c0 < 8; c0++) begin
        for (int k = 0; k < 8; k++) begin
          va[k] = 16'(cm[u][k]);
          vb[k] = 16'(xb[k][c0]);
        end
        step(1'b1, va, vb, r);
        t1[u][c0]  = dot(va, vb);
        t1q[u][c0] = int'(r) >>> 15;
      end
    // Y = T1 C^T, from the unit's own first-pass results (exact reference from
    // the exact first pass)
    num = 0.0;
    den = 0.0;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        for (int k = 0; k < 8; k++) begin
          va[k] = 16'(t1q[u][k]);
          vb[k] = 16'(cm[v][k]);
        end
        step(1'b1, va, vb, r);
        yap = longint'(r);
        yex = 0;
        for (int k = 0; k < 8; k++) yex += (t1[u][k] >>> 15) * longint'(cm[v][k]);
        num += real'(yap - yex) * real'(yap - yex);
        den += real'(yex) * real'(yex);
      end
    $display("8x8 DCT through the unit: relative error power %.3e (%.1f dB)",
             num / den, (num == 0.0) ? 999.0 : -10.0 * $log10(num / den));
    checks++;
    if (num / den > 1.0e-4) begin
      failures++;
      $display("FAIL DCT error too large");
    end
    step(1'b0, zero, zero, r);

    // Part 3: stand-alone compressor cells
    for (int i = 0; i < 64; i++) begin
      int n, ev;
      c6_x = 6'(i);
      fa_x = 3'(i);
      #1;
      n  = $countones(c6_x);
      ev = (n == 0) ? 1 : (n == 6) ? 5 : n;
      checks++;
      if (int'(c6_d1_sum) + 2 * $countones(c6_d1_c) != ev ||
          int'(c6_d2_sum) + 2 * $countones(c6_d2_c) != ev ||
          int'(c6_d3_sum) + 2 * $countones(c6_d3_c) != ev) begin
        failures++;
        $display("FAIL 6-input compressor x=%b", c6_x);
      end
      if (ev != n) n_c6err++;
      checks++;
      if (int'(fa_sum) + 2 * int'(fa_cout) != $countones(fa_x)) begin
        failures++;
        $display("FAIL full adder x=%b", fa_x);
      end
    end

    // Part 4: phase-pipelined non-volatile MG-EC: all 32 operand sets, each
    // result checked two edges after it was taken, then a gated hold.
    @(negedge clk);
    nv_en = 1'b1;
    for (int i = 0; i < 32; i++) begin
      #1;
      while (!nv_in_ready) @(negedge clk);
      {nv_x, nv_cin} = 5'(i);
      nv_in_valid = 1'b1;
      @(negedge clk);
      nv_in_valid = 1'b0;
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (!nv_out_valid || int'(nv_sum) + 2 * (int'(nv_carry) + int'(nv_cout)) != $countones(5'(i))) begin
        failures++;
        $display("FAIL non-volatile MG-EC set %b", 5'(i));
      end
      n_nv++;
    end
    begin
      logic [2:0] held;
      held = {nv_sum, nv_carry, nv_cout};
      nv_en = 1'b0;
      repeat (10) begin
        {nv_x, nv_cin} = 5'($urandom);
        nv_in_valid = 1'b1;
        @(negedge clk);
        checks++;
        if ({nv_sum, nv_carry, nv_cout} !== held) begin
          failures++;
          $display("FAIL non-volatile MG-EC state changed while gated");
        end
        n_nvhold++;
      end
      nv_in_valid = 1'b0;
    end

    $display("non-volatile MG-EC: %0d results, %0d gated cycles", n_nv, n_nvhold);
    if (n_nvhold == 0) begin failures++; $display("FAIL no gated hold"); end
    checks++;
    $display("results low %0d high %0d exact %0d, back-to-back %0d, idle %0d, 6-input approx %0d",
             n_low, n_high, n_exact, n_b2b, n_hold, n_c6err);
    if (n_low == 0)   begin failures++; $display("FAIL no result below exact"); end
    if (n_high == 0)  begin failures++; $display("FAIL no result above exact"); end
    if (n_exact == 0) begin failures++; $display("FAIL no exact result"); end
    if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back operands"); end
    if (n_hold == 0)  begin failures++; $display("FAIL no idle cycle"); end
    if (n_c6err != 2) begin failures++; $display("FAIL 6-input approximations %0d", n_c6err); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
