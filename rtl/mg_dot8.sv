// mg_dot8: multiply-accumulate unit for 8x8 matrix products (DCT / IDCT),
// built entirely from majority-gate compressors.
//
// One output element of an 8x8 matrix product is the dot product of a row
// and a column: y = sum_k a[k] * b[k] over K = 8 pairs of 16-bit two's
// complement numbers. Each product comes from an mg_approx_mult (MG-AC2 in the
// LSPP least significant partial-product columns, MG-EC elsewhere); the eight
// 32-bit products are summed by an mg_approx_acc (MG-AC1 in the LSI least
// significant columns, MG-EC elsewhere). The choice of MG-AC2 for products and
// MG-AC1 for the accumulation follows the accuracy of each compressor for
// sparse (partial-product) and dense (evenly distributed) input bits.
//
// Timing: operands are taken when in_valid is high on a rising clk edge, and
// y with out_valid appears on the next edge (one cycle latency, one dot
// product per cycle). y holds its value while no new operands arrive.
// rst_n (active low, synchronous) clears out_valid and y.
//
// The 6-input approximate compressors, the majority-gate full adder and the
// clocked, phase-pipelined MG-EC built from non-volatile gates are stand-alone
// cells of the same family that the dot-product path does not use; they are
// brought out on their own ports (c6_*, fa_*, nv_*). The nv_* cell shares clk
// and rst_n with the dot-product path.
module mg_dot8
  import mg_pkg::*;
#(
  parameter int        K    = 8,
  parameter int        W    = 16,
  parameter int        LSPP = 15,
  parameter int        LSI  = 18
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [K-1:0][W-1:0] a,
  input  logic signed [K-1:0][W-1:0] b,
  output logic                       out_valid,
  output logic signed [2*W-1:0]      y,
  // stand-alone 6-input compressors
  input  logic [5:0]                 c6_x,
  output logic                       c6_d1_sum,
  output logic [2:0]                 c6_d1_c,
  output logic                       c6_d2_sum,
  output logic [2:0]                 c6_d2_c,
  output logic                       c6_d3_sum,
  output logic [1:0]                 c6_d3_c,
  // stand-alone full adder
  input  logic [2:0]                 fa_x,
  output logic                       fa_sum,
  output logic                       fa_cout,
  // stand-alone phase-pipelined non-volatile MG-EC
  input  logic                       nv_en,
  input  logic                       nv_in_valid,
  output logic                       nv_in_ready,
  input  logic [3:0]                 nv_x,
  input  logic                       nv_cin,
  output logic                       nv_out_valid,
  output logic                       nv_sum,
  output logic                       nv_carry,
  output logic                       nv_cout
);

  logic [K-1:0][2*W-1:0] prod;
  logic [2*W-1:0]        acc;

  for (genvar k = 0; k < K; k++) begin : g_mul
    mg_approx_mult #(.W(W), .LSPP(LSPP), .KIND(CMP_AC2)) u_mul (
      .a(a[k]), .b(b[k]), .p(prod[k])
    );
  end

  mg_approx_acc #(.N(K), .W(2 * W), .LSI(LSI), .KIND(CMP_AC1)) u_acc (
    .d(prod), .s(acc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= signed'(acc);
    end
  end

  mg_c6_d1 u_c6_d1 (.x(c6_x), .sum(c6_d1_sum), .c(c6_d1_c));
  mg_c6_d2 u_c6_d2 (.x(c6_x), .sum(c6_d2_sum), .c(c6_d2_c));
  mg_c6_d3 u_c6_d3 (.x(c6_x), .sum(c6_d3_sum), .c(c6_d3_c));

  mg_fa u_fa (.a(fa_x[0]), .b(fa_x[1]), .cin(fa_x[2]), .sum(fa_sum), .cout(fa_cout));

  mg_ec_nv u_ec_nv (
    .clk(clk), .rst_n(rst_n), .en(nv_en), .in_valid(nv_in_valid), .in_ready(nv_in_ready),
    .x(nv_x), .cin(nv_cin), .out_valid(nv_out_valid),
    .sum(nv_sum), .carry(nv_carry), .cout(nv_cout)
  );

endmodule
