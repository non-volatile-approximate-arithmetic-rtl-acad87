// mg_cmp_row: one row of 4-2 compressors across a W-bit column range.
//
// Four bit vectors of equal column weight enter; a sum vector and a carry
// vector (already shifted up by one column) leave, so that
// sum + carry == r[0] + r[1] + r[2] + r[3] (mod 2^W) when every compressor is
// accurate. Columns below NAPPROX use the approximate compressor KIND, the
// others the accurate MG-EC. In EC and AC1 columns the compressor's cout feeds
// the cin of the next column up; AC2 has neither.
//
// LO/HI give each input row's live column range (zero outside it). A column
// gets a compressor only when two or more live bits, counting a live cin, meet
// there; otherwise its single live bit is wired straight to sum. The same rule
// is evaluated by mg_pkg::row_out to give the ranges of the outputs.
//
// Combinational. The cout -> cin link makes the row's worst path ripple.
module mg_cmp_row
  import mg_pkg::*;
#(
  parameter int        W       = 32,
  parameter cmp_kind_e KIND    = CMP_EC,
  parameter int        NAPPROX = 0,
  parameter quad_t     LO      = '{0, 0, 0, 0},
  parameter quad_t     HI      = '{W - 1, W - 1, W - 1, W - 1}
) (
  input  logic [3:0][W-1:0] r,
  output logic [W-1:0]      sum,
  output logic [W-1:0]      carry
);

  logic [W:0] chain;  // chain[i] is the cin of column i

  assign chain[0] = 1'b0;
  assign carry[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_col
    localparam bit        CMP = col_cmp(i, LO, HI, KIND, NAPPROX);
    localparam cmp_kind_e K   = col_kind(i, KIND, NAPPROX);

    logic [3:0] xin;
    logic       s_o, c_o, co_o;

    assign xin = {r[3][i], r[2][i], r[1][i], r[0][i]};

    if (CMP && K == CMP_EC) begin : g_ec
      mg_ec u_cmp (.x(xin), .cin(chain[i]), .sum(s_o), .carry(c_o), .cout(co_o));
    end else if (CMP && K == CMP_AC1) begin : g_ac1
      mg_ac1 u_cmp (.x(xin), .cin(chain[i]), .sum(s_o), .carry(c_o), .cout(co_o));
    end else if (CMP) begin : g_ac2
      mg_ac2 u_cmp (.x(xin), .sum(s_o), .carry(c_o));
      assign co_o = 1'b0;
    end else begin : g_wire
      assign s_o  = |{xin, chain[i]};
      assign c_o  = 1'b0;
      assign co_o = 1'b0;
      // At most one live bit may reach a column without a compressor.
      always_comb
        assert ($countones({xin, chain[i]}) <= 1)
        else $error("mg_cmp_row: column %0d has bits outside the declared live ranges", i);
    end

    assign sum[i]     = s_o;
    assign chain[i+1] = co_o;
    if (i + 1 < W) begin : g_carry
      assign carry[i+1] = c_o;
    end
  end

endmodule
