// mg_ec_nv: accurate 4-2 compressor (MG-EC) built from clocked non-volatile
// gates and pipelined by alternating compute phases.
//
// The three gates of MG-EC (cout = M5, carry = M7, sum = M9) form three
// pipeline stages. A phase bit toggles on every clk edge while `en` is high;
// stages 1 and 3 compute on phase 0 edges and stage 2 on phase 1 edges, so
// that each stage computes while its neighbours hold and are sensed. The
// gates' own stored states carry the intermediate results; no register sits
// between the gates. The sum gate computes on the same edge on which the cout
// gate takes the next set, so it still samples the cout of its own set.
//
// The primary inputs, and cout/carry for the aligned output, are carried along
// in ordinary registers, a choice of this design: in a stream, later stages
// need the operands of the set they are working on, not the newest ones.
//
// Handshake: in_ready is high on phase 0; a set x/cin is taken on a rising
// edge with in_valid && in_ready. Its sum, carry and cout appear two edges
// later, together with out_valid, which stays high for that phase pair; the
// values themselves stay until the next result. One set per two clk edges.
// With en low nothing computes and all state is held, which is what gating
// the compute clock of a normally-off circuit does.
// rst_n (synchronous, active low) clears only the phase and valid flags; the
// gate states are never reset.
module mg_ec_nv (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [3:0] x,
  input  logic       cin,
  output logic       out_valid,
  output logic       sum,
  output logic       carry,
  output logic       cout
);

  logic       ph;            // 0: stages 1 and 3 compute, 1: stage 2 computes
  logic       v1, v2;        // a set is in stage 1 / stage 2
  logic [4:0] xr1, xr2;      // operands travelling with the set
  logic       cout2;         // cout of the set in stage 2, for the output
  logic       g1, g2, g3;    // sensed gate states
  logic       go1, go2, go3; // compute strobes

  assign in_ready = en && !ph;
  assign go1 = en && !ph && in_valid;
  assign go2 = en && ph && v1;
  assign go3 = en && !ph && v2;

  mg_nv_gate #(.M(2)) u_g1 (.clk(clk), .compute(go1), .x({x, cin}), .y(g1));
  mg_nv_gate #(.M(3)) u_g2 (.clk(clk), .compute(go2), .x({xr1, ~g1, ~g1}), .y(g2));
  mg_nv_gate #(.M(4)) u_g3 (.clk(clk), .compute(go3), .x({xr2, ~g1, ~g1, ~g2, ~g2}), .y(g3));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph        <= 1'b0;
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else if (en) begin
      ph <= ~ph;
      if (!ph) begin
        v1        <= in_valid;
        out_valid <= v2;
        v2        <= 1'b0;
      end else begin
        v2 <= v1;
        v1 <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (go1) xr1 <= {x, cin};
    if (go2) begin
      xr2   <= xr1;
      cout2 <= g1;
    end
    if (go3) begin
      carry <= g2;
      cout  <= cout2;
    end
  end

  assign sum = g3;

  // A set can only be accepted on phase 0.
  always_ff @(posedge clk)
    if (rst_n && en && in_valid)
      assert (in_ready) else $error("mg_ec_nv: in_valid on phase 1 is ignored");

endmodule
