// mg_nv_gate: clocked, non-volatile majority gate.
//
// The spin-CMOS gate works in two phases. In the compute phase the input
// currents move the domain wall, and its position, stored magnetically, is the
// gate's result. In the sense phase the stored state is read out through a
// resistive divider and an inverter and drives the next gate. The state needs
// no supply to persist, so the gate is its own pipeline register.
//
// Here the domain-wall state is a flip-flop `dw`, loaded with the
// (2M+1)-input majority of x on a rising clk edge while `compute` is high and
// held otherwise. `y` is the sensed state. There is deliberately no reset: like
// the magnetic state it models, dw keeps its last value for as long as the
// gate is not computing, including across power-down of the surrounding logic.
//
// Interface: clk, compute, x[2M:0] in; y out. One edge of compute latency.
module mg_nv_gate #(
  parameter int unsigned M = 1
) (
  input  logic         clk,
  input  logic         compute,
  input  logic [2*M:0] x,
  output logic         y
);

  logic maj;
  logic dw;  // domain-wall state

  mg_majority #(.M(M)) u_maj (.x(x), .y(maj));

  always_ff @(posedge clk)
    if (compute) dw <= maj;

  assign y = dw;

endmodule
