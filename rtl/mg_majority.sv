// mg_majority: (2M+1)-input majority gate, the logic function of the hybrid
// spin-CMOS majority gate.
//
// In the spin-CMOS gate every input drives one NMOS/PMOS branch that sources
// +30 uA into the domain-wall strip for a logic 1 and sinks 30 uA for a 0. The
// strip switches when the algebraic sum of the branch currents reaches the
// 30 uA threshold in either direction, so with an odd number of inputs the
// sensed state is 1 exactly when more than M inputs are 1. This module models
// that current sum in units of one branch current (+1 per 1, -1 per 0) and
// thresholds it at zero, which is the same as counting the ones.
//
// Interface: x holds the 2M+1 gate inputs, y the majority. Combinational; the
// compute/sense clocking of the physical gate is not modelled here.
// M is limited to 1..4 (3- to 9-input gates), the largest fan-in the gate
// allows for reliable operation.
module mg_majority #(
  parameter int unsigned M = 1
) (
  input  logic [2*M:0] x,
  output logic         y
);

  localparam int SW = $clog2(2 * M + 2) + 2;
  localparam logic signed [SW-1:0] ONE = 1;

  if (M < 1 || M > 4) begin : g_bad_size
    $error("mg_majority: M must be 1..4 (3- to 9-input gates)");
  end

  logic signed [SW-1:0] isum;  // summed branch current, in branch units

  always_comb begin
    isum = '0;
    for (int i = 0; i <= 2 * M; i++)
      isum = x[i] ? isum + ONE : isum - ONE;
    y = (isum > 0);
  end

endmodule
