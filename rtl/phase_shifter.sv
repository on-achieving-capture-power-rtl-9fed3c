// phase_shifter: XOR network between the PRPG and the scan-chain inputs.
//
// It spreads the IN_W PRPG bits over OUT_W scan chains so that neighbouring
// chains do not receive shifted copies of the same sequence. Every output is
// the XOR of three PRPG bits chosen by cps_bist_pkg::ps_tap() (see there for
// the rule). The sizes, 20 inputs to 200 outputs, are the BIST configuration
// of the scheme; the tap rule is this design's choice.
//
// Purely combinational.
module phase_shifter
  import cps_bist_pkg::*;
#(
  parameter int unsigned IN_W  = 20,
  parameter int unsigned OUT_W = 200
) (
  input  logic [IN_W-1:0]  prpg_state,
  output logic [OUT_W-1:0] scan_in
);

  for (genvar i = 0; i < OUT_W; i++) begin : g_out
    localparam int unsigned T0 = ps_tap(i, 0, IN_W);
    localparam int unsigned T1 = ps_tap(i, 1, IN_W);
    localparam int unsigned T2 = ps_tap(i, 2, IN_W);
    assign scan_in[i] = prpg_state[T0] ^ prpg_state[T1] ^ prpg_state[T2];
  end

  initial assert (IN_W >= 4) else $error("phase_shifter: IN_W must be at least 4");

endmodule
