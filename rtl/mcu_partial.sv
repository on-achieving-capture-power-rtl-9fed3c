// mcu_partial: combinational mask control unit of partial-mask CPS-BIST.
//
// The table of risky response bits found by capture-power-safety checking is
// given as N_RISKY pairs (RISKY_SLICE[i], RISKY_CHAIN[i]): the slice-counter
// value at which the bit is unloaded and the scan chain it leaves on. When the
// counter equals RISKY_SLICE[i], keep[RISKY_CHAIN[i]] is 0 and the mask
// network forces that chain's bit to 0 ahead of the compactor; all other keep
// bits are 1. This is the scheme's mask control unit, a case decode of the
// counter per chain, written as a parameterised table instead of generated
// per-chain case statements. The default table holds the three risky bits of
// the scheme's 4-chain, 3-slice, 50,000-vector example (chain 1 at slices
// 117,909 and 147,625; chain 3 at slice 83,357; chains counted from 0).
// A table with no risky bit is written as one entry whose slice the counter
// never reaches.
//
// Purely combinational.
module mcu_partial #(
  parameter int unsigned N_CHAINS = 200,
  parameter int unsigned CNT_W    = 18,
  parameter int unsigned N_RISKY  = 3,
  parameter int unsigned RISKY_SLICE [N_RISKY] = '{117909, 147625, 83357},
  parameter int unsigned RISKY_CHAIN [N_RISKY] = '{1, 1, 3}
) (
  input  logic [CNT_W-1:0]    count,
  output logic [N_CHAINS-1:0] keep
);

  always_comb begin
    keep = '1;
    for (int i = 0; i < N_RISKY; i++) begin
      if (RISKY_CHAIN[i] < N_CHAINS && 32'(count) == RISKY_SLICE[i])
        keep[RISKY_CHAIN[i]] = 1'b0;
    end
  end

  initial assert (CNT_W <= 32) else $error("mcu_partial: CNT_W above 32");

endmodule
