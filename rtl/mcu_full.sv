// mcu_full: combinational mask control unit of full-mask CPS-BIST.
//
// RISKY_TV lists the N_RISKY_TV risky test vectors (vectors with at least one
// risky response bit), by index from 0. While the vector counter equals one
// of them every keep bit is 0, so the mask network forces the whole compacted
// response of that vector to 0 before the MISR; otherwise all keep bits are 1.
// The default list holds the vectors of the three risky bits of the partial-
// mask example (slice value / 3 slices per vector: 39,303, 49,208, 27,785).
// A list with no risky vector is written as one entry the counter never
// reaches.
//
// Purely combinational.
module mcu_full #(
  parameter int unsigned OUT_W      = 20,
  parameter int unsigned VEC_W      = 16,
  parameter int unsigned N_RISKY_TV = 3,
  parameter int unsigned RISKY_TV [N_RISKY_TV] = '{39303, 49208, 27785}
) (
  input  logic [VEC_W-1:0] count,
  output logic [OUT_W-1:0] keep
);

  logic risky;

  always_comb begin
    risky = 1'b0;
    for (int i = 0; i < N_RISKY_TV; i++)
      if (32'(count) == RISKY_TV[i]) risky = 1'b1;
  end

  assign keep = risky ? '0 : '1;

  initial assert (VEC_W <= 32) else $error("mcu_full: VEC_W above 32");

endmodule
