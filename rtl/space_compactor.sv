// space_compactor: XOR space compactor between the scan-chain outputs and the
// MISR.
//
// Output j is the XOR of inputs j, j+OUT_W, j+2*OUT_W, ... With the default
// 200 inputs and 20 outputs each output combines 10 chains. The sizes are the
// BIST configuration of the scheme; the interleaved grouping is this design's
// choice. Purely combinational.
module space_compactor #(
  parameter int unsigned IN_W  = 200,
  parameter int unsigned OUT_W = 20
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);

  always_comb begin
    out = '0;
    for (int i = 0; i < IN_W; i++) out[i % OUT_W] ^= in[i];
  end

endmodule
