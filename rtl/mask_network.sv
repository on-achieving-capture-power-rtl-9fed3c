// mask_network: one AND gate per response line.
//
// masked[i] = raw[i] AND keep[i]: a line whose keep bit from the mask control
// unit is 0 reaches the compactor or MISR as 0, as in the scheme's masking
// circuitry. Purely combinational.
module mask_network #(
  parameter int unsigned WIDTH = 200
) (
  input  logic [WIDTH-1:0] raw,
  input  logic [WIDTH-1:0] keep,
  output logic [WIDTH-1:0] masked
);

  assign masked = raw & keep;

endmodule
