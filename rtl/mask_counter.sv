// mask_counter: position counter of the masking circuitry.
//
// In partial-mask BIST it counts scan slices of unloaded responses (value
// vector*SCAN_LEN + slice); in full-mask BIST it counts test vectors. Either
// way the mask control unit decodes its value. It is an up-counter with a
// synchronous clear and an increment enable; the BIST controller drives both
// (its increment follows SE and the scan clock). Asynchronous active-low reset.
//
// Timing: `count` is registered and shows the position of the slice (or
// vector) being unloaded during the cycle in which it is unloaded.
module mask_counter #(
  parameter int unsigned WIDTH = 18
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             inc,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else if (inc)   count <= count + 1'b1;
  end

endmodule
