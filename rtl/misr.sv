// misr: multiple-input signature register that compresses the (masked,
// compacted) test responses into the BIST signature.
//
// Each enabled clock: sig <= {sig[W-2:0], ^(sig & TAPS)} ^ data, i.e. the
// Fibonacci LFSR step of the PRPG with the WIDTH response bits XORed into all
// stages. The width (20) follows the BIST configuration of the scheme; the
// polynomial x^20 + x^17 + 1 and the synchronous clear are this design's
// choices.
//
// Timing: `sig` is registered; `clear` (priority) zeroes it on the next edge.
// Asynchronous active-low reset to zero.
module misr #(
  parameter int unsigned      WIDTH = 20,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(20'h90000)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [WIDTH-1:0] data,
  output logic [WIDTH-1:0] sig
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= {sig[WIDTH-2:0], ^(sig & TAPS)} ^ data;
  end

endmodule
