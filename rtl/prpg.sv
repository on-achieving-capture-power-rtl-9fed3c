// prpg: pseudo-random pattern generator of the logic BIST.
//
// A Fibonacci LFSR of WIDTH bits. Each enabled clock it shifts one place
// towards the MSB and takes in the XOR of the state bits selected by TAPS.
// The default, taps at bits 19 and 16, is the primitive polynomial
// x^20 + x^17 + 1, so the 20-bit register runs through all 2^20-1 non-zero
// states. The width (20) follows the BIST configuration of the scheme; the
// polynomial, seed and the synchronous `load` are this design's choices.
//
// Timing: `state` is registered. `load` (priority) reloads SEED on the next
// edge, `en` advances one step. Asynchronous active-low reset to SEED.
module prpg #(
  parameter int unsigned      WIDTH = 20,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(20'h90000),
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  logic feedback;
  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= {state[WIDTH-2:0], feedback};
  end

  initial assert (SEED != '0) else $error("prpg: SEED must be non-zero");

endmodule
