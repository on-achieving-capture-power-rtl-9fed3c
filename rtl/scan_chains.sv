// scan_chains: the scan flip-flops of the BIST-ready circuit.
//
// N_CHAINS chains of SCAN_LEN mux-D scan flip-flops. q[c][0] is the flip-flop
// next to the phase shifter and q[c][SCAN_LEN-1] the one next to the
// compactor, whose value is scan_out[c]. On an enabled clock edge with SE=1
// every chain shifts one place (scan_in[c] enters q[c][0]); with SE=0 every
// flip-flop loads its functional input d[c][p] from the combinational logic
// of the circuit under test, which is what happens at the launch (T1) and
// capture (T2) pulses of launch-on-capture testing.
//
// The 200 chains follow the BIST configuration of the scheme; the chain
// length of 3 is the scan-slice count of its masking example (and the length
// a 430-flip-flop circuit needs on 200 chains). The gated scan clock SCLK is
// modelled as a clock enable, sclk_en. The flip-flops have no reset: a scan
// load overwrites them before any of their contents are compressed.
module scan_chains #(
  parameter int unsigned N_CHAINS = 200,
  parameter int unsigned SCAN_LEN = 3
) (
  input  logic                               clk,
  input  logic                               sclk_en,
  input  logic                               se,
  input  logic [N_CHAINS-1:0]                scan_in,
  input  logic [N_CHAINS-1:0][SCAN_LEN-1:0]  d,
  output logic [N_CHAINS-1:0][SCAN_LEN-1:0]  q,
  output logic [N_CHAINS-1:0]                scan_out
);

  always_ff @(posedge clk) begin
    if (sclk_en) begin
      for (int c = 0; c < N_CHAINS; c++) begin
        for (int p = 0; p < SCAN_LEN; p++) begin
          if (!se)        q[c][p] <= d[c][p];
          else if (p == 0) q[c][p] <= scan_in[c];
          else            q[c][p] <= q[c][p-1];
        end
      end
    end
  end

  for (genvar c = 0; c < N_CHAINS; c++) begin : g_so
    assign scan_out[c] = q[c][SCAN_LEN-1];
  end

endmodule
