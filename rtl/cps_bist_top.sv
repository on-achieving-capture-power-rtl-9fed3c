// cps_bist_top: capture-power-safe at-speed scan-based logic BIST (CPS-BIST).
//
// Launch-on-capture at-speed testing can draw so much current at the launch
// pulse that a long sensitized path, surrounded by heavy switching, misses
// timing at the capture pulse. A good chip then captures an uncertain value
// ("risky response bit") and its BIST signature is wrong. CPS-BIST does not
// try to lower that power; it knows from design-time checking where the
// risky bits will be, and masks them to 0 before they reach the MISR.
//
// Datapath: PRPG -> phase shifter -> N_CHAINS scan chains of SCAN_LEN
// flip-flops -> space compactor -> MISR, run by bist_controller. The
// combinational logic of the circuit under test is outside this module: the
// scan flip-flop outputs leave on cut_q and its responses return on cut_d.
// The masking circuitry is one of two options, chosen by MASK_OPTION:
//   MASK_PARTIAL  a slice counter (vector*SCAN_LEN + slice, 18 bits for the
//                 default 50,000 vectors x 3 slices) drives mcu_partial, and
//                 N_CHAINS AND gates in front of the compactor clear exactly
//                 the listed risky bits.
//   MASK_FULL     a vector counter drives mcu_full, and MISR_W AND gates
//                 between compactor and MISR clear the whole compacted
//                 response of each listed risky vector.
// Full-mask is the default, being the option the scheme recommends for
// practical use (smaller, with similar fault-coverage loss).
//
// Interface: pulse `start` for one cycle; `done` rises after
// (NUM_TV+1)*SCAN_LEN + 2*NUM_TV cycles and `signature` then holds the final
// MISR value. `se` is the scan enable seen by the circuit under test;
// `mask_hit` is 1 in unload cycles in which at least one response line is
// masked. Default sizes are the scheme's BIST configuration (200 chains,
// 20-bit PRPG and MISR, 20-to-200 phase shifter, 200-to-20 compactor,
// 50,000 vectors); the chain length 3, the polynomials and the risky tables
// are this design's defaults (see the sub-modules).
module cps_bist_top
  import cps_bist_pkg::*;
#(
  parameter int unsigned  N_CHAINS     = 200,
  parameter int unsigned  SCAN_LEN     = 3,
  parameter int unsigned  PRPG_W       = 20,
  parameter int unsigned  MISR_W       = 20,
  parameter int unsigned  NUM_TV       = 50000,
  parameter mask_option_e MASK_OPTION  = MASK_FULL,
  parameter logic [PRPG_W-1:0] PRPG_TAPS = PRPG_W'(20'h90000),
  parameter logic [PRPG_W-1:0] PRPG_SEED = PRPG_W'(1),
  parameter logic [MISR_W-1:0] MISR_TAPS = MISR_W'(20'h90000),
  // partial-mask table: (slice counter value, chain) of each risky response bit
  parameter int unsigned  N_RISKY_BITS = 3,
  parameter int unsigned  RISKY_SLICE [N_RISKY_BITS] = '{117909, 147625, 83357},
  parameter int unsigned  RISKY_CHAIN [N_RISKY_BITS] = '{1, 1, 3},
  // full-mask table: index of each risky test vector
  parameter int unsigned  N_RISKY_TV   = 3,
  parameter int unsigned  RISKY_TV [N_RISKY_TV] = '{39303, 49208, 27785}
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  output logic                              done,
  output logic [MISR_W-1:0]                 signature,
  // to and from the combinational logic of the circuit under test
  output logic                              se,
  output logic [N_CHAINS-1:0][SCAN_LEN-1:0] cut_q,
  input  logic [N_CHAINS-1:0][SCAN_LEN-1:0] cut_d,
  output logic                              mask_hit
);

  localparam int unsigned SLICE_W = clog2_min1(longint'(NUM_TV) * SCAN_LEN);
  localparam int unsigned VEC_W   = clog2_min1(longint'(NUM_TV));

  logic init, sclk_en, prpg_en, unload, slice_inc, vec_inc;
  logic [PRPG_W-1:0]   prpg_state;
  logic [N_CHAINS-1:0] scan_in, scan_out;
  logic [MISR_W-1:0]   misr_in;

  bist_controller #(.SCAN_LEN(SCAN_LEN), .NUM_TV(NUM_TV)) u_ctrl (
    .clk, .rst_n, .start, .init, .se, .sclk_en, .prpg_en, .unload,
    .slice_inc, .vec_inc, .launch(), .capture(), .done
  );

  prpg #(.WIDTH(PRPG_W), .TAPS(PRPG_TAPS), .SEED(PRPG_SEED)) u_prpg (
    .clk, .rst_n, .load(init), .en(prpg_en), .state(prpg_state)
  );

  phase_shifter #(.IN_W(PRPG_W), .OUT_W(N_CHAINS)) u_ps (
    .prpg_state, .scan_in
  );

  scan_chains #(.N_CHAINS(N_CHAINS), .SCAN_LEN(SCAN_LEN)) u_chains (
    .clk, .sclk_en, .se, .scan_in, .d(cut_d), .q(cut_q), .scan_out
  );

  if (MASK_OPTION == MASK_PARTIAL) begin : g_partial
    logic [SLICE_W-1:0]  slice_cnt;
    logic [N_CHAINS-1:0] keep, masked;

    mask_counter #(.WIDTH(SLICE_W)) u_cnt (
      .clk, .rst_n, .clear(init), .inc(slice_inc), .count(slice_cnt)
    );
    mcu_partial #(
      .N_CHAINS(N_CHAINS), .CNT_W(SLICE_W), .N_RISKY(N_RISKY_BITS),
      .RISKY_SLICE(RISKY_SLICE), .RISKY_CHAIN(RISKY_CHAIN)
    ) u_mcu (.count(slice_cnt), .keep);
    mask_network #(.WIDTH(N_CHAINS)) u_mask (.raw(scan_out), .keep, .masked);
    space_compactor #(.IN_W(N_CHAINS), .OUT_W(MISR_W)) u_comp (
      .in(masked), .out(misr_in)
    );
    assign mask_hit = unload && !(&keep);
  end else begin : g_full
    logic [VEC_W-1:0]  vec_cnt;
    logic [MISR_W-1:0] compacted, keep;

    mask_counter #(.WIDTH(VEC_W)) u_cnt (
      .clk, .rst_n, .clear(init), .inc(vec_inc), .count(vec_cnt)
    );
    mcu_full #(
      .OUT_W(MISR_W), .VEC_W(VEC_W), .N_RISKY_TV(N_RISKY_TV), .RISKY_TV(RISKY_TV)
    ) u_mcu (.count(vec_cnt), .keep);
    space_compactor #(.IN_W(N_CHAINS), .OUT_W(MISR_W)) u_comp (
      .in(scan_out), .out(compacted)
    );
    mask_network #(.WIDTH(MISR_W)) u_mask (.raw(compacted), .keep, .masked(misr_in));
    assign mask_hit = unload && !(&keep);
  end

  misr #(.WIDTH(MISR_W), .TAPS(MISR_TAPS)) u_misr (
    .clk, .rst_n, .clear(init), .en(unload), .data(misr_in), .sig(signature)
  );

endmodule
