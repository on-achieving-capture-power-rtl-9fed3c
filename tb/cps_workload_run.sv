// cps_workload_run: one BIST run sized like a benchmark workload, for
// tb_cps_bist_workload. The BIST has 200 chains of SCAN_LEN, NTV vectors and
// NR risky response bits spread over NV risky vectors. The positions are
// generated, not measured: bit j belongs to risky vector r = j mod NV, which
// is vector r*(NTV/NV) + 7; its t = j / NV-th bit is in slice t mod SCAN_LEN
// of that vector, on chain (7r + 17t) mod 200, so no bit repeats. The same
// table drives the mask control unit and the uncertain captures of
// cps_bist_env, which checks the signature.
module cps_workload_run
  import cps_bist_pkg::*;
#(
  parameter int unsigned  NTV      = 10000,
  parameter int unsigned  SCAN_LEN = 3,
  parameter int unsigned  NR       = 690,
  parameter int unsigned  NV       = 61,
  parameter mask_option_e OPT      = MASK_FULL,
  parameter string        NAME     = "run"
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int unsigned N = 200;
  typedef int unsigned bits_t [NR];
  typedef int unsigned vecs_t [NV];

  function automatic bits_t gen_slice();
    bits_t r;
    for (int j = 0; j < NR; j++)
      r[j] = ((j % NV) * (NTV / NV) + 7) * SCAN_LEN + (j / NV) % SCAN_LEN;
    return r;
  endfunction

  function automatic bits_t gen_chain();
    bits_t r;
    for (int j = 0; j < NR; j++) r[j] = (7 * (j % NV) + 17 * (j / NV)) % N;
    return r;
  endfunction

  function automatic vecs_t gen_vec();
    vecs_t r;
    for (int v = 0; v < NV; v++) r[v] = v * (NTV / NV) + 7;
    return r;
  endfunction

  localparam bits_t RS  = gen_slice();
  localparam bits_t RC  = gen_chain();
  localparam vecs_t RTV = gen_vec();

  logic start, done, se, hit;
  logic [19:0] sig;
  logic [N-1:0][SCAN_LEN-1:0] q, d;

  cps_bist_top #(.SCAN_LEN(SCAN_LEN), .NUM_TV(NTV), .MASK_OPTION(OPT),
                 .N_RISKY_BITS(NR), .RISKY_SLICE(RS), .RISKY_CHAIN(RC),
                 .N_RISKY_TV(NV), .RISKY_TV(RTV)) dut (
    .clk, .rst_n, .start, .done, .signature(sig), .se, .cut_q(q), .cut_d(d), .mask_hit(hit));

  cps_bist_env #(.N(N), .L(SCAN_LEN), .NTV(NTV), .MASK_OPT(OPT == MASK_FULL), .NR(NR),
                 .RISKY_SLICE(RS), .RISKY_CHAIN(RC), .NAME(NAME)) env (
    .clk, .rst_n, .start, .done, .signature(sig), .se, .cut_q(q), .cut_d(d),
    .mask_hit(hit), .checks, .failures, .finished);
endmodule
