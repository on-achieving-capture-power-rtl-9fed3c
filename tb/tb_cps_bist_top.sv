// tb_cps_bist_top: end-to-end test of the capture-power-safe BIST.
//  - partial-mask and full-mask at reduced size (40 chains of 3, 20-bit PRPG
//    and MISR, 300 vectors) with six risky response bits (two in one slice,
//    one in the very last slice). Every risky capture is wrong, and each
//    signature must still equal the error-free reference;
//  - the same errors on a BIST whose mask tables never match: its signature
//    must come out wrong, and partial and full signatures must differ;
//  - the size of the scheme's masking example: 4 chains of 3, 50,000
//    vectors, its three risky bits, partial-mask, 3 compacted lines into a
//    3-bit MISR (x^3 + x^2 + 1).
// See cps_bist_env for the checks made on each run.
module tb_cps_bist_top;
  import cps_bist_pkg::*;
  localparam int unsigned N = 40, L = 3, NTV = 300, NR = 6;
  localparam int unsigned RS [NR] = '{5, 17, 17, 100, 451, 899};
  localparam int unsigned RC [NR] = '{1, 2, 7, 39, 0, 20};
  localparam int unsigned RTV [5] = '{1, 5, 33, 150, 299};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // partial-mask instance
  logic p_start, p_done, p_se, p_hit, p_fin;
  logic [19:0] p_sig;
  logic [N-1:0][L-1:0] p_q, p_d;
  int p_checks, p_fail;

  cps_bist_top #(.N_CHAINS(N), .SCAN_LEN(L), .NUM_TV(NTV), .MASK_OPTION(MASK_PARTIAL),
                 .N_RISKY_BITS(NR), .RISKY_SLICE(RS), .RISKY_CHAIN(RC),
                 .N_RISKY_TV(5), .RISKY_TV(RTV)) dut_p (
    .clk, .rst_n, .start(p_start), .done(p_done), .signature(p_sig), .se(p_se),
    .cut_q(p_q), .cut_d(p_d), .mask_hit(p_hit));

  cps_bist_env #(.N(N), .L(L), .NTV(NTV), .MASK_OPT(1'b0), .NR(NR),
                 .RISKY_SLICE(RS), .RISKY_CHAIN(RC), .NAME("partial")) env_p (
    .clk, .rst_n, .start(p_start), .done(p_done), .signature(p_sig), .se(p_se),
    .cut_q(p_q), .cut_d(p_d), .mask_hit(p_hit), .checks(p_checks), .failures(p_fail),
    .finished(p_fin));

  // full-mask instance
  logic f_start, f_done, f_se, f_hit, f_fin;
  logic [19:0] f_sig;
  logic [N-1:0][L-1:0] f_q, f_d;
  int f_checks, f_fail;

  cps_bist_top #(.N_CHAINS(N), .SCAN_LEN(L), .NUM_TV(NTV), .MASK_OPTION(MASK_FULL),
                 .N_RISKY_BITS(NR), .RISKY_SLICE(RS), .RISKY_CHAIN(RC),
                 .N_RISKY_TV(5), .RISKY_TV(RTV)) dut_f (
    .clk, .rst_n, .start(f_start), .done(f_done), .signature(f_sig), .se(f_se),
    .cut_q(f_q), .cut_d(f_d), .mask_hit(f_hit));

  cps_bist_env #(.N(N), .L(L), .NTV(NTV), .MASK_OPT(1'b1), .NR(NR),
                 .RISKY_SLICE(RS), .RISKY_CHAIN(RC), .NAME("full")) env_f (
    .clk, .rst_n, .start(f_start), .done(f_done), .signature(f_sig), .se(f_se),
    .cut_q(f_q), .cut_d(f_d), .mask_hit(f_hit), .checks(f_checks), .failures(f_fail),
    .finished(f_fin));

  // the same errors on a BIST whose tables never match: no masking
  localparam int unsigned NONE_BIT [1] = '{NTV * L};
  localparam int unsigned NONE_CH  [1] = '{0};
  localparam int unsigned NONE_TV  [1] = '{NTV};
  logic u_start, u_done, u_se, u_hit, u_fin;
  logic [19:0] u_sig;
  logic [N-1:0][L-1:0] u_q, u_d;
  int u_checks, u_fail;

  cps_bist_top #(.N_CHAINS(N), .SCAN_LEN(L), .NUM_TV(NTV), .MASK_OPTION(MASK_PARTIAL),
                 .N_RISKY_BITS(1), .RISKY_SLICE(NONE_BIT), .RISKY_CHAIN(NONE_CH),
                 .N_RISKY_TV(1), .RISKY_TV(NONE_TV)) dut_u (
    .clk, .rst_n, .start(u_start), .done(u_done), .signature(u_sig), .se(u_se),
    .cut_q(u_q), .cut_d(u_d), .mask_hit(u_hit));

  cps_bist_env #(.N(N), .L(L), .NTV(NTV), .MASK_OPT(1'b0), .NR(NR),
                 .RISKY_SLICE(RS), .RISKY_CHAIN(RC), .MASKED(1'b0), .NAME("no mask")) env_u (
    .clk, .rst_n, .start(u_start), .done(u_done), .signature(u_sig), .se(u_se),
    .cut_q(u_q), .cut_d(u_d), .mask_hit(u_hit), .checks(u_checks), .failures(u_fail),
    .finished(u_fin));

  // the scheme's masking example: 4 chains, 3 slices, 50,000 vectors, the
  // default three risky bits, compacted to 3 lines (x^3 + x^2 + 1 MISR)
  logic e_start, e_done, e_se, e_hit, e_fin;
  logic [2:0] e_sig;
  logic [3:0][2:0] e_q, e_d;
  int e_checks, e_fail;

  cps_bist_top #(.N_CHAINS(4), .MISR_W(3), .MISR_TAPS(3'b110), .MASK_OPTION(MASK_PARTIAL)) dut_e (
    .clk, .rst_n, .start(e_start), .done(e_done), .signature(e_sig), .se(e_se),
    .cut_q(e_q), .cut_d(e_d), .mask_hit(e_hit));

  cps_bist_env #(.N(4), .MW(3), .MTAPS(3'b110), .MASK_OPT(1'b0), .NAME("example")) env_e (
    .clk, .rst_n, .start(e_start), .done(e_done), .signature(e_sig), .se(e_se),
    .cut_q(e_q), .cut_d(e_d), .mask_hit(e_hit), .checks(e_checks), .failures(e_fail),
    .finished(e_fin));

  int checks, failures;

  initial begin
    repeat (300000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", p_checks + f_checks + u_checks + e_checks, p_fail + f_fail + u_fail + e_fail + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (p_fin && f_fin && u_fin && e_fin);
    checks = p_checks + f_checks + u_checks + e_checks + 1;
    failures = p_fail + f_fail + u_fail + e_fail;
    // the two options differ in what they mask, so their signatures must differ
    if (p_sig == f_sig) begin failures++; $display("FAIL partial and full signatures equal"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
