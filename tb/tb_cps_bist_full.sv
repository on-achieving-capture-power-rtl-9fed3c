// tb_cps_bist_full: the BIST at its default configuration (full-mask, 200
// chains of 3, 20-bit PRPG and MISR, 50,000 vectors, three risky response
// bits in vectors 27785, 39303 and 49208) runs one complete test, 250,003
// cycles, with uncertain values at the risky bits; the signature must match
// the reference computed without them. See cps_bist_env for the checks.
module tb_cps_bist_full;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done, se, hit, fin;
  logic [19:0] sig;
  logic [199:0][2:0] q, d;
  int checks, failures;

  cps_bist_top dut (
    .clk, .rst_n, .start, .done, .signature(sig), .se, .cut_q(q), .cut_d(d), .mask_hit(hit));

  cps_bist_env #(.NAME("default")) env (
    .clk, .rst_n, .start, .done, .signature(sig), .se, .cut_q(q), .cut_d(d),
    .mask_hit(hit), .checks, .failures, .finished(fin));

  initial begin
    repeat (300000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
