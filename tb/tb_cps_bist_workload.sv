// tb_cps_bist_workload: BIST runs sized like two of the evaluated benchmark
// configurations, with both masking options:
//   b20-like: 430 flip-flops -> 200 chains of 3, 10,000 vectors,
//             690 risky response bits in 61 risky vectors;
//   b21-like: 430 flip-flops -> 200 chains of 3, 10,000 vectors,
//             1,574 risky response bits in 120 risky vectors.
// The counts are those reported for path limit 70%; the circuit logic and
// the bit positions are stand-ins (see cps_workload_run and cps_bist_env).
// Every risky capture is wrong, and each signature must still match the
// reference computed without errors.
module tb_cps_bist_workload;
  import cps_bist_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c[4], f[4];
  logic fin[4];

  cps_workload_run #(.NR(690),  .NV(61),  .OPT(MASK_PARTIAL), .NAME("b20 partial")) r0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  cps_workload_run #(.NR(690),  .NV(61),  .OPT(MASK_FULL),    .NAME("b20 full"))    r1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  cps_workload_run #(.NR(1574), .NV(120), .OPT(MASK_PARTIAL), .NAME("b21 partial")) r2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]));
  cps_workload_run #(.NR(1574), .NV(120), .OPT(MASK_FULL),    .NAME("b21 full"))    r3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .finished(fin[3]));

  initial begin
    repeat (60000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end
endmodule
