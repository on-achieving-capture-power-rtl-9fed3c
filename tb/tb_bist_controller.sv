// tb_bist_controller: self-checking test of the LOC BIST sequencer.
// A small instance (SCAN_LEN=4, NUM_TV=5) is compared cycle by cycle with a
// schedule built here: NUM_TV+1 shift phases of SCAN_LEN cycles, the first
// without unload, each of the first NUM_TV followed by launch (T1) and
// capture (T2) with SE=0. A default-sized instance (3 x 50,000) is run to
// done and its cycle count compared with (NUM_TV+1)*SCAN_LEN + 2*NUM_TV.
// Restart from DONE is also checked.
module tb_bist_controller;
  localparam int L = 4, NTV = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic init, se, sclk_en, prpg_en, unload, slice_inc, vec_inc, launch, capture, done;
  logic init_d, se_d, sclk_en_d, prpg_en_d, unload_d, slice_inc_d, vec_inc_d, launch_d, capture_d, done_d;
  int checks = 0, failures = 0;

  typedef struct packed {
    logic se, sclk_en, prpg_en, unload, vec_inc, launch, capture, done;
  } exp_t;
  exp_t sched[$];

  bist_controller #(.SCAN_LEN(L), .NUM_TV(NTV)) dut (
    .clk, .rst_n, .start, .init, .se, .sclk_en, .prpg_en, .unload, .slice_inc,
    .vec_inc, .launch, .capture, .done);

  bist_controller dut_def (
    .clk, .rst_n, .start, .init(init_d), .se(se_d), .sclk_en(sclk_en_d), .prpg_en(prpg_en_d),
    .unload(unload_d), .slice_inc(slice_inc_d), .vec_inc(vec_inc_d), .launch(launch_d),
    .capture(capture_d), .done(done_d));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_small();
    exp_t e;
    for (int ph = 0; ph <= NTV; ph++) begin
      for (int s = 0; s < L; s++) begin
        e = '{se:1, sclk_en:1, prpg_en:1, unload:(ph != 0), vec_inc:(ph != 0 && s == L-1),
              launch:0, capture:0, done:0};
        sched.push_back(e);
      end
      if (ph < NTV) begin
        sched.push_back('{se:0, sclk_en:1, prpg_en:0, unload:0, vec_inc:0, launch:1, capture:0, done:0});
        sched.push_back('{se:0, sclk_en:1, prpg_en:0, unload:0, vec_inc:0, launch:0, capture:1, done:0});
      end
    end
    sched.push_back('{se:1, sclk_en:0, prpg_en:0, unload:0, vec_inc:0, launch:0, capture:0, done:1});
    start = 1; #1;
    check(init == 1'b1, "init with start");
    @(posedge clk); #1; start = 0;
    foreach (sched[i]) begin
      e = '{se, sclk_en, prpg_en, unload, vec_inc, launch, capture, done};
      check(e == sched[i], $sformatf("schedule cycle %0d", i));
      check(slice_inc == unload, "slice_inc = unload");
      check(init == 1'b0, "no init while running");
      @(posedge clk); #1;
    end
    check(done == 1'b1, "done holds");
    sched.delete();
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int unsigned cycles;
    repeat (2) @(negedge clk);
    check(!done && sclk_en == 1'b0, "idle after reset");
    rst_n = 1;
    @(negedge clk);
    run_small();
    // restart from DONE
    @(negedge clk);
    run_small();
    // default size: count cycles from start to done
    wait (done_d);
    @(negedge clk);
    start = 1; @(posedge clk); #1; start = 0;
    cycles = 0;
    while (!done_d) begin @(posedge clk); #1; cycles++; end
    check(cycles == 50001 * 3 + 2 * 50000, "default-size test length");
    $display("default-size test: %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
