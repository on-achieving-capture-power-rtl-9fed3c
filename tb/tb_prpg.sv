// tb_prpg: self-checking test of the PRPG at its default 20-bit size.
// A reference LFSR (x^20 + x^17 + 1, shift towards the MSB) written here
// independently is stepped alongside the DUT; the test also checks that
// `en`=0 holds the state, `load` restores the seed, and that the sequence
// returns to the seed after exactly 2^20-1 steps (maximal length).
module tb_prpg;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [19:0] state, ref_s;
  int checks = 0, failures = 0;
  int unsigned period;

  prpg dut (.clk, .rst_n, .load, .en, .state);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: dut=%h ref=%h", what, state, ref_s); end
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ref_s = 20'h1;
    repeat (2) @(posedge clk);
    #1 check(state == 20'h1, "reset to seed");
    rst_n = 1;
    en = 1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      ref_s = {ref_s[18:0], ref_s[19] ^ ref_s[16]};
      check(state == ref_s, "step");
    end
    en = 0;
    repeat (3) @(posedge clk); #1;
    check(state == ref_s, "hold when en=0");
    load = 1; @(posedge clk); #1; load = 0;
    check(state == 20'h1, "load seed");
    en = 1; period = 0;
    do begin @(posedge clk); #1; period++; end while (state != 20'h1 && period < 2000000);
    check(period == 1048575, "maximal period");
    $display("period = %0d", period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
