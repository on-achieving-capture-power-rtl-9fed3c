// tb_mask_counter: self-checking test of the 18-bit position counter:
// random increments and clears against a reference count, plus wrap-around.
module tb_mask_counter;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0;
  logic [17:0] count;
  int unsigned ref_cnt;
  int checks = 0, failures = 0;

  mask_counter dut (.clk, .rst_n, .clear, .inc, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    checks++; if (count !== '0) failures++;
    rst_n = 1; ref_cnt = 0;
    for (int i = 0; i < 5000; i++) begin
      inc = $urandom % 2; clear = ($urandom % 1000) == 0;
      @(posedge clk);
      if (clear) ref_cnt = 0; else if (inc) ref_cnt = (ref_cnt + 1) % (1 << 18);
      #1; checks++;
      if (count !== 18'(ref_cnt)) begin failures++; $display("FAIL i=%0d", i); end
    end
    // run to the wrap-around
    inc = 1; clear = 0;
    while (count != 18'h3FFFF) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    checks++; if (count !== '0) begin failures++; $display("FAIL wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
