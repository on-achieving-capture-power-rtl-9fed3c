// tb_mcu_partial: self-checking test of the partial-mask control unit with
// its default table (chain 1 at slices 117909 and 147625, chain 3 at 83357,
// 200 chains, 18-bit counter). Every counter value from 0 to 2^18-1 is
// applied; exactly the listed (slice, chain) bits must read 0.
module tb_mcu_partial;
  logic [17:0]  count;
  logic [199:0] keep, exp_keep;
  int checks = 0, failures = 0, masked_seen = 0;

  mcu_partial dut (.count, .keep);

  initial begin
    #10000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 18); v++) begin
      count = 18'(v);
      #1;
      exp_keep = '1;
      if (v == 117909 || v == 147625) exp_keep[1] = 1'b0;
      if (v == 83357) exp_keep[3] = 1'b0;
      checks++;
      if (keep !== exp_keep) begin failures++; $display("FAIL count=%0d", v); end
      if (keep != '1) masked_seen++;
    end
    checks++;
    if (masked_seen != 3) begin failures++; $display("FAIL masked slices %0d", masked_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
