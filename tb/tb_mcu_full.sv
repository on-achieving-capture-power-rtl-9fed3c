// tb_mcu_full: self-checking test of the full-mask control unit with its
// default list (vectors 39303, 49208, 27785; 16-bit counter, 20 outputs).
// Every counter value is applied; all 20 keep bits must be 0 exactly at the
// listed vectors and 1 elsewhere.
module tb_mcu_full;
  logic [15:0] count;
  logic [19:0] keep, exp_keep;
  int checks = 0, failures = 0, masked_seen = 0;

  mcu_full dut (.count, .keep);

  initial begin
    #10000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 16); v++) begin
      count = 16'(v);
      #1;
      exp_keep = (v == 39303 || v == 49208 || v == 27785) ? '0 : '1;
      checks++;
      if (keep !== exp_keep) begin failures++; $display("FAIL count=%0d", v); end
      if (keep == '0) masked_seen++;
    end
    checks++;
    if (masked_seen != 3) begin failures++; $display("FAIL masked vectors %0d", masked_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
