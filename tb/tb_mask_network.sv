// tb_mask_network: self-checking test of the 200 AND gates: a line passes
// only where keep is 1, for random and all-ones/all-zeros keep words.
module tb_mask_network;
  logic [199:0] raw, keep, masked;
  int checks = 0, failures = 0;

  mask_network dut (.raw, .keep, .masked);

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int w = 0; w < 7; w++) begin raw[w*32 +: 32] = $urandom; keep[w*32 +: 32] = $urandom; end
      if (n == 0) keep = '1;
      if (n == 1) keep = '0;
      #1;
      for (int i = 0; i < 200; i++) begin
        checks++;
        if (masked[i] !== (keep[i] ? raw[i] : 1'b0)) begin failures++; $display("FAIL bit %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
