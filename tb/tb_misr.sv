// tb_misr: self-checking test of the 20-bit MISR. A reference register
// follows sig' = {sig[18:0], sig[19]^sig[16]} ^ data for random data and
// random enables; clear and reset must return it to zero.
module tb_misr;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [19:0] data, sig, ref_sig;
  int checks = 0, failures = 0;

  misr dut (.clk, .rst_n, .clear, .en, .data, .sig);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    data = '0;
    repeat (2) @(posedge clk); #1;
    checks++; if (sig !== '0) failures++;
    rst_n = 1; ref_sig = '0;
    for (int i = 0; i < 5000; i++) begin
      en = ($urandom % 4) != 0;
      clear = ($urandom % 500) == 0;
      data = 20'($urandom);
      @(posedge clk);
      if (clear) ref_sig = '0;
      else if (en) ref_sig = {ref_sig[18:0], ref_sig[19] ^ ref_sig[16]} ^ data;
      #1;
      checks++;
      if (sig !== ref_sig) begin failures++; $display("FAIL i=%0d sig=%h ref=%h", i, sig, ref_sig); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
