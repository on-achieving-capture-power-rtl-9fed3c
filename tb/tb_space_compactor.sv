// tb_space_compactor: self-checking test of the 200-to-20 XOR compactor.
// Output j must be the parity of inputs j, j+20, ..., j+180; checked for
// 2000 random and 200 one-hot input words.
module tb_space_compactor;
  logic [199:0] in;
  logic [19:0]  out, exp_out;
  int checks = 0, failures = 0;

  space_compactor dut (.in, .out);

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2200; n++) begin
      if (n < 200) in = 200'(1) << n;
      else for (int w = 0; w < 7; w++) in[w*32 +: 32] = $urandom;
      #1;
      for (int j = 0; j < 20; j++) begin
        exp_out[j] = 1'b0;
        for (int g = 0; g < 10; g++) exp_out[j] ^= in[g*20 + j];
      end
      checks++;
      if (out !== exp_out) begin failures++; $display("FAIL in=%h out=%h exp=%h", in, out, exp_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
