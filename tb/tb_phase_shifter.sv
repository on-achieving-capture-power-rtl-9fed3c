// tb_phase_shifter: self-checking test of the 20-to-200 phase shifter.
// Each output must equal the XOR of its three PRPG bits a = i%20,
// a+1+(k%10), a+11+(k%9) (mod 20, k = i/20), computed here for 2000 random
// PRPG states and for every one-hot state (which checks each tap alone).
module tb_phase_shifter;
  localparam int IN_W = 20, OUT_W = 200;
  logic [IN_W-1:0]  st;
  logic [OUT_W-1:0] so, exp_so;
  int checks = 0, failures = 0;

  phase_shifter dut (.prpg_state(st), .scan_in(so));

  function automatic logic [OUT_W-1:0] model(logic [IN_W-1:0] s);
    logic [OUT_W-1:0] r;
    for (int i = 0; i < OUT_W; i++) begin
      int a, k;
      a = i % IN_W; k = i / IN_W;
      r[i] = s[a] ^ s[(a + 1 + k % 10) % IN_W] ^ s[(a + 11 + k % 9) % IN_W];
    end
    return r;
  endfunction

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < IN_W + 2000; n++) begin
      st = (n < IN_W) ? IN_W'(1) << n : IN_W'($urandom);
      #1 exp_so = model(st);
      checks++;
      if (so !== exp_so) begin failures++; $display("FAIL st=%h", st); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
