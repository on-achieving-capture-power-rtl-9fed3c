// tb_scan_chains: self-checking test of the scan flip-flops (8 chains of 3).
// Random cycles of shift (SE=1), capture (SE=0) and idle (sclk_en=0) are
// applied; a reference array updated here decides each flip-flop's value
// and every chain output is compared after each edge.
module tb_scan_chains;
  localparam int N = 8, L = 3;
  logic clk = 0, sclk_en, se;
  logic [N-1:0] si, so;
  logic [N-1:0][L-1:0] d, q;
  bit   ref_q [N][L];
  int checks = 0, failures = 0;

  scan_chains #(.N_CHAINS(N), .SCAN_LEN(L)) dut (.clk, .sclk_en, .se, .scan_in(si), .d, .q, .scan_out(so));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // fill both the DUT and the reference by N*L... first L shifts
    sclk_en = 1; se = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      if (cyc >= L) begin
        sclk_en = ($urandom % 8) != 0;
        se      = ($urandom % 3) != 0;
      end
      si = N'($urandom);
      d  = (N*L)'($urandom);
      @(posedge clk);
      if (sclk_en) begin
        for (int c = 0; c < N; c++)
          for (int p = L - 1; p >= 0; p--)
            ref_q[c][p] = !se ? d[c][p] : (p == 0 ? si[c] : ref_q[c][p-1]);
      end
      #1;
      if (cyc >= L) begin
        for (int c = 0; c < N; c++) begin
          checks++;
          if (so[c] !== ref_q[c][L-1]) begin failures++; $display("FAIL cyc %0d chain %0d", cyc, c); end
          for (int p = 0; p < L; p++) begin
            checks++;
            if (q[c][p] !== ref_q[c][p]) failures++;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
