// cps_bist_env: test environment for cps_bist_top, used by the end-to-end and
// full-size testbenches. It sits beside the BIST and plays the parts that are
// not in the RTL:
//  - a stand-in for the combinational logic of the circuit under test:
//    d[c][p] = q[c][p] ^ (q[c+1][p] & q[c][p+1]) ^ q[c+3][p+2]
//              ^ (q[c+5][p] | q[c+2][p+1])     (indices modulo N and L);
//  - excessive capture power: at the capture pulse T2 of every risky vector
//    it inverts the value captured by each risky flip-flop (an uncertain
//    value in its worst case: always wrong), and with RANDOM_ERR=1 it
//    inverts it only when a fresh random bit is 1. Risky bit i is unloaded at slice RISKY_SLICE[i] on
//    chain RISKY_CHAIN[i], i.e. it is flip-flop (chain, SCAN_LEN-1-slice%L)
//    of vector slice/L;
//  - a reference model, written independently of the RTL, of the whole
//    test with no uncertain values: PRPG, phase shifter, chains, the logic
//    above, masking (option MASK_OPT: 0 partial, 1 full), compactor, MISR.
// It pulses start once, waits for done, and checks the signature, the test
// length, the number of masked unload cycles, and that every mechanism
// (shift, launch, capture, risky capture, wrong capture, masking, done)
// happened at least once. `finished` rises with the result.
module cps_bist_env #(
  parameter int unsigned N        = 200,
  parameter int unsigned L        = 3,
  parameter int unsigned PW       = 20,
  parameter int unsigned MW       = 20,
  parameter int unsigned NTV      = 50000,
  parameter bit          MASK_OPT = 1'b1,
  parameter logic [PW-1:0] PTAPS  = PW'(20'h90000),
  parameter logic [PW-1:0] PSEED  = PW'(1),
  parameter logic [MW-1:0] MTAPS  = MW'(20'h90000),
  parameter int unsigned NR       = 3,
  parameter int unsigned RISKY_SLICE [NR] = '{117909, 147625, 83357},
  parameter int unsigned RISKY_CHAIN [NR] = '{1, 1, 3},
  parameter bit          RANDOM_ERR = 1'b0,
  // MASKED=0: the BIST under test has tables that never match (a BIST without
  // masking). The signature must then differ from the error-free reference.
  parameter bit          MASKED   = 1'b1,
  parameter string       NAME     = "env"
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 start,
  input  logic                 done,
  input  logic [MW-1:0]        signature,
  input  logic                 se,
  input  logic [N-1:0][L-1:0]  cut_q,
  output logic [N-1:0][L-1:0]  cut_d,
  input  logic                 mask_hit,
  output int                   checks,
  output int                   failures,
  output logic                 finished
);

  // ---------------- circuit-under-test stand-in with uncertain captures ----
  logic                lc_second;    // next SE=0 cycle is the capture pulse
  int unsigned         vec_idx;      // vector whose T1/T2 pulses come next
  logic [N-1:0][L-1:0] rnd, err, risky_now;
  logic                capture_now;

  function automatic logic f_bit(logic [N-1:0][L-1:0] q, int c, int p);
    return q[c][p] ^ (q[(c+1)%N][p] & q[c][(p+1)%L]) ^ q[(c+3)%N][(p+2)%L]
           ^ (q[(c+5)%N][p] | q[(c+2)%N][(p+1)%L]);
  endfunction

  assign capture_now = !se && lc_second;
  assign err         = RANDOM_ERR ? rnd : '1;

  always_comb begin
    risky_now = '0;
    for (int i = 0; i < NR; i++)
      if (RISKY_SLICE[i] / L == vec_idx && RISKY_CHAIN[i] < N)
        risky_now[RISKY_CHAIN[i]][L - 1 - RISKY_SLICE[i] % L] = 1'b1;
  end

  always_comb begin
    for (int c = 0; c < N; c++)
      for (int p = 0; p < L; p++)
        cut_d[c][p] = f_bit(cut_q, c, p) ^ (capture_now & risky_now[c][p] & err[c][p]);
  end

  // ---------------- mechanism counters ----------------
  int n_shift, n_launch, n_capture, n_uncertain, n_corrupt, n_mask, n_cycles;
  logic running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lc_second <= 1'b0;
      vec_idx   <= 0;
      n_shift <= 0; n_launch <= 0; n_capture <= 0; n_uncertain <= 0; n_corrupt <= 0;
      n_mask <= 0;
    end else begin
      for (int c = 0; c < N; c++) rnd[c] <= L'($urandom);
      if (se && running && !done) n_shift <= n_shift + 1;
      if (!se) begin
        lc_second <= !lc_second;
        if (!lc_second) n_launch <= n_launch + 1;
        else begin
          n_capture   <= n_capture + 1;
          vec_idx     <= vec_idx + 1;
          n_uncertain <= n_uncertain + $countones(risky_now);
          n_corrupt   <= n_corrupt + $countones(risky_now & err);
        end
      end
      if (mask_hit) n_mask <= n_mask + 1;
    end
  end

  // ---------------- reference model ----------------
  // risky bits per unloaded slice, and risky vectors, as lookup tables
  logic [N-1:0] slice_mask [int unsigned];
  bit           vec_risky  [int unsigned];

  task automatic build_tables();
    for (int i = 0; i < NR; i++) begin
      if (RISKY_CHAIN[i] < N) begin
        if (!slice_mask.exists(RISKY_SLICE[i])) slice_mask[RISKY_SLICE[i]] = '0;
        slice_mask[RISKY_SLICE[i]][RISKY_CHAIN[i]] = 1'b1;
      end
      vec_risky[RISKY_SLICE[i] / L] = 1'b1;
    end
  endtask

  function automatic logic [MW-1:0] ref_signature();
    logic [N-1:0][L-1:0] q, nq;
    logic [N-1:0] si, so;
    logic [PW-1:0] lfsr;
    logic [MW-1:0] sig, comp;
    int unsigned k;
    lfsr = PSEED; sig = '0; q = '0;
    for (int ph = 0; ph <= NTV; ph++) begin
      for (int s = 0; s < L; s++) begin
        if (ph > 0) begin
          k = (ph - 1) * L + s;
          for (int c = 0; c < N; c++) so[c] = q[c][L-1];
          if (MASKED && !MASK_OPT && slice_mask.exists(k)) so &= ~slice_mask[k];
          comp = '0;
          for (int c = 0; c < N; c++) comp[c % MW] ^= so[c];
          if (MASKED && MASK_OPT && vec_risky.exists(ph - 1)) comp = '0;
          sig = {sig[MW-2:0], ^(sig & MTAPS)} ^ comp;
        end
        // phase shifter: taps a, a+1+(k%(PW/2)), a+PW/2+1+(k%(PW/2-1))
        for (int c = 0; c < N; c++) begin
          int a, kk;
          a = c % PW; kk = c / PW;
          si[c] = lfsr[a] ^ lfsr[(a + 1 + kk % (PW/2)) % PW]
                ^ lfsr[(a + PW/2 + 1 + kk % (PW/2 - 1)) % PW];
        end
        for (int c = 0; c < N; c++) begin
          for (int p = L - 1; p > 0; p--) q[c][p] = q[c][p-1];
          q[c][0] = si[c];
        end
        lfsr = {lfsr[PW-2:0], ^(lfsr & PTAPS)};
      end
      if (ph < NTV) begin
        repeat (2) begin   // launch (T1) then capture (T2)
          for (int c = 0; c < N; c++) for (int p = 0; p < L; p++) nq[c][p] = f_bit(q, c, p);
          q = nq;
        end
      end
    end
    return sig;
  endfunction

  function automatic int expected_mask_cycles();
    int n = 0;
    if (!MASKED) return 0;
    if (!MASK_OPT) begin
      foreach (slice_mask[k]) if (k < NTV * L) n++;
    end else begin
      foreach (vec_risky[v]) if (v < NTV) n += L;
    end
    return n;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%s] %s", NAME, what); end
  endtask

  task automatic need(int n, string what);
    $display("[%s] %-18s %0d", NAME, what, n);
    check(n > 0, {what, " never happened"});
  endtask

  initial begin
    logic [MW-1:0] exp_sig;
    int exp_mask;
    checks = 0; failures = 0; finished = 0; start = 0; n_cycles = 0; running = 0;
    build_tables();
    exp_sig  = ref_signature();
    exp_mask = expected_mask_cycles();
    wait (rst_n);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; running = 1;
    while (!done) begin @(negedge clk); n_cycles++; end
    $display("[%s] signature %h (reference %h), %0d cycles", NAME, signature, exp_sig, n_cycles);
    if (MASKED) check(signature == exp_sig, "signature differs from the reference");
    else        check(signature != exp_sig, "unmasked errors left the signature intact");
    check(n_cycles == (NTV + 1) * L + 2 * NTV, "test length");
    check(n_mask == exp_mask, $sformatf("masked unload cycles %0d, expected %0d", n_mask, exp_mask));
    check(n_launch == NTV && n_capture == NTV, "one launch and one capture per vector");
    need(n_shift, "shift cycles");
    need(n_launch, "launch pulses");
    need(n_capture, "capture pulses");
    need(n_uncertain, "risky captures");
    need(n_corrupt, "wrong captures");
    if (MASKED) need(n_mask, "masked cycles");
    need(int'(done), "done");
    finished = 1;
  end

endmodule
