// tb_keyswitch: configures K+1 moduli, loads a random NTT-domain polynomial of K limbs, streams
// random keys and compares both output polynomials with a software KeySwitch. Two operations
// run: the first with a key stream that is always valid, the second with random gaps so the
// accumulate pass stalls and the modulus-down layer has to wait for accumulators. Checks: every output word, the output beat count, one bypassed NTT per
// ciphertext modulus, that INTT1 starts while the former layer is still running and no later
// than one former-layer iteration after INTT0, and that stalls and waits happen only with gaps.
module tb_keyswitch;
  import he_ref_pkg::*;
  import he_pkg::*;
  localparam int N = 32, W = 33, K = 3, PN = 4, PM = 4;
  localparam int LOGN = $clog2(N);
  localparam int LT = LOGN * N / (2 * PN);          // L_NTT = L_INTT
  localparam int BEATS = N / PM;
  localparam int ITER = BEATS + LT + BEATS + 4;      // one former iteration: load, NTT, MAC

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we;
  cfg_kind_e cfg_kind;
  logic [$clog2(K+1)-1:0] cfg_mod;
  logic [LOGN-1:0] cfg_addr;
  logic [W:0] cfg_data;
  logic in_en;
  logic [$clog2(K)-1:0] in_limb, out_limb;
  logic [$clog2(BEATS)-1:0] in_addr, out_addr;
  logic [PM-1:0][W-1:0] in_data, out0, out1;
  logic start, busy, done, key_valid, key_ready, out_valid;
  logic [K-1:0][PM-1:0][W-1:0] key0, key1;
  ks_events_t ev;
  int checks = 0, failures = 0;

  keyswitch #(.N(N), .W(W), .K(K), .P_NTT(PN), .P_MULT(PM)) dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(cfg_kind_e k, int m, int a, u64 d);
    @(negedge clk);
    cfg_we = 1; cfg_kind = k; cfg_mod = m[$clog2(K+1)-1:0]; cfg_addr = a[LOGN-1:0]; cfg_data = (W+1)'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  u64 r0[], r1[], k0[], k1[];
  int nout, n_bypass, n_stall, n_wait, n_early, cyc, t_intt1;
  bit gaps;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      for (int l = 0; l < PM; l++) begin
        int idx;
        u64 e0, e1;
        idx = 32'(out_limb) * N + 32'(out_addr) * PM + l;
        e0 = r0[idx];
        e1 = r1[idx];
        checks += 2;
        if (u64'(out0[l]) != e0 || u64'(out1[l]) != e1) begin
          failures++;
          if (failures < 10) $display("FAIL idx=%0d got %0d/%0d exp %0d/%0d", idx, out0[l], out1[l], e0, e1);
        end
      end
      nout++;
    end
    if (ev.bypass) n_bypass++;
    if (ev.key_stall) n_stall++;
    if (ev.acc_wait) n_wait++;
    if (ev.intt1_early) begin n_early++; t_intt1 = cyc; end
  end

  // key stream: moduli K, 0, 1, ..., K-1; each N/PM beats of all K decomposition indices
  task automatic drive_keys();
    int total = (K + 1) * BEATS;
    int idx = 0;
    while (idx < total) begin
      int j, b;
      bit fired;
      j = (idx / BEATS == 0) ? K : idx / BEATS - 1;
      b = idx % BEATS;
      for (int i = 0; i < K; i++)
        for (int l = 0; l < PM; l++) begin
          key0[i][l] = W'(k0[(i * (K + 1) + j) * N + b * PM + l]);
          key1[i][l] = W'(k1[(i * (K + 1) + j) * N + b * PM + l]);
        end
      key_valid = gaps ? ($urandom % 4 == 0) : 1'b1;   // sparse stream: MAC slower than modulus-down
      @(posedge clk);
      fired = key_valid && key_ready;
      #1;
      if (fired) idx++;
    end
    key_valid = 0;
  endtask

  initial begin
    u64 qs[], psis[], c[];
    qs = new[K + 1]; psis = new[K + 1];
    cfg_we = 0; cfg_kind = CFG_Q; cfg_mod = '0; cfg_addr = '0; cfg_data = '0;
    in_en = 0; in_limb = '0; in_addr = '0; in_data = '0; start = 0; key_valid = 0;
    key0 = '0; key1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m <= K; m++) begin
      qs[m] = find_prime(W, N, m);
      psis[m] = find_psi(qs[m], N);
    end
    for (int m = 0; m <= K; m++) begin
      cfg(CFG_Q, m, 0, qs[m]);
      cfg(CFG_MU, m, 0, barrett_mu(qs[m], W));
      cfg(CFG_NINV, m, 0, invmod(u64'(N), qs[m]));
      if (m < K) cfg(CFG_INV, m, 0, invmod(qs[K] % qs[m], qs[m]));
      for (int a = 0; a < N; a++) begin
        cfg(CFG_TWF, m, a, powmod(psis[m], u64'(bitrev(a, LOGN)), qs[m]));
        cfg(CFG_TWI, m, a, powmod(invmod(psis[m], qs[m]), u64'(bitrev(a, LOGN)), qs[m]));
      end
    end
    for (int t = 0; t < 2; t++) begin
      gaps = (t == 1);
      c = new[K * N];
      k0 = new[K * (K + 1) * N];
      k1 = new[K * (K + 1) * N];
      for (int i = 0; i < K; i++)
        for (int x = 0; x < N; x++) c[i * N + x] = {$urandom, $urandom} % qs[i];
      for (int i = 0; i < K; i++)
        for (int j = 0; j <= K; j++)
          for (int x = 0; x < N; x++) begin
            k0[(i * (K + 1) + j) * N + x] = {$urandom, $urandom} % qs[j];
            k1[(i * (K + 1) + j) * N + x] = {$urandom, $urandom} % qs[j];
          end
      ks_ref(N, K, qs, psis, c, k0, k1, r0, r1);
      for (int i = 0; i < K; i++)
        for (int b = 0; b < BEATS; b++) begin
          @(negedge clk);
          in_en = 1; in_limb = i[$clog2(K)-1:0]; in_addr = b[$clog2(BEATS)-1:0];
          for (int l = 0; l < PM; l++) in_data[l] = W'(c[i * N + b * PM + l]);
        end
      @(negedge clk); in_en = 0;
      nout = 0; n_bypass = 0; n_stall = 0; n_wait = 0; n_early = 0; t_intt1 = -1;
      start = 1; cyc = 0;
      fork
        begin
          @(negedge clk); start = 0; cyc = 1;
          while (!done) begin @(negedge clk); cyc++; end
          @(negedge clk);
        end
        drive_keys();
      join
      $display("keyswitch run %0d: %0d cycles, INTT1 started at cycle %0d, bypass=%0d key_stall=%0d acc_wait=%0d",
               t, cyc, t_intt1, n_bypass, n_stall, n_wait);
      checks++;
      if (nout != K * BEATS) begin failures++; $display("FAIL beats %0d", nout); end
      checks++;
      if (n_bypass != K) begin failures++; $display("FAIL bypass count %0d", n_bypass); end
      checks++;
      if (n_early != 1) begin failures++; $display("FAIL INTT1 did not overlap the former layer"); end
      checks++;
      if (!gaps && (t_intt1 < 0 || t_intt1 > LT + ITER + 4)) begin
        failures++; $display("FAIL INTT1 start %0d later than one iteration (%0d)", t_intt1, LT + ITER + 4);
      end
      checks++;
      if (gaps && n_stall == 0) begin failures++; $display("FAIL no key stall seen"); end
      checks++;
      if (!gaps && n_stall != 0) begin failures++; $display("FAIL stall with a full key stream"); end
      checks++;
      if (gaps && n_wait == 0) begin failures++; $display("FAIL modulus-down layer never waited"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
