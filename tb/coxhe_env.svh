// coxhe_env.svh: test environment for coxhe_top, shared by the end-to-end testbenches.
// The including module defines N, W, K, PN (P_NTT), PM (P_MULT), imports he_pkg and he_ref_pkg,
// and instantiates coxhe_top as dut with the signals declared here (.* connection).
// It provides the clock, the mechanism counters and host tasks that drive the accelerator the way
// a host processor would: env_setup (reset and constant upload), ewise (one element-wise
// operation over all K limbs, one beat per P_MULT words), keyswitch_run (load or route the input,
// stream keys with a valid/ready handshake, collect the output), rotate_host (permutation read
// back by the host) and rescale_run. Every task waits on the units' own start/busy/done
// handshakes, so it follows their timing whatever the parameters. The host-side sequencing is
// this design's choice; the units and operations it calls follow the document's operation set.

  localparam int LOGN  = $clog2(N);
  localparam int BEATS = N / PM;
  localparam int KW    = $clog2(K);
  localparam int MW    = $clog2(K + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we;
  logic [1:0] cfg_dst;
  cfg_kind_e cfg_kind;
  logic [MW-1:0] cfg_mod;
  logic [LOGN-1:0] cfg_addr;
  logic [W:0] cfg_data;
  ew_op_e ew_op;
  logic [MW-1:0] ew_limb;
  logic ew_in_valid, ew_out_valid;
  logic [PM-1:0][W-1:0] ew_a0, ew_a1, ew_b0, ew_b1, ew_d0, ew_d1, ew_d2;
  logic rs_in_en, rs_in_part, rs_start, rs_busy, rs_done, rs_out_valid;
  logic [KW-1:0] rs_in_limb, rs_out_limb;
  logic [$clog2(BEATS)-1:0] rs_in_addr, rs_out_addr;
  logic [PM-1:0][W-1:0] rs_in_data, rs_out0, rs_out1;
  logic [LOGN:0] ro_galois;
  logic ro_ld_en, ro_start, ro_busy, ro_out_valid;
  logic [$clog2(BEATS)-1:0] ro_ld_addr, ro_out_addr;
  logic [PM-1:0][W-1:0] ro_ld_data, ro_out_data;
  logic ks_src, ks_in_en, ks_start, ks_busy, ks_done, ks_key_valid, ks_key_ready, ks_out_valid;
  logic [KW-1:0] ks_in_limb, ks_out_limb;
  logic [$clog2(BEATS)-1:0] ks_in_addr, ks_out_addr;
  logic [PM-1:0][W-1:0] ks_in_data, ks_out0, ks_out1;
  logic [K-1:0][PM-1:0][W-1:0] ks_key0, ks_key1;
  ks_events_t ks_ev;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_pc_add = 0, n_pc_mult = 0, n_cc_add = 0, n_cc_mult = 0, n_rescale = 0, n_relin = 0;
  int n_rotate = 0, n_route = 0, n_bypass = 0, n_stall = 0, n_wait = 0, n_early = 0;
  always @(posedge clk) if (rst_n) begin
    if (ks_ev.bypass) n_bypass++;
    if (ks_ev.key_stall) n_stall++;
    if (ks_ev.acc_wait) n_wait++;
    if (ks_ev.intt1_early) n_early++;
    if (ks_src && ro_out_valid) n_route++;
  end

  u64 qs[], psis[];
  int ks_cycles;   // start-to-done time of the last KeySwitch

  task automatic cfg(bit [1:0] dst, cfg_kind_e k, int m, int a, u64 d);
    @(negedge clk);
    cfg_we = 1; cfg_dst = dst; cfg_kind = k; cfg_mod = m[MW-1:0]; cfg_addr = a[LOGN-1:0];
    cfg_data = (W+1)'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic void cmp(string what, u64 got, u64 exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endfunction

  // element-wise op on all K limbs: x, y are two-part ciphertexts (or plaintext in y0), flat [m*N+t]
  task automatic ewise(ew_op_e op, input u64 x0[], x1[], y0[], y1[], output u64 z0[], z1[], z2[]);
    z0 = new[K * N]; z1 = new[K * N]; z2 = new[K * N];
    ew_op = op;
    for (int m = 0; m < K; m++)
      for (int b = 0; b < BEATS; b++) begin
        @(negedge clk);
        ew_limb = m[MW-1:0]; ew_in_valid = 1;
        for (int l = 0; l < PM; l++) begin
          ew_a0[l] = W'(x0[m * N + b * PM + l]); ew_a1[l] = W'(x1[m * N + b * PM + l]);
          ew_b0[l] = W'(y0[m * N + b * PM + l]); ew_b1[l] = W'(y1[m * N + b * PM + l]);
        end
        @(negedge clk);
        ew_in_valid = 0;
        checks++;
        if (!ew_out_valid) failures++;
        for (int l = 0; l < PM; l++) begin
          z0[m * N + b * PM + l] = u64'(ew_d0[l]);
          z1[m * N + b * PM + l] = u64'(ew_d1[l]);
          z2[m * N + b * PM + l] = u64'(ew_d2[l]);
        end
      end
    unique case (op)
      EW_PC_ADD: n_pc_add++;
      EW_PC_MULT: n_pc_mult++;
      EW_CC_ADD: n_cc_add++;
      EW_CC_MULT: n_cc_mult++;
      default: ;
    endcase
  endtask

  // KeySwitch of the K-limb polynomial c. If route is set, c is first rotated by the automorph
  // unit and streamed into the KeySwitch directly; otherwise the host loads c.
  task automatic keyswitch_run(input u64 c[], input u64 k0[], k1[], input bit route, input int g,
                               output u64 o0[], o1[]);
    int idx = 0, total = (K + 1) * BEATS;
    int t_start;
    o0 = new[K * N]; o1 = new[K * N];
    for (int m = 0; m < K; m++) begin
      if (route) begin
        for (int b = 0; b < BEATS; b++) begin
          @(negedge clk);
          ro_ld_en = 1; ro_ld_addr = b[$clog2(BEATS)-1:0];
          for (int l = 0; l < PM; l++) ro_ld_data[l] = W'(c[m * N + b * PM + l]);
        end
        @(negedge clk);
        ro_ld_en = 0; ks_src = 1; ks_in_limb = m[KW-1:0]; ro_galois = (LOGN+1)'(g); ro_start = 1;
        @(negedge clk);
        ro_start = 0;
        while (ro_busy || ro_out_valid) @(negedge clk);
        ks_src = 0;
      end else begin
        for (int b = 0; b < BEATS; b++) begin
          @(negedge clk);
          ks_in_en = 1; ks_in_limb = m[KW-1:0]; ks_in_addr = b[$clog2(BEATS)-1:0];
          for (int l = 0; l < PM; l++) ks_in_data[l] = W'(c[m * N + b * PM + l]);
        end
        @(negedge clk);
        ks_in_en = 0;
      end
    end
    @(negedge clk);
    ks_start = 1;
    t_start = cyc;
    @(negedge clk);
    ks_start = 0;
    fork
      while (idx < total) begin
        int j, b;
        bit fired;
        j = (idx / BEATS == 0) ? K : idx / BEATS - 1;
        b = idx % BEATS;
        for (int i = 0; i < K; i++)
          for (int l = 0; l < PM; l++) begin
            ks_key0[i][l] = W'(k0[(i * (K + 1) + j) * N + b * PM + l]);
            ks_key1[i][l] = W'(k1[(i * (K + 1) + j) * N + b * PM + l]);
          end
        ks_key_valid = route ? ($urandom % 4 == 0) : 1'b1;   // the rotation keys arrive slowly
        @(posedge clk);
        fired = ks_key_valid && ks_key_ready;
        #1;
        if (fired) idx++;
      end
      forever begin
        @(posedge clk);
        if (ks_out_valid)
          for (int l = 0; l < PM; l++) begin
            int ix;
            ix = 32'(ks_out_limb) * N + 32'(ks_out_addr) * PM + l;
            o0[ix] = u64'(ks_out0[l]);
            o1[ix] = u64'(ks_out1[l]);
          end
        if (ks_done) break;
      end
    join
    ks_key_valid = 0;
    ks_cycles = cyc - t_start;
    $display("KeySwitch unit: start to done %0d cycles", ks_cycles);
  endtask

  task automatic rotate_host(input u64 c[], input int g, output u64 o[]);
    o = new[K * N];
    for (int m = 0; m < K; m++) begin
      for (int b = 0; b < BEATS; b++) begin
        @(negedge clk);
        ro_ld_en = 1; ro_ld_addr = b[$clog2(BEATS)-1:0];
        for (int l = 0; l < PM; l++) ro_ld_data[l] = W'(c[m * N + b * PM + l]);
      end
      @(negedge clk);
      ro_ld_en = 0; ks_src = 0; ro_galois = (LOGN+1)'(g); ro_start = 1;
      @(negedge clk);
      ro_start = 0;
      while (ro_busy || ro_out_valid) begin
        if (ro_out_valid)
          for (int l = 0; l < PM; l++) begin
            int ix;
            ix = m * N + 32'(ro_out_addr) * PM + l;
            o[ix] = u64'(ro_out_data[l]);
          end
        @(negedge clk);
      end
    end
  endtask

  task automatic rescale_run(input u64 c0[], c1[], output u64 o0[], o1[]);
    o0 = new[(K - 1) * N]; o1 = new[(K - 1) * N];
    for (int x = 0; x < 2; x++)
      for (int m = 0; m < K; m++)
        for (int b = 0; b < BEATS; b++) begin
          @(negedge clk);
          rs_in_en = 1; rs_in_part = x[0]; rs_in_limb = m[KW-1:0]; rs_in_addr = b[$clog2(BEATS)-1:0];
          for (int l = 0; l < PM; l++) rs_in_data[l] = W'(x == 0 ? c0[m * N + b * PM + l] : c1[m * N + b * PM + l]);
        end
    @(negedge clk);
    rs_in_en = 0; rs_start = 1;
    @(negedge clk);
    rs_start = 0;
    forever begin
      @(posedge clk);
      if (rs_out_valid)
        for (int l = 0; l < PM; l++) begin
          int ix;
          ix = 32'(rs_out_limb) * N + 32'(rs_out_addr) * PM + l;
          o0[ix] = u64'(rs_out0[l]);
          o1[ix] = u64'(rs_out1[l]);
        end
      if (rs_done) break;
    end
    n_rescale++;
  endtask

  function automatic void rand_ct(output u64 c[]);
    c = new[K * N];
    for (int m = 0; m < K; m++)
      for (int t = 0; t < N; t++) c[m * N + t] = {$urandom, $urandom} % qs[m];
  endfunction

  function automatic void rand_keys(output u64 k[]);
    k = new[K * (K + 1) * N];
    for (int i = 0; i < K; i++)
      for (int j = 0; j <= K; j++)
        for (int t = 0; t < N; t++) k[(i * (K + 1) + j) * N + t] = {$urandom, $urandom} % qs[j];
  endfunction

  function automatic void cmp_ct(string what, input u64 got[], input u64 exp[], input int limbs);
    int bad = 0;
    for (int t = 0; t < limbs * N; t++) begin
      checks++;
      if (got[t] != exp[t]) begin
        bad++;
        failures++;
        if (failures < 10) $display("FAIL %s word %0d got %0d exp %0d", what, t, got[t], exp[t]);
      end
    end
    $display("%s: %0d words, %0d mismatches", what, limbs * N, bad);
  endfunction

  // reset, then write q, mu, N^-1, the unit inverses and both twiddle tables for moduli 0..K
  task automatic env_setup();
    qs = new[K + 1]; psis = new[K + 1];
    cfg_we = 0; cfg_dst = 0; cfg_kind = CFG_Q; cfg_mod = '0; cfg_addr = '0; cfg_data = '0;
    ew_op = EW_PC_ADD; ew_limb = '0; ew_in_valid = 0; ew_a0 = '0; ew_a1 = '0; ew_b0 = '0; ew_b1 = '0;
    rs_in_en = 0; rs_in_part = 0; rs_in_limb = '0; rs_in_addr = '0; rs_in_data = '0; rs_start = 0;
    ro_galois = '0; ro_ld_en = 0; ro_ld_addr = '0; ro_ld_data = '0; ro_start = 0;
    ks_src = 0; ks_in_en = 0; ks_in_limb = '0; ks_in_addr = '0; ks_in_data = '0; ks_start = 0;
    ks_key_valid = 0; ks_key0 = '0; ks_key1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- constants: K ciphertext moduli and the special modulus p = q_K
    for (int m = 0; m <= K; m++) begin
      qs[m] = find_prime(W, N, m);
      psis[m] = find_psi(qs[m], N);
    end
    for (int m = 0; m <= K; m++) begin
      cfg(2'b11, CFG_Q, m, 0, qs[m]);
      cfg(2'b11, CFG_MU, m, 0, barrett_mu(qs[m], W));
      cfg(2'b11, CFG_NINV, m, 0, invmod(u64'(N), qs[m]));
      if (m < K) cfg(2'b01, CFG_INV, m, 0, invmod(qs[K] % qs[m], qs[m]));
      if (m < K) cfg(2'b10, CFG_INV, m, 0, invmod(qs[K - 1] % qs[m], qs[m]));
      for (int a = 0; a < N; a++) begin
        cfg(2'b11, CFG_TWF, m, a, powmod(psis[m], u64'(bitrev(a, LOGN)), qs[m]));
        cfg(2'b11, CFG_TWI, m, a, powmod(invmod(psis[m], qs[m]), u64'(bitrev(a, LOGN)), qs[m]));
      end
    end
    $display("configuration done at cycle %0d", cyc);
  endtask

