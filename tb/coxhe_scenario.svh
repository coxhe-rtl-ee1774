// coxhe_scenario.svh: end-to-end stimulus for coxhe_top, shared by the reduced-size and the
// full-size testbench. The including module defines N, W, K, PN (P_NTT), PM (P_MULT) and
// instantiates coxhe_top as dut; signals and host tasks come from coxhe_env.svh.
//
// Kernel, each step checked against a software model of the same step:
//   A1 = P-C Mult(A, pt1); A2 = P-C Add(A1, pt2)
//   D  = C-C Mult(A2, B)                        three-part result
//   R  = Relinearize(D)  = C-C Add((d0, d1), KeySwitch(d2))
//   T  = Rotate(R, g)    = (rot(r0) + ks0, ks1) with ks = KeySwitch(rot(r1)), rot routed directly
//   S  = C-C Add(R, T)                          one step of the rotate-and-sum loop
//   F  = Rescale(S)                             K-1 limbs
// Ciphertexts, plaintexts and keys are random residues: the test checks the arithmetic of each
// operation, not decryption. Event counters cover every mechanism: each element-wise operation,
// Rescale, Relinearize and Rotate sequences, the automorph-to-KeySwitch route, NTT bypass,
// early INTT1, key-stream stalls and accumulator waits. The KeySwitch with a full key stream must
// also finish within the latency model L_INTT + max(L_NTT, N/P_MULT) * (K + 4), allowing four
// control cycles per stage.

  `include "coxhe_env.svh"

  localparam int LNTT = LOGN * N / (2 * PN);

  initial begin
    u64 a0[], a1[], b0[], b1[], p1[], p2[], zero[], rk0[], rk1[], gk0[], gk1[];
    u64 x0[], x1[], x2[], d0[], d1[], d2[], e0[], e1[], e2[];
    u64 s0[], s1[], r0[], r1[], t0[], t1[], u0[], u1[], f0[], f1[], tmp[], tmp2[], limb[];
    int g, t_ks;
    env_setup();

    rand_ct(a0); rand_ct(a1); rand_ct(b0); rand_ct(b1); rand_ct(p1); rand_ct(p2);
    zero = new[K * N];
    for (int t = 0; t < K * N; t++) zero[t] = 0;
    rand_keys(rk0); rand_keys(rk1); rand_keys(gk0); rand_keys(gk1);
    g = 5;

    // ---- P-C Mult, P-C Add
    ewise(EW_PC_MULT, a0, a1, p1, zero, x0, x1, x2);
    e0 = new[K * N]; e1 = new[K * N];
    for (int m = 0; m < K; m++)
      for (int t = 0; t < N; t++) begin
        e0[m * N + t] = mulmod(a0[m * N + t], p1[m * N + t], qs[m]);
        e1[m * N + t] = mulmod(a1[m * N + t], p1[m * N + t], qs[m]);
      end
    cmp_ct("P-C Mult c0", x0, e0, K);
    cmp_ct("P-C Mult c1", x1, e1, K);
    ewise(EW_PC_ADD, e0, e1, p2, zero, x0, x1, x2);
    for (int m = 0; m < K; m++)
      for (int t = 0; t < N; t++) e0[m * N + t] = addmod(e0[m * N + t], p2[m * N + t], qs[m]);
    cmp_ct("P-C Add c0", x0, e0, K);
    cmp_ct("P-C Add c1", x1, e1, K);

    // ---- C-C Mult
    ewise(EW_CC_MULT, e0, e1, b0, b1, d0, d1, d2);
    e2 = new[K * N];
    tmp = new[K * N];
    for (int m = 0; m < K; m++)
      for (int t = 0; t < N; t++) begin
        int i;
        i = m * N + t;
        tmp[i] = mulmod(e0[i], b0[i], qs[m]);
        e2[i]  = mulmod(e1[i], b1[i], qs[m]);
        e1[i]  = addmod(mulmod(e0[i], b1[i], qs[m]), mulmod(e1[i], b0[i], qs[m]), qs[m]);
        e0[i]  = tmp[i];
      end
    cmp_ct("C-C Mult d0", d0, e0, K);
    cmp_ct("C-C Mult d1", d1, e1, K);
    cmp_ct("C-C Mult d2", d2, e2, K);

    // ---- Relinearize: KeySwitch(d2), then C-C Add with (d0, d1)
    t_ks = cyc;
    keyswitch_run(e2, rk0, rk1, 1'b0, 0, s0, s1);
    $display("KeySwitch (relinearize) took %0d cycles", cyc - t_ks);
    // latency model: L_INTT + max(L_NTT, N/P_MULT) * (K + 4), plus a few control cycles per stage
    checks++;
    if (ks_cycles > LNTT + ((LNTT > BEATS) ? LNTT : BEATS) * (K + 4) + 4 * (K + 4)) begin
      failures++;
      $display("FAIL KeySwitch took %0d cycles, model %0d", ks_cycles, LNTT + ((LNTT > BEATS) ? LNTT : BEATS) * (K + 4));
    end
    ks_ref(N, K, qs, psis, e2, rk0, rk1, tmp, tmp2);
    cmp_ct("KeySwitch ks0", s0, tmp, K);
    cmp_ct("KeySwitch ks1", s1, tmp2, K);
    ewise(EW_CC_ADD, e0, e1, tmp, tmp2, r0, r1, x2);
    for (int i = 0; i < K * N; i++) begin
      int m;
      m = i / N;
      e0[i] = addmod(e0[i], tmp[i], qs[m]);
      e1[i] = addmod(e1[i], tmp2[i], qs[m]);
    end
    cmp_ct("Relinearize c0", r0, e0, K);
    cmp_ct("Relinearize c1", r1, e1, K);
    n_relin++;

    // ---- Rotate: automorph both parts, KeySwitch the rotated c1 (routed), add
    rotate_host(e0, g, u0);
    t_ks = cyc;
    keyswitch_run(e1, gk0, gk1, 1'b1, g, s0, s1);
    $display("KeySwitch (rotate, sparse key stream) took %0d cycles", cyc - t_ks);
    f0 = new[K * N]; f1 = new[K * N];
    limb = new[N];
    for (int m = 0; m < K; m++) begin
      for (int t = 0; t < N; t++) limb[t] = e0[m * N + t];
      galois_ref(limb, g, tmp);
      for (int t = 0; t < N; t++) f0[m * N + t] = tmp[t];
      for (int t = 0; t < N; t++) limb[t] = e1[m * N + t];
      galois_ref(limb, g, tmp);
      for (int t = 0; t < N; t++) f1[m * N + t] = tmp[t];
    end
    cmp_ct("Rotate automorph c0", u0, f0, K);
    ks_ref(N, K, qs, psis, f1, gk0, gk1, tmp, tmp2);
    cmp_ct("Rotate KeySwitch ks0", s0, tmp, K);
    cmp_ct("Rotate KeySwitch ks1", s1, tmp2, K);
    ewise(EW_CC_ADD, u0, zero, tmp, tmp2, t0, t1, x2);
    for (int i = 0; i < K * N; i++) f0[i] = addmod(f0[i], tmp[i], qs[i / N]);
    cmp_ct("Rotate c0", t0, f0, K);
    cmp_ct("Rotate c1", t1, tmp2, K);
    n_rotate++;

    // ---- S = R + Rotate(R)
    ewise(EW_CC_ADD, e0, e1, f0, tmp2, s0, s1, x2);
    for (int i = 0; i < K * N; i++) begin
      e0[i] = addmod(e0[i], f0[i], qs[i / N]);
      e1[i] = addmod(e1[i], tmp2[i], qs[i / N]);
    end
    cmp_ct("Sum c0", s0, e0, K);
    cmp_ct("Sum c1", s1, e1, K);

    // ---- Rescale
    rescale_run(e0, e1, r0, r1);
    rescale_ref(N, K, qs, psis, e0, e1, tmp, tmp2);
    cmp_ct("Rescale c0", r0, tmp, K - 1);
    cmp_ct("Rescale c1", r1, tmp2, K - 1);

    $display("events: pc_add=%0d pc_mult=%0d cc_add=%0d cc_mult=%0d relin=%0d rotate=%0d rescale=%0d",
             n_pc_add, n_pc_mult, n_cc_add, n_cc_mult, n_relin, n_rotate, n_rescale);
    $display("events: routed_beats=%0d bypass=%0d intt1_early=%0d key_stall=%0d acc_wait=%0d",
             n_route, n_bypass, n_early, n_stall, n_wait);
    checks++; if (n_pc_add == 0)  begin failures++; $display("FAIL no P-C Add"); end
    checks++; if (n_pc_mult == 0) begin failures++; $display("FAIL no P-C Mult"); end
    checks++; if (n_cc_add == 0)  begin failures++; $display("FAIL no C-C Add"); end
    checks++; if (n_cc_mult == 0) begin failures++; $display("FAIL no C-C Mult"); end
    checks++; if (n_relin == 0)   begin failures++; $display("FAIL no Relinearize"); end
    checks++; if (n_rotate == 0)  begin failures++; $display("FAIL no Rotate"); end
    checks++; if (n_rescale == 0) begin failures++; $display("FAIL no Rescale"); end
    checks++; if (n_route != K * BEATS) begin failures++; $display("FAIL routed beats %0d", n_route); end
    checks++; if (n_bypass != 2 * K) begin failures++; $display("FAIL bypass count %0d", n_bypass); end
    checks++; if (n_early != 2)   begin failures++; $display("FAIL INTT1 early starts %0d", n_early); end
    checks++; if (n_stall == 0)   begin failures++; $display("FAIL no key stall"); end
    checks++; if (n_wait == 0)    begin failures++; $display("FAIL no accumulator wait"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
