// tb_coxhe_dot: the plain-cipher inner-product workload, (1 x n) * (n x 1) with n = N/2 packed
// values, run end to end on coxhe_top at a reduced size (N = 32, so n = 16 slots).
// Sequence, as a host would issue it:
//   X = P-C Mult(A, w)                              encrypted vector times plaintext weights
//   for s = 0 .. log2(n)-1:                         rotate-and-sum over the slots
//     T = Rotate(X, g_s) = (rot(x0) + ks0, ks1),    g_s = 5^(2^s) mod 2N, ks = KeySwitch(rot(x1))
//     X = C-C Add(X, T)
//   F = Rescale(X)
// Each rotation uses its own random Galois key and a sparse key stream; the rotated c1 is routed
// from the permutation unit into the KeySwitch. Every intermediate ciphertext is compared with
// the software model, and the run fails unless it saw log2(n) rotations, K bypasses and one
// early INTT1 start per KeySwitch, key stalls and one Rescale. The kernel shape (rotate-and-sum
// with log2(n) steps) is the inner-product pattern the evaluated matrix kernels use; the sizes,
// the Galois elements and the random data are this testbench's choice. A cycle watchdog counts a
// failure if anything hangs.
module tb_coxhe_dot;
  import he_pkg::*;
  import he_ref_pkg::*;
  localparam int N = 32, W = 33, K = 3, PN = 4, PM = 4;
  localparam int STEPS = $clog2(N / 2);

  `include "coxhe_env.svh"

  coxhe_top #(.N(N), .W(W), .K(K), .P_NTT(PN), .P_MULT(PM)) dut (.*);

  initial begin
    u64 a0[], a1[], w[], zero[], gk0[], gk1[];
    u64 x0[], x1[], x2[], e0[], e1[], u0[], s0[], s1[], t0[], t1[];
    u64 f0[], f1[], k0[], k1[], limb[], tmp[], y0[], y1[];
    int g, t_op;
    env_setup();
    rand_ct(a0); rand_ct(a1); rand_ct(w);
    zero = new[K * N];
    for (int t = 0; t < K * N; t++) zero[t] = 0;

    // ---- X = P-C Mult(A, w)
    ewise(EW_PC_MULT, a0, a1, w, zero, x0, x1, x2);
    e0 = new[K * N]; e1 = new[K * N];
    for (int i = 0; i < K * N; i++) begin
      e0[i] = mulmod(a0[i], w[i], qs[i / N]);
      e1[i] = mulmod(a1[i], w[i], qs[i / N]);
    end
    cmp_ct("P-C Mult c0", x0, e0, K);
    cmp_ct("P-C Mult c1", x1, e1, K);

    // ---- rotate-and-sum
    g = 5;
    limb = new[N];
    f0 = new[K * N]; f1 = new[K * N];
    for (int s = 0; s < STEPS; s++) begin
      rand_keys(gk0); rand_keys(gk1);
      t_op = cyc;
      rotate_host(e0, g, u0);
      keyswitch_run(e1, gk0, gk1, 1'b1, g, s0, s1);
      for (int m = 0; m < K; m++) begin
        for (int t = 0; t < N; t++) limb[t] = e0[m * N + t];
        galois_ref(limb, g, tmp);
        for (int t = 0; t < N; t++) f0[m * N + t] = tmp[t];
        for (int t = 0; t < N; t++) limb[t] = e1[m * N + t];
        galois_ref(limb, g, tmp);
        for (int t = 0; t < N; t++) f1[m * N + t] = tmp[t];
      end
      cmp_ct("rotated c0", u0, f0, K);
      ks_ref(N, K, qs, psis, f1, gk0, gk1, k0, k1);
      cmp_ct("KeySwitch ks0", s0, k0, K);
      cmp_ct("KeySwitch ks1", s1, k1, K);
      ewise(EW_CC_ADD, u0, zero, s0, s1, t0, t1, x2);
      for (int i = 0; i < K * N; i++) f0[i] = addmod(f0[i], k0[i], qs[i / N]);
      cmp_ct("Rotate c0", t0, f0, K);
      cmp_ct("Rotate c1", t1, k1, K);
      n_rotate++;
      ewise(EW_CC_ADD, e0, e1, t0, t1, y0, y1, x2);
      for (int i = 0; i < K * N; i++) begin
        e0[i] = addmod(e0[i], f0[i], qs[i / N]);
        e1[i] = addmod(e1[i], k1[i], qs[i / N]);
      end
      cmp_ct("Sum c0", y0, e0, K);
      cmp_ct("Sum c1", y1, e1, K);
      $display("rotate-and-sum step %0d (g = %0d) took %0d cycles", s, g, cyc - t_op);
      g = int'(u64'(g) * u64'(g) % u64'(2 * N));
    end

    // ---- Rescale
    rescale_run(e0, e1, y0, y1);
    rescale_ref(N, K, qs, psis, e0, e1, f0, f1);
    cmp_ct("Rescale c0", y0, f0, K - 1);
    cmp_ct("Rescale c1", y1, f1, K - 1);

    $display("events: pc_mult=%0d cc_add=%0d rotate=%0d rescale=%0d routed_beats=%0d bypass=%0d intt1_early=%0d key_stall=%0d",
             n_pc_mult, n_cc_add, n_rotate, n_rescale, n_route, n_bypass, n_early, n_stall);
    checks++; if (n_pc_mult != 1) begin failures++; $display("FAIL P-C Mult count"); end
    checks++; if (n_cc_add != 2 * STEPS) begin failures++; $display("FAIL C-C Add count"); end
    checks++; if (n_rotate != STEPS) begin failures++; $display("FAIL rotation count"); end
    checks++; if (n_rescale != 1) begin failures++; $display("FAIL no Rescale"); end
    checks++; if (n_route != STEPS * K * BEATS) begin failures++; $display("FAIL routed beats %0d", n_route); end
    checks++; if (n_bypass != STEPS * K) begin failures++; $display("FAIL bypass count %0d", n_bypass); end
    checks++; if (n_early != STEPS) begin failures++; $display("FAIL INTT1 early starts %0d", n_early); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no key stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
