// he_ref_pkg: software reference arithmetic for the testbenches.
//
// Plain 64/128-bit integer arithmetic, written independently of the RTL: modular products use the
// % operator, transforms are computed either by direct evaluation (small N) or by a textbook
// iterative loop (large N). It also finds NTT-friendly primes and roots of unity, builds twiddle
// tables and computes Barrett constants, so testbenches need no data files.
// It has no timing of its own; it is called from testbench processes. ks_ref and rescale_ref
// follow the same textbook formulas as the RTL but compute them in a straightforward order.
package he_ref_pkg;

  typedef logic [63:0] u64;

  function automatic u64 mulmod(u64 a, u64 b, u64 m);
    logic [127:0] p;
    p = 128'(a) * 128'(b);
    return u64'(p % 128'(m));
  endfunction

  function automatic u64 addmod(u64 a, u64 b, u64 m);
    return (a + b) % m;
  endfunction

  function automatic u64 submod(u64 a, u64 b, u64 m);
    return (a + m - b) % m;
  endfunction

  function automatic u64 powmod(u64 b, u64 e, u64 m);
    u64 r = 1;
    u64 x = b % m;
    while (e != 0) begin
      if (e[0]) r = mulmod(r, x, m);
      x = mulmod(x, x, m);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic u64 invmod(u64 a, u64 m);  // m prime
    return powmod(a, m - 2, m);
  endfunction

  function automatic bit is_prime(u64 n);
    if (n < 2) return 0;
    for (u64 d = 2; d * d <= n; d++) if (n % d == 0) return 0;
    return 1;
  endfunction

  // The skip-th prime (0 = largest) below 2^w with q = 1 mod 2n and q > 2^(w-1).
  function automatic u64 find_prime(int w, int n, int skip);
    u64 q = (u64'(1) << w) - u64'(2 * n) + 1;
    int found = 0;
    while (q > (u64'(1) << (w - 1))) begin
      if (is_prime(q)) begin
        if (found == skip) return q;
        found++;
      end
      q -= u64'(2 * n);
    end
    return 0;
  endfunction

  // A primitive 2n-th root of unity mod q.
  function automatic u64 find_psi(u64 q, int n);
    for (u64 g = 2; g < 1000; g++) begin
      u64 psi = powmod(g, (q - 1) / u64'(2 * n), q);
      if (powmod(psi, u64'(n), q) == q - 1) return psi;
    end
    return 0;
  endfunction

  function automatic int bitrev(int x, int logn);
    int r = 0;
    for (int i = 0; i < logn; i++) if (x[i]) r |= 1 << (logn - 1 - i);
    return r;
  endfunction

  function automatic u64 barrett_mu(u64 q, int w);
    logic [127:0] t;
    t = (128'(1) << (2 * w)) / 128'(q);
    return u64'(t);
  endfunction

  // Direct evaluation: out[k] = a(psi^(2*bitrev(k)+1)), the bit-reversed negacyclic NTT.
  function automatic void ntt_naive(input u64 a[], input u64 q, input u64 psi, output u64 r[]);
    int n = a.size();
    int logn = $clog2(n);
    r = new[n];
    for (int k = 0; k < n; k++) begin
      u64 x = powmod(psi, u64'(2 * bitrev(k, logn) + 1), q);
      u64 acc = 0, xp = 1;
      for (int i = 0; i < n; i++) begin
        acc = addmod(acc, mulmod(a[i], xp, q), q);
        xp = mulmod(xp, x, q);
      end
      r[k] = acc;
    end
  endfunction

  // Inverse of ntt_naive by direct evaluation: a[i] = N^-1 * sum_k A[k] * x_k^-i.
  function automatic void intt_naive(input u64 a[], input u64 q, input u64 psi, output u64 r[]);
    int n = a.size();
    int logn = $clog2(n);
    u64 ninv = invmod(u64'(n), q);
    r = new[n];
    for (int i = 0; i < n; i++) r[i] = 0;
    for (int k = 0; k < n; k++) begin
      u64 xi = invmod(powmod(psi, u64'(2 * bitrev(k, logn) + 1), q), q);
      u64 xp = 1;
      for (int i = 0; i < n; i++) begin
        r[i] = addmod(r[i], mulmod(a[k], xp, q), q);
        xp = mulmod(xp, xi, q);
      end
    end
    for (int i = 0; i < n; i++) r[i] = mulmod(r[i], ninv, q);
  endfunction

  // Fast versions (textbook iterative loops) for large N; same conventions as the naive ones.
  function automatic void ntt_fast(input u64 a[], input u64 q, input u64 psi, output u64 r[]);
    int n = a.size();
    int logn = $clog2(n);
    int t = n;
    r = a;
    for (int m = 1; m < n; m = m * 2) begin
      t = t / 2;
      for (int i = 0; i < m; i++) begin
        u64 s = powmod(psi, u64'(bitrev(m + i, logn)), q);
        for (int j = 2 * i * t; j < 2 * i * t + t; j++) begin
          u64 uu = r[j];
          u64 vv = mulmod(r[j + t], s, q);
          r[j]     = addmod(uu, vv, q);
          r[j + t] = submod(uu, vv, q);
        end
      end
    end
  endfunction

  function automatic void intt_fast(input u64 a[], input u64 q, input u64 psi, output u64 r[]);
    int n = a.size();
    int logn = $clog2(n);
    int t = 1;
    u64 psi_inv = invmod(psi, q);
    u64 ninv = invmod(u64'(n), q);
    r = a;
    for (int m = n / 2; m >= 1; m = m / 2) begin
      for (int i = 0; i < m; i++) begin
        u64 s = powmod(psi_inv, u64'(bitrev(m + i, logn)), q);
        for (int j = 2 * i * t; j < 2 * i * t + t; j++) begin
          u64 uu = r[j];
          u64 vv = r[j + t];
          r[j]     = addmod(uu, vv, q);
          r[j + t] = mulmod(submod(uu, vv, q), s, q);
        end
      end
      t = t * 2;
    end
    for (int i = 0; i < n; i++) r[i] = mulmod(r[i], ninv, q);
  endfunction

  function automatic void ntt_any(input u64 a[], input u64 q, input u64 psi, output u64 r[]);
    if (a.size() <= 64) ntt_naive(a, q, psi, r);
    else ntt_fast(a, q, psi, r);
  endfunction

  function automatic void intt_any(input u64 a[], input u64 q, input u64 psi, output u64 r[]);
    if (a.size() <= 64) intt_naive(a, q, psi, r);
    else intt_fast(a, q, psi, r);
  endfunction

  // Slot rotation of an NTT-domain limb by the Galois element g (odd, < 2N):
  // r[i] = a[bitrev((g * (2*bitrev(i)+1) mod 2N - 1) / 2)].
  function automatic void galois_ref(input u64 a[], input int g, output u64 r[]);
    int n = a.size();
    int logn = $clog2(n);
    r = new[n];
    for (int i = 0; i < n; i++) begin
      int e = (g * (2 * bitrev(i, logn) + 1)) % (2 * n);
      r[i] = a[bitrev((e - 1) / 2, logn)];
    end
  endfunction

  // Reference KeySwitch. Flattened arrays: c[i*n + t] (i < k), key_x[((i*(k+1)) + j)*n + t]
  // (decomposition index i < k, modulus j <= k), o_x[j*n + t] (j < k). qs[k] is the special
  // modulus p, psis[m] a primitive 2n-th root mod qs[m].
  function automatic void ks_ref(input int n, input int k, input u64 qs[], input u64 psis[],
                                 input u64 c[], input u64 key0[], input u64 key1[],
                                 output u64 o0[], output u64 o1[]);
    u64 a[][];
    u64 acc0[][], acc1[][];
    u64 tmp[], b[], t0[], tj[];
    a = new[k];
    acc0 = new[k + 1];
    acc1 = new[k + 1];
    tmp = new[n];
    for (int i = 0; i < k; i++) begin
      for (int t = 0; t < n; t++) tmp[t] = c[i * n + t];
      intt_any(tmp, qs[i], psis[i], a[i]);
    end
    for (int j = 0; j <= k; j++) begin
      acc0[j] = new[n];
      acc1[j] = new[n];
      for (int t = 0; t < n; t++) begin acc0[j][t] = 0; acc1[j][t] = 0; end
      for (int i = 0; i < k; i++) begin
        if (i == j) begin
          b = new[n];
          for (int t = 0; t < n; t++) b[t] = c[i * n + t];
        end else begin
          for (int t = 0; t < n; t++) tmp[t] = a[i][t] % qs[j];
          ntt_any(tmp, qs[j], psis[j], b);
        end
        for (int t = 0; t < n; t++) begin
          acc0[j][t] = addmod(acc0[j][t], mulmod(b[t], key0[(i * (k + 1) + j) * n + t], qs[j]), qs[j]);
          acc1[j][t] = addmod(acc1[j][t], mulmod(b[t], key1[(i * (k + 1) + j) * n + t], qs[j]), qs[j]);
        end
      end
    end
    o0 = new[k * n];
    o1 = new[k * n];
    for (int x = 0; x < 2; x++) begin
      intt_any(x == 0 ? acc0[k] : acc1[k], qs[k], psis[k], t0);
      for (int j = 0; j < k; j++) begin
        u64 pinv = invmod(qs[k] % qs[j], qs[j]);
        for (int t = 0; t < n; t++) tmp[t] = t0[t] % qs[j];
        ntt_any(tmp, qs[j], psis[j], tj);
        for (int t = 0; t < n; t++) begin
          u64 v;
          v = mulmod(submod(x == 0 ? acc0[j][t] : acc1[j][t], tj[t], qs[j]), pinv, qs[j]);
          if (x == 0) o0[j * n + t] = v; else o1[j * n + t] = v;
        end
      end
    end
  endfunction

  // Reference Rescale of a two-part ciphertext with l limbs: c_x[m*n + t], o_x[j*n + t], j < l-1.
  function automatic void rescale_ref(input int n, input int l, input u64 qs[], input u64 psis[],
                                      input u64 c0[], input u64 c1[],
                                      output u64 o0[], output u64 o1[]);
    u64 tmp[], t0[], tj[];
    tmp = new[n];
    o0 = new[(l - 1) * n];
    o1 = new[(l - 1) * n];
    for (int x = 0; x < 2; x++) begin
      for (int t = 0; t < n; t++) tmp[t] = (x == 0) ? c0[(l - 1) * n + t] : c1[(l - 1) * n + t];
      intt_any(tmp, qs[l - 1], psis[l - 1], t0);
      for (int j = 0; j < l - 1; j++) begin
        u64 qinv = invmod(qs[l - 1] % qs[j], qs[j]);
        for (int t = 0; t < n; t++) tmp[t] = t0[t] % qs[j];
        ntt_any(tmp, qs[j], psis[j], tj);
        for (int t = 0; t < n; t++) begin
          u64 cv, v;
          cv = (x == 0) ? c0[j * n + t] : c1[j * n + t];
          v = mulmod(submod(cv, tj[t], qs[j]), qinv, qs[j]);
          if (x == 0) o0[j * n + t] = v; else o1[j * n + t] = v;
        end
      end
    end
  endfunction

endpackage
