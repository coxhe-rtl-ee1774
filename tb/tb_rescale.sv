// tb_rescale: configures L moduli, loads a random two-part ciphertext, runs Rescale twice and
// compares every output coefficient with a software RNS rescale. Also checks that the first
// result beat appears within L_INTT + L_BarrettReduce + L_NTT (the latency model, with
// L_BarrettReduce = N/P_MULT) plus the output pass and a few control cycles.
module tb_rescale;
  import he_ref_pkg::*;
  import he_pkg::*;
  localparam int N = 32, W = 33, L = 3, PN = 4, PM = 4;
  localparam int LOGN = $clog2(N);
  localparam int LT = LOGN * N / (2 * PN);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we;
  cfg_kind_e cfg_kind;
  logic [$clog2(L)-1:0] cfg_mod;
  logic [LOGN-1:0] cfg_addr;
  logic [W:0] cfg_data;
  logic in_en, in_part;
  logic [$clog2(L)-1:0] in_limb, out_limb;
  logic [$clog2(N/PM)-1:0] in_addr, out_addr;
  logic [PM-1:0][W-1:0] in_data, out0, out1;
  logic start, busy, done, out_valid;
  int checks = 0, failures = 0;

  rescale #(.N(N), .W(W), .L(L), .P_NTT(PN), .P_MULT(PM)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(cfg_kind_e k, int m, int a, u64 d);
    @(negedge clk);
    cfg_we = 1; cfg_kind = k; cfg_mod = m[$clog2(L)-1:0]; cfg_addr = a[LOGN-1:0]; cfg_data = (W+1)'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  u64 r0[], r1[];
  int nout;
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
  end

  initial begin
    u64 qs[], psis[], c0[], c1[];
    int cyc, first;
    qs = new[L]; psis = new[L];
    cfg_we = 0; cfg_kind = CFG_Q; cfg_mod = '0; cfg_addr = '0; cfg_data = '0;
    in_en = 0; in_part = 0; in_limb = '0; in_addr = '0; in_data = '0; start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < L; m++) begin
      qs[m] = find_prime(W, N, m);
      psis[m] = find_psi(qs[m], N);
    end
    for (int m = 0; m < L; m++) begin
      cfg(CFG_Q, m, 0, qs[m]);
      cfg(CFG_MU, m, 0, barrett_mu(qs[m], W));
      cfg(CFG_NINV, m, 0, invmod(u64'(N), qs[m]));
      cfg(CFG_INV, m, 0, invmod(qs[L - 1] % qs[m], qs[m]));
      for (int a = 0; a < N; a++) begin
        cfg(CFG_TWF, m, a, powmod(psis[m], u64'(bitrev(a, LOGN)), qs[m]));
        cfg(CFG_TWI, m, a, powmod(invmod(psis[m], qs[m]), u64'(bitrev(a, LOGN)), qs[m]));
      end
    end
    for (int t = 0; t < 2; t++) begin
      c0 = new[L * N]; c1 = new[L * N];
      for (int m = 0; m < L; m++)
        for (int i = 0; i < N; i++) begin
          c0[m * N + i] = {$urandom, $urandom} % qs[m];
          c1[m * N + i] = {$urandom, $urandom} % qs[m];
        end
      rescale_ref(N, L, qs, psis, c0, c1, r0, r1);
      for (int x = 0; x < 2; x++)
        for (int m = 0; m < L; m++)
          for (int b = 0; b < N / PM; b++) begin
            @(negedge clk);
            in_en = 1; in_part = x[0]; in_limb = m[$clog2(L)-1:0]; in_addr = b[$clog2(N/PM)-1:0];
            for (int l = 0; l < PM; l++) in_data[l] = W'(x == 0 ? c0[m * N + b * PM + l] : c1[m * N + b * PM + l]);
          end
      @(negedge clk); in_en = 0; start = 1; nout = 0;
      @(negedge clk); start = 0;
      cyc = 1; first = -1;
      while (!done) begin
        if (out_valid && first < 0) first = cyc;
        @(negedge clk); cyc++;
      end
      @(negedge clk);   // let the monitor take the last beat
      checks++;
      if (nout != (L - 1) * N / PM) begin failures++; $display("FAIL beats %0d", nout); end
      checks++;
      if (first > LT + N / PM + LT + N / PM + 8) begin
        failures++;
        $display("FAIL first result after %0d cycles", first);
      end
      $display("rescale: first result after %0d cycles, done after %0d (L_INTT=L_NTT=%0d)", first, cyc, LT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
