// tb_automorph: checks the NTT-domain rotation permutation against its definition. A random
// polynomial a(x) is mapped to a(x^g) mod (x^N + 1) in coefficient form, both are transformed
// by direct evaluation, and the unit's output on NTT(a) must equal NTT(a(x^g)). Several Galois
// elements are tried (powers of 5 and the conjugation 2N-1); the read-out must take N/P beats.
module tb_automorph;
  import he_ref_pkg::*;
  localparam int N = 32, W = 33, P = 4;
  localparam int LOGN = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [LOGN:0] galois;
  logic ld_en, start, busy, out_valid;
  logic [$clog2(N/P)-1:0] ld_addr, out_addr;
  logic [P-1:0][W-1:0] ld_data, out_data;
  int checks = 0, failures = 0;

  automorph #(.N(N), .W(W), .P(P)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u64 qq, psi, a[], ag[], A[], AG[];
    int gs[4];
    int beats;
    gs[0] = 5; gs[1] = 25; gs[2] = 2 * N - 1; gs[3] = 3;
    qq = find_prime(W, N, 0);
    psi = find_psi(qq, N);
    ld_en = 0; start = 0; ld_addr = '0; ld_data = '0; galois = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      a = new[N]; ag = new[N];
      for (int i = 0; i < N; i++) begin a[i] = {$urandom, $urandom} % qq; ag[i] = 0; end
      for (int i = 0; i < N; i++) begin
        int e;
        e = (i * gs[t]) % (2 * N);
        if (e < N) ag[e] = addmod(ag[e], a[i], qq);
        else       ag[e - N] = submod(ag[e - N], a[i], qq);
      end
      ntt_naive(a, qq, psi, A);
      ntt_naive(ag, qq, psi, AG);
      galois = (LOGN+1)'(gs[t]);
      for (int b = 0; b < N / P; b++) begin
        @(negedge clk);
        ld_en = 1; ld_addr = b[$clog2(N/P)-1:0];
        for (int l = 0; l < P; l++) ld_data[l] = W'(A[b * P + l]);
      end
      @(negedge clk); ld_en = 0; start = 1;
      @(negedge clk); start = 0;
      beats = 0;
      while (busy || out_valid) begin
        if (out_valid) begin
          beats++;
          for (int l = 0; l < P; l++) begin
            int idx;
            u64 exp;
            idx = 32'(out_addr) * P + l;
            exp = AG[idx];
            checks++;
            if (u64'(out_data[l]) != exp) begin
              failures++;
              if (failures < 10) $display("FAIL g=%0d i=%0d got %0d exp %0d", gs[t], idx, out_data[l], exp);
            end
          end
        end
        @(negedge clk);
      end
      checks++;
      if (beats != N / P) begin failures++; $display("FAIL beats %0d", beats); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
