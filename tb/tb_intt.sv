// tb_intt: runs the inverse transform on random NTT-domain limbs and compares every output
// coefficient with a direct inverse evaluation N^-1 * sum_k A[k] x_k^-i. Also checks the time against the
// model log2(N) * N / (2P) cycles. Uses a reduced N so the direct evaluation stays quick.
module tb_intt;
  import he_ref_pkg::*;
  localparam int N = 64, W = 33, P = 4, IOP = 2;
  localparam int LOGN = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0] q;
  logic [W:0] mu;
  logic [W-1:0] n_inv;
  logic start, busy, done, ld_en;
  logic [$clog2(N/IOP)-1:0] ld_addr, rd_addr;
  logic [IOP-1:0][W-1:0] ld_data, rd_data;
  logic [P-1:0][LOGN-1:0] tw_addr;
  logic [P-1:0][W-1:0] tw_data;
  u64 tw [N];
  int checks = 0, failures = 0;

  intt #(.N(N), .W(W), .P(P), .IOP(IOP)) dut (.*);

  always_comb for (int l = 0; l < P; l++) tw_data[l] = W'(tw[tw_addr[l]]);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u64 qq, psi, a[], r[];
    int cyc;
    start = 0; ld_en = 0; ld_addr = '0; rd_addr = '0; ld_data = '0;
    qq = find_prime(W, N, 1);
    psi = find_psi(qq, N);
    q = W'(qq); mu = (W+1)'(barrett_mu(qq, W)); n_inv = W'(invmod(u64'(N), qq));
    for (int i = 0; i < N; i++) tw[i] = powmod(invmod(psi, qq), u64'(bitrev(i, LOGN)), qq);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      a = new[N];
      for (int i = 0; i < N; i++) a[i] = (t == 0) ? u64'(i == 1) : {$urandom, $urandom} % qq;
      for (int b = 0; b < N / IOP; b++) begin
        @(negedge clk);
        ld_en = 1; ld_addr = b[$clog2(N/IOP)-1:0];
        for (int l = 0; l < IOP; l++) ld_data[l] = W'(a[b * IOP + l]);
      end
      @(negedge clk); ld_en = 0; start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != LOGN * N / (2 * P) + 1) begin
        failures++;
        $display("FAIL cycles %0d expected %0d", cyc - 1, LOGN * N / (2 * P));
      end
      intt_naive(a, qq, psi, r);
      for (int b = 0; b < N / IOP; b++) begin
        rd_addr = b[$clog2(N/IOP)-1:0];
        #1;
        for (int l = 0; l < IOP; l++) begin
          checks++;
          if (u64'(rd_data[l]) != r[b * IOP + l]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d k=%0d got %0d exp %0d", t, b*IOP+l, rd_data[l], r[b*IOP+l]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
