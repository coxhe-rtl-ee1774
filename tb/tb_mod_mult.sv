// tb_mod_mult: checks a*b mod q against 128-bit reference arithmetic for random reduced
// operands and the extremes 0, 1, q-1 on several NTT-friendly primes.
// Combinational unit: one operand pair per time step, no clock. The checked function is the
// modular multiplier of the document's datapath; the operand mix is this testbench's choice.
// A watchdog ends the run if it hangs.
module tb_mod_mult;
  import he_ref_pkg::*;
  localparam int W = 33;
  logic [W-1:0] a, b, q, r;
  logic [W:0]   mu;
  int checks = 0, failures = 0;

  mod_mult #(.W(W)) dut (.a(a), .b(b), .q(q), .mu(mu), .r(r));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(u64 qq, u64 aa, u64 bb);
    u64 exp;
    q = W'(qq); mu = (W+1)'(barrett_mu(qq, W)); a = W'(aa); b = W'(bb);
    #1;
    exp = mulmod(aa, bb, qq);
    checks++;
    if (u64'(r) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL q=%0d %0d*%0d r=%0d exp=%0d", qq, aa, bb, r, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 3; k++) begin
      u64 qq;
      qq = find_prime(W, 8192, k);
      check(qq, 0, qq - 1);
      check(qq, 1, qq - 1);
      check(qq, qq - 1, qq - 1);
      for (int n = 0; n < 1000; n++)
        check(qq, {$urandom, $urandom} % qq, {$urandom, $urandom} % qq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
