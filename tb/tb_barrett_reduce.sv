// tb_barrett_reduce: checks x mod q against the % operator for random and edge-case operands
// (x = 0, q-1, q, q^2-1, 2^(2W)-1) on several full-width primes.
// The unit is combinational: each operand set is applied, settles for one time step and is
// compared. The reduction method follows the document; the test vectors and primes are this
// testbench's own. A watchdog ends the run if it hangs.
module tb_barrett_reduce;
  import he_ref_pkg::*;
  localparam int W = 33;
  logic [2*W-1:0] x;
  logic [W-1:0]   q, r;
  logic [W:0]     mu;
  int checks = 0, failures = 0;

  barrett_reduce #(.W(W)) dut (.x(x), .q(q), .mu(mu), .r(r));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(u64 qq, logic [2*W-1:0] xx);
    logic [127:0] exp;
    q = W'(qq); mu = (W+1)'(barrett_mu(qq, W)); x = xx;
    #1;
    exp = 128'(xx) % 128'(qq);
    checks++;
    if (128'(r) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL q=%0d x=%0d r=%0d exp=%0d", qq, xx, r, exp);
    end
  endtask

  initial begin
    u64 qs[4];
    qs[0] = find_prime(W, 16, 0);
    qs[1] = find_prime(W, 16, 3);
    qs[2] = (u64'(1) << (W - 1)) + 1;   // smallest full-width odd value
    qs[3] = (u64'(1) << W) - 1;         // largest
    for (int k = 0; k < 4; k++) begin
      logic [127:0] qsq;
      qsq = 128'(qs[k]) * 128'(qs[k]);
      check(qs[k], 0);
      check(qs[k], (2*W)'(qs[k] - 1));
      check(qs[k], (2*W)'(qs[k]));
      check(qs[k], (2*W)'(qsq - 1));
      check(qs[k], '1);
      for (int n = 0; n < 500; n++)
        check(qs[k], {$urandom, $urandom, $urandom} & {(2*W){1'b1}});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
