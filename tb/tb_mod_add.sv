// tb_mod_add: checks a + b mod q and a - b mod q against reference arithmetic, including the
// wrap-around cases (sum >= q, a < b).
// Combinational unit: one operand set per time step. The function is the modular adder and
// subtractor of the datapath; the operand mix is this testbench's choice. A watchdog ends the
// run if it hangs.
module tb_mod_add;
  import he_ref_pkg::*;
  localparam int W = 33;
  logic [W-1:0] a, b, q, r;
  logic         sub;
  int checks = 0, failures = 0;

  mod_add #(.W(W)) dut (.a(a), .b(b), .q(q), .sub(sub), .r(r));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(u64 qq, u64 aa, u64 bb, bit s);
    u64 exp;
    q = W'(qq); a = W'(aa); b = W'(bb); sub = s;
    #1;
    exp = s ? submod(aa, bb, qq) : addmod(aa, bb, qq);
    checks++;
    if (u64'(r) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL q=%0d a=%0d b=%0d sub=%0d r=%0d exp=%0d", qq, aa, bb, s, r, exp);
    end
  endtask

  initial begin
    u64 qq = find_prime(W, 8192, 0);
    check(qq, qq - 1, qq - 1, 0);
    check(qq, 0, qq - 1, 1);
    check(qq, qq - 1, 1, 0);
    check(qq, 5, 5, 1);
    for (int n = 0; n < 2000; n++)
      check(qq, {$urandom, $urandom} % qq, {$urandom, $urandom} % qq, n[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
