// tb_he_ewise: streams random limbs through each of the four element-wise operations, with idle
// gaps between beats, and compares every registered result with reference modular arithmetic.
// Timing: each result must appear exactly one clock after its input beat (out_valid). The four
// operations are those of the design's operation set; lane count and gaps are reduced/chosen
// here. A cycle watchdog counts a failure and ends the run if it hangs.
module tb_he_ewise;
  import he_ref_pkg::*;
  import he_pkg::*;
  localparam int W = 33, P = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ew_op_e op;
  logic [W-1:0] q;
  logic [W:0] mu;
  logic in_valid, out_valid;
  logic [P-1:0][W-1:0] a0, a1, b0, b1, d0, d1, d2;
  int checks = 0, failures = 0;

  he_ewise #(.W(W), .P(P)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string what, logic [W-1:0] got, u64 exp);
    checks++;
    if (u64'(got) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL op=%s %s got %0d exp %0d", op.name(), what, got, exp);
    end
  endtask

  initial begin
    u64 qq = find_prime(W, 8192, 2);
    u64 x0[P], x1[P], y0[P], y1[P];
    q = W'(qq); mu = (W+1)'(barrett_mu(qq, W));
    in_valid = 0; op = EW_PC_ADD; a0 = '0; a1 = '0; b0 = '0; b1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int o = 0; o < 4; o++) begin
      op = ew_op_e'(o);
      for (int n = 0; n < 50; n++) begin
        @(negedge clk);
        for (int l = 0; l < P; l++) begin
          x0[l] = {$urandom, $urandom} % qq; x1[l] = {$urandom, $urandom} % qq;
          y0[l] = {$urandom, $urandom} % qq; y1[l] = {$urandom, $urandom} % qq;
          a0[l] = W'(x0[l]); a1[l] = W'(x1[l]); b0[l] = W'(y0[l]); b1[l] = W'(y1[l]);
        end
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid) failures++;
        for (int l = 0; l < P; l++) begin
          unique case (op)
            EW_PC_ADD:  begin cmp("d0", d0[l], addmod(x0[l], y0[l], qq)); cmp("d1", d1[l], x1[l]); end
            EW_PC_MULT: begin cmp("d0", d0[l], mulmod(x0[l], y0[l], qq)); cmp("d1", d1[l], mulmod(x1[l], y0[l], qq)); end
            EW_CC_ADD:  begin cmp("d0", d0[l], addmod(x0[l], y0[l], qq)); cmp("d1", d1[l], addmod(x1[l], y1[l], qq)); end
            EW_CC_MULT: begin
              cmp("d0", d0[l], mulmod(x0[l], y0[l], qq));
              cmp("d1", d1[l], addmod(mulmod(x0[l], y1[l], qq), mulmod(x1[l], y0[l], qq), qq));
              cmp("d2", d2[l], mulmod(x1[l], y1[l], qq));
            end
            default: ;
          endcase
        end
        if (n % 3 == 0) @(negedge clk);   // idle gap
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
