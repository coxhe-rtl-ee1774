// tb_coxhe_top: end-to-end test of the accelerator at a reduced size (N = 32, three ciphertext
// moduli, 4 butterflies and 4 lanes), so the software models can use direct evaluation. The
// kernel and its checks are in coxhe_scenario.svh.
// Timing: every unit is run through its start/done handshake; a cycle watchdog counts a failure
// if anything hangs. The operation sequence is a typical encrypted inner-product step chosen
// for this test.
module tb_coxhe_top;
  import he_pkg::*;
  import he_ref_pkg::*;
  localparam int N = 32, W = 33, K = 3, PN = 4, PM = 4;

  `include "coxhe_scenario.svh"

  coxhe_top #(.N(N), .W(W), .K(K), .P_NTT(PN), .P_MULT(PM)) dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
