// tb_coxhe_full: the end-to-end kernel of coxhe_scenario.svh on coxhe_top at its default size
// (N = 8192, 33-bit moduli, three ciphertext moduli plus the special modulus, 16 butterflies per
// transform unit, 8 lanes). The software models switch to fast iterative transforms at this size.
// Timing: the full configuration pass (twiddle tables for four moduli) takes about 131k cycles,
// the KeySwitch about 31k; a cycle watchdog bounds the run. The parameters are the design
// defaults; the stimulus is shared with the reduced-size test.
module tb_coxhe_full;
  import he_pkg::*;
  import he_ref_pkg::*;
  localparam int N = DEF_N, W = DEF_W, K = DEF_K, PN = DEF_P_NTT, PM = DEF_P_MULT;

  `include "coxhe_scenario.svh"

  coxhe_top dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
