// coxhe_top: CKKS homomorphic-operation accelerator built from the units of this library.
//
// The accelerator offers the high-level CKKS operations on RNS limbs held in NTT form:
//  * he_ewise  : P-C Add, P-C Mult, C-C Add, C-C Mult, streamed one limb at a time (P_MULT lanes)
//  * rescale   : drops the last of K ciphertext moduli from a two-part ciphertext
//  * keyswitch : the low-latency KeySwitch over K moduli plus one special modulus
//  * automorph : the slot permutation of Rotate; its output stream can be routed straight into
//                the KeySwitch input (ks_src = 1) or read out by the host
// Relinearize and Rotate are sequences on these units, as in the operation hierarchy where both
// invoke KeySwitch: Relinearize loads d2 of a C-C Mult result into the KeySwitch and adds the
// result to (d0, d1) with a C-C Add; Rotate permutes c0 and c1 with automorph, key-switches the
// permuted c1 (routed directly) and adds the result to the permuted c0 with a C-C Add. The host
// sequences them and supplies key streams (the keys live in off-chip DRAM, as in the document).
//
// Constants: one configuration port writes the constant banks selected by cfg_dst (bit 0 the
// KeySwitch bank with moduli 0..K, bit 1 the Rescale bank with moduli 0..K-1) and a small
// q / mu table (moduli 0..K) that the element-wise unit selects by ew_limb. CFG_INV carries
// p^-1 mod q_j for the KeySwitch bank and q_{K-1}^-1 mod q_j for the Rescale bank.
// All units run concurrently and have their own start/busy/done; timing is that of each unit.
// The unit set follows the operation hierarchy of the document; the port-level organisation,
// the routing switch and the host-driven sequencing of Relinearize/Rotate are this design's.
module coxhe_top
  import he_pkg::*;
#(
  parameter int unsigned N      = DEF_N,
  parameter int unsigned W      = DEF_W,
  parameter int unsigned K      = DEF_K,
  parameter int unsigned P_NTT  = DEF_P_NTT,
  parameter int unsigned P_MULT = DEF_P_MULT
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // configuration
  input  logic                             cfg_we,
  input  logic [1:0]                       cfg_dst,
  input  cfg_kind_e                        cfg_kind,
  input  logic [$clog2(K+1)-1:0]           cfg_mod,
  input  logic [$clog2(N)-1:0]             cfg_addr,
  input  logic [W:0]                       cfg_data,
  // element-wise unit
  input  ew_op_e                           ew_op,
  input  logic [$clog2(K+1)-1:0]           ew_limb,
  input  logic                             ew_in_valid,
  input  logic [P_MULT-1:0][W-1:0]         ew_a0,
  input  logic [P_MULT-1:0][W-1:0]         ew_a1,
  input  logic [P_MULT-1:0][W-1:0]         ew_b0,
  input  logic [P_MULT-1:0][W-1:0]         ew_b1,
  output logic                             ew_out_valid,
  output logic [P_MULT-1:0][W-1:0]         ew_d0,
  output logic [P_MULT-1:0][W-1:0]         ew_d1,
  output logic [P_MULT-1:0][W-1:0]         ew_d2,
  // rescale
  input  logic                             rs_in_en,
  input  logic                             rs_in_part,
  input  logic [$clog2(K)-1:0]             rs_in_limb,
  input  logic [$clog2(N/P_MULT)-1:0]      rs_in_addr,
  input  logic [P_MULT-1:0][W-1:0]         rs_in_data,
  input  logic                             rs_start,
  output logic                             rs_busy,
  output logic                             rs_done,
  output logic                             rs_out_valid,
  output logic [$clog2(K)-1:0]             rs_out_limb,
  output logic [$clog2(N/P_MULT)-1:0]      rs_out_addr,
  output logic [P_MULT-1:0][W-1:0]         rs_out0,
  output logic [P_MULT-1:0][W-1:0]         rs_out1,
  // rotation permutation
  input  logic [$clog2(N):0]               ro_galois,
  input  logic                             ro_ld_en,
  input  logic [$clog2(N/P_MULT)-1:0]      ro_ld_addr,
  input  logic [P_MULT-1:0][W-1:0]         ro_ld_data,
  input  logic                             ro_start,
  output logic                             ro_busy,
  output logic                             ro_out_valid,
  output logic [$clog2(N/P_MULT)-1:0]      ro_out_addr,
  output logic [P_MULT-1:0][W-1:0]         ro_out_data,
  // keyswitch
  input  logic                             ks_src,      // 0: ks_in_* port, 1: automorph output
  input  logic                             ks_in_en,
  input  logic [$clog2(K)-1:0]             ks_in_limb,
  input  logic [$clog2(N/P_MULT)-1:0]      ks_in_addr,
  input  logic [P_MULT-1:0][W-1:0]         ks_in_data,
  input  logic                             ks_start,
  output logic                             ks_busy,
  output logic                             ks_done,
  input  logic                             ks_key_valid,
  output logic                             ks_key_ready,
  input  logic [K-1:0][P_MULT-1:0][W-1:0]  ks_key0,
  input  logic [K-1:0][P_MULT-1:0][W-1:0]  ks_key1,
  output logic                             ks_out_valid,
  output logic [$clog2(K)-1:0]             ks_out_limb,
  output logic [$clog2(N/P_MULT)-1:0]      ks_out_addr,
  output logic [P_MULT-1:0][W-1:0]         ks_out0,
  output logic [P_MULT-1:0][W-1:0]         ks_out1,
  output ks_events_t                       ks_ev
);
  // ---------------------------------------------------------------- modulus table for he_ewise
  logic [W-1:0] ew_q  [K+1];
  logic [W:0]   ew_mu [K+1];

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_kind == CFG_Q)  ew_q[cfg_mod]  <= W'(cfg_data);
    if (cfg_we && cfg_kind == CFG_MU) ew_mu[cfg_mod] <= cfg_data;
  end

  he_ewise #(.W(W), .P(P_MULT)) u_ewise (
    .clk, .rst_n, .op(ew_op), .q(ew_q[ew_limb]), .mu(ew_mu[ew_limb]),
    .in_valid(ew_in_valid), .a0(ew_a0), .a1(ew_a1), .b0(ew_b0), .b1(ew_b1),
    .out_valid(ew_out_valid), .d0(ew_d0), .d1(ew_d1), .d2(ew_d2)
  );

  // ---------------------------------------------------------------- rescale
  logic rs_cfg_we;
  assign rs_cfg_we = cfg_we && cfg_dst[1] && (int'(cfg_mod) < K);

  rescale #(.N(N), .W(W), .L(K), .P_NTT(P_NTT), .P_MULT(P_MULT)) u_rescale (
    .clk, .rst_n,
    .cfg_we(rs_cfg_we), .cfg_kind, .cfg_mod($clog2(K)'(cfg_mod)), .cfg_addr, .cfg_data,
    .in_en(rs_in_en), .in_part(rs_in_part), .in_limb(rs_in_limb), .in_addr(rs_in_addr),
    .in_data(rs_in_data), .start(rs_start), .busy(rs_busy), .done(rs_done),
    .out_valid(rs_out_valid), .out_limb(rs_out_limb), .out_addr(rs_out_addr),
    .out0(rs_out0), .out1(rs_out1)
  );

  // ---------------------------------------------------------------- rotation permutation
  automorph #(.N(N), .W(W), .P(P_MULT)) u_automorph (
    .clk, .rst_n, .galois(ro_galois), .ld_en(ro_ld_en), .ld_addr(ro_ld_addr),
    .ld_data(ro_ld_data), .start(ro_start), .busy(ro_busy), .out_valid(ro_out_valid),
    .out_addr(ro_out_addr), .out_data(ro_out_data)
  );

  // ---------------------------------------------------------------- keyswitch and its input switch
  logic                        ksi_en;
  logic [$clog2(N/P_MULT)-1:0] ksi_addr;
  logic [P_MULT-1:0][W-1:0]    ksi_data;

  always_comb begin
    if (ks_src) begin
      ksi_en   = ro_out_valid;
      ksi_addr = ro_out_addr;
      ksi_data = ro_out_data;
    end else begin
      ksi_en   = ks_in_en;
      ksi_addr = ks_in_addr;
      ksi_data = ks_in_data;
    end
  end

  keyswitch #(.N(N), .W(W), .K(K), .P_NTT(P_NTT), .P_MULT(P_MULT)) u_keyswitch (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_dst[0]), .cfg_kind, .cfg_mod, .cfg_addr, .cfg_data,
    .in_en(ksi_en), .in_limb(ks_in_limb), .in_addr(ksi_addr), .in_data(ksi_data),
    .start(ks_start), .busy(ks_busy), .done(ks_done),
    .key_valid(ks_key_valid), .key_ready(ks_key_ready), .key0(ks_key0), .key1(ks_key1),
    .out_valid(ks_out_valid), .out_limb(ks_out_limb), .out_addr(ks_out_addr),
    .out0(ks_out0), .out1(ks_out1), .ev(ks_ev)
  );
endmodule
