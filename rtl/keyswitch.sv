// keyswitch: low-latency CKKS KeySwitch with the special modulus computed first.
//
// Input: one polynomial c of K RNS limbs (limb i mod q_i), in bit-reversed NTT order, and a key
// stream holding two key polynomials ksk0[i][j], ksk1[i][j] for every decomposition index i < K
// and every modulus j <= K (j = K is the special modulus p). Output: the two polynomials
//   out_x[j] = (acc_x[j] - NTT_j(INTT_p(acc_x[K]) mod q_j)) * p^-1 mod q_j,   j < K, x = 0, 1
//   acc_x[j] = sum_i b_ij * ksk_x[i][j] mod q_j,  b_ij = NTT_j(INTT_i(c_i) mod q_j)  (c_j if i = j)
// which the caller adds to the other ciphertext part (Relinearize, Rotate).
//
// Structure (two layers that run at the same time):
//  * INTT0: K intt units bring every input limb to coefficient form, all in parallel.
//  * Former layer, one iteration per target modulus j. Iteration 0 handles j = K (the special
//    modulus), iterations 1..K handle j = 0..K-1. In an iteration, K ntt units load a_i mod q_j
//    (reduced by Barrett units) and transform it in parallel; for i = j the NTT-domain input limb
//    is loaded and the transform is bypassed. The multiply-accumulate pass then takes one key
//    beat per cycle (valid/ready, it stalls while the stream is empty), multiplies each of the K
//    transformed limbs by its key word and sums them mod q_j. Because an iteration covers every
//    input limb of one modulus, acc[j] is final at the end of iteration j. Only the first
//    iteration has a separate load pass: later ones are loaded during the accumulate pass before
//    them, beat b of the next input being written to the address the pass reads in that cycle.
//  * Modulus-down layer: acc[K] is written straight into two INTT1 units, which start as soon as
//    the first iteration ends, while the former layer is still busy. For each j < K, two ntt
//    units load INTT1's result mod q_j and transform it; the output pass then waits until acc[j]
//    is final, subtracts and multiplies by p^-1 mod q_j. The output pass of limb j loads limb
//    j+1 into the same units in the same way.
// Ordering the iterations by modulus, special modulus first, is what lets INTT1 wait for one
// iteration instead of all K; this follows the document. Overlapping each load with the pass
// before it, the P_MULT-wide I/O paths, running one KeySwitch at a time and the missing rounding
// correction in the modulus-down step are this design's choices.
// Timing (full key stream): L_INTT + N/P_MULT + (K+1) * (L_NTT + N/P_MULT) for the former layer;
// the last limb leaves one L_NTT + N/P_MULT after the last accumulator. At N = 8192, K = 3 this
// is 26128 cycles from start to done, against 26624 from the latency model
// L_INTT + max(L_module) * (K + 4).
//
// Interface: configure constants through cfg_* (see he_const_bank; CFG_INV holds p^-1 mod q_j).
// Load the input limbs with in_en while idle, pulse start, then supply keys for moduli
// K, 0, 1, ..., K-1 in that order, each as N/P_MULT beats of P_MULT coefficients for all K
// decomposition indices. Results leave as out_valid beats (limb, beat address, both parts), with
// no back-pressure; done pulses with the last beat. ev carries one-cycle event flags.
// The transform units' busy outputs are left unread: both FSMs follow their done pulses.
module keyswitch
  import he_pkg::*;
#(
  parameter int unsigned N      = 8192,
  parameter int unsigned W      = 33,
  parameter int unsigned K      = 3,
  parameter int unsigned P_NTT  = 16,
  parameter int unsigned P_MULT = 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // constants
  input  logic                             cfg_we,
  input  cfg_kind_e                        cfg_kind,
  input  logic [$clog2(K+1)-1:0]           cfg_mod,
  input  logic [$clog2(N)-1:0]             cfg_addr,
  input  logic [W:0]                       cfg_data,
  // input polynomial
  input  logic                             in_en,
  input  logic [$clog2(K)-1:0]             in_limb,
  input  logic [$clog2(N/P_MULT)-1:0]      in_addr,
  input  logic [P_MULT-1:0][W-1:0]         in_data,
  // control
  input  logic                             start,
  output logic                             busy,
  output logic                             done,
  // key stream
  input  logic                             key_valid,
  output logic                             key_ready,
  input  logic [K-1:0][P_MULT-1:0][W-1:0]  key0,
  input  logic [K-1:0][P_MULT-1:0][W-1:0]  key1,
  // result stream
  output logic                             out_valid,
  output logic [$clog2(K)-1:0]             out_limb,
  output logic [$clog2(N/P_MULT)-1:0]      out_addr,
  output logic [P_MULT-1:0][W-1:0]         out0,
  output logic [P_MULT-1:0][W-1:0]         out1,
  output ks_events_t                       ev
);
  localparam int unsigned M     = K + 1;
  localparam int unsigned MW    = $clog2(M);
  localparam int unsigned LOGN  = $clog2(N);
  localparam int unsigned BEATS = N / P_MULT;
  localparam int unsigned AW    = $clog2(BEATS);
  localparam int unsigned R     = 3 * K + 4;
  localparam int unsigned PM    = P_MULT;

  // ---------------------------------------------------------------- constants
  logic [M-1:0][W-1:0]                q, n_inv, p_inv;
  logic [M-1:0][W:0]                  mu;
  logic [R-1:0][MW-1:0]               tw_mod;
  logic [R-1:0]                       tw_inverse;
  logic [R-1:0][P_NTT-1:0][LOGN-1:0]  tw_addr;
  logic [R-1:0][P_NTT-1:0][W-1:0]     tw_data;

  he_const_bank #(.N(N), .W(W), .M(M), .P(P_NTT), .R(R)) u_bank (
    .clk, .cfg_we, .cfg_kind, .cfg_mod, .cfg_addr, .cfg_data,
    .q, .mu, .n_inv, .inv(p_inv),
    .rd_mod(tw_mod), .rd_inverse(tw_inverse), .rd_addr(tw_addr), .rd_data(tw_data)
  );

  // ---------------------------------------------------------------- storage
  logic [W-1:0] cin  [K][N];   // NTT-domain input limbs (bypass path)
  logic [W-1:0] acc0 [K][N];   // accumulators of the ciphertext moduli
  logic [W-1:0] acc1 [K][N];

  // ---------------------------------------------------------------- control state
  typedef enum logic [2:0] {F_IDLE, F_INTT0, F_LOAD, F_KICK, F_NTT, F_MAC} f_state_e;
  typedef enum logic [3:0] {L_IDLE, L_KICK1, L_INTT, L_LOAD, L_KICK2, L_NTT, L_WAIT, L_OUT}
    l_state_e;

  f_state_e              fst;
  l_state_e              lst;
  logic [MW-1:0]         it;       // former-layer iteration 0..K
  logic [MW-1:0]         jf;       // its target modulus
  logic [AW-1:0]         fbeat, lbeat;
  logic [K-1:0]          f_pend;
  logic [1:0]            l_pend;
  logic [M-1:0]          acc_done;
  logic [MW-1:0]         jl;       // modulus-down limb 0..K-1

  assign jf = (it == '0) ? MW'(K) : it - 1'b1;

  // Loads into the transform units overlap the pass that reads them: while the multiply-
  // accumulate (or output) pass reads beat b of iteration j, beat b of the next iteration's
  // input is written to the same address (the read sees the old word). jfl / jll name the
  // modulus being loaded.
  logic          f_ovl, l_ovl;
  logic [MW-1:0] jfl, jll;
  assign f_ovl = (fst == F_MAC) && key_valid && (int'(it) < K);
  assign jfl   = (fst == F_MAC) ? it : jf;              // next jf is it when it+1 > 0
  assign l_ovl = (lst == L_OUT) && (int'(jl) < K - 1);
  assign jll   = (lst == L_OUT) ? jl + 1'b1 : jl;

  // ---------------------------------------------------------------- INTT0 units
  logic [K-1:0]                  i0_start, i0_done, i0_busy;
  logic [K-1:0][PM-1:0][W-1:0]   i0_rd;

  for (genvar i = 0; i < K; i++) begin : g_intt0
    logic ld;
    assign ld = in_en && (int'(in_limb) == i) && (fst == F_IDLE);
    intt #(.N(N), .W(W), .P(P_NTT), .IOP(PM)) u_intt0 (
      .clk, .rst_n, .q(q[i]), .mu(mu[i]), .n_inv(n_inv[i]),
      .start(i0_start[i]), .busy(i0_busy[i]), .done(i0_done[i]),
      .ld_en(ld), .ld_addr(in_addr), .ld_data(in_data),
      .rd_addr(fbeat), .rd_data(i0_rd[i]),
      .tw_addr(tw_addr[i]), .tw_data(tw_data[i])
    );
    assign tw_mod[i]     = MW'(i);
    assign tw_inverse[i] = 1'b1;
    assign i0_start[i]   = (fst == F_IDLE) && start;
  end

  // ---------------------------------------------------------------- former-layer NTT units
  logic [K-1:0]                  nf_start, nf_done, nf_busy, nf_ld;
  logic [K-1:0][PM-1:0][W-1:0]   nf_ld_data, nf_rd, i0_red;

  for (genvar i = 0; i < K; i++) begin : g_nttf
    for (genvar l = 0; l < PM; l++) begin : g_red
      barrett_reduce #(.W(W)) u_red (
        .x((2*W)'(i0_rd[i][l])), .q(q[jfl]), .mu(mu[jfl]), .r(i0_red[i][l]));
    end
    always_comb begin
      for (int l = 0; l < PM; l++)
        nf_ld_data[i][l] = (int'(jfl) == i) ? cin[i][int'(fbeat) * PM + l] : i0_red[i][l];
    end
    assign nf_ld[i]    = (fst == F_LOAD) || f_ovl;
    assign nf_start[i] = (fst == F_KICK) && f_pend[i];
    ntt #(.N(N), .W(W), .P(P_NTT), .IOP(PM)) u_nttf (
      .clk, .rst_n, .q(q[jf]), .mu(mu[jf]),
      .start(nf_start[i]), .busy(nf_busy[i]), .done(nf_done[i]),
      .ld_en(nf_ld[i]), .ld_addr(fbeat), .ld_data(nf_ld_data[i]),
      .rd_addr(fbeat), .rd_data(nf_rd[i]),
      .tw_addr(tw_addr[K+i]), .tw_data(tw_data[K+i])
    );
    assign tw_mod[K+i]     = jf;
    assign tw_inverse[K+i] = 1'b0;
  end

  // ---------------------------------------------------------------- multiply-accumulate
  logic [PM-1:0][W-1:0] mac0, mac1;

  for (genvar l = 0; l < PM; l++) begin : g_mac
    logic [K-1:0][W-1:0] pr0, pr1, sm0, sm1;
    for (genvar i = 0; i < K; i++) begin : g_term
      mod_mult #(.W(W)) u_m0 (.a(nf_rd[i][l]), .b(key0[i][l]), .q(q[jf]), .mu(mu[jf]), .r(pr0[i]));
      mod_mult #(.W(W)) u_m1 (.a(nf_rd[i][l]), .b(key1[i][l]), .q(q[jf]), .mu(mu[jf]), .r(pr1[i]));
      if (i == 0) begin : g_first
        assign sm0[0] = pr0[0];
        assign sm1[0] = pr1[0];
      end else begin : g_sum
        mod_add #(.W(W)) u_a0 (.a(sm0[i-1]), .b(pr0[i]), .q(q[jf]), .sub(1'b0), .r(sm0[i]));
        mod_add #(.W(W)) u_a1 (.a(sm1[i-1]), .b(pr1[i]), .q(q[jf]), .sub(1'b0), .r(sm1[i]));
      end
    end
    assign mac0[l] = sm0[K-1];
    assign mac1[l] = sm1[K-1];
  end

  assign key_ready = (fst == F_MAC);

  // ---------------------------------------------------------------- INTT1 units (special modulus)
  logic [1:0]                  i1_start, i1_done, i1_busy, i1_ld;
  logic [1:0][PM-1:0][W-1:0]   i1_rd, i1_red;

  for (genvar x = 0; x < 2; x++) begin : g_intt1
    assign i1_ld[x]    = (fst == F_MAC) && key_valid && (int'(jf) == K);
    assign i1_start[x] = (lst == L_KICK1);
    intt #(.N(N), .W(W), .P(P_NTT), .IOP(PM)) u_intt1 (
      .clk, .rst_n, .q(q[K]), .mu(mu[K]), .n_inv(n_inv[K]),
      .start(i1_start[x]), .busy(i1_busy[x]), .done(i1_done[x]),
      .ld_en(i1_ld[x]), .ld_addr(fbeat), .ld_data(x == 0 ? mac0 : mac1),
      .rd_addr(lbeat), .rd_data(i1_rd[x]),
      .tw_addr(tw_addr[2*K+x]), .tw_data(tw_data[2*K+x])
    );
    assign tw_mod[2*K+x]     = MW'(K);
    assign tw_inverse[2*K+x] = 1'b1;
    for (genvar l = 0; l < PM; l++) begin : g_red
      barrett_reduce #(.W(W)) u_red (
        .x((2*W)'(i1_rd[x][l])), .q(q[jll]), .mu(mu[jll]), .r(i1_red[x][l]));
    end
  end

  // ---------------------------------------------------------------- modulus-down NTT units
  logic [1:0]                  nl_start, nl_done, nl_busy, nl_ld;
  logic [1:0][PM-1:0][W-1:0]   nl_rd, dn;

  for (genvar x = 0; x < 2; x++) begin : g_nttl
    assign nl_ld[x]    = (lst == L_LOAD) || l_ovl;
    assign nl_start[x] = (lst == L_KICK2);
    ntt #(.N(N), .W(W), .P(P_NTT), .IOP(PM)) u_nttl (
      .clk, .rst_n, .q(q[jl]), .mu(mu[jl]),
      .start(nl_start[x]), .busy(nl_busy[x]), .done(nl_done[x]),
      .ld_en(nl_ld[x]), .ld_addr(lbeat), .ld_data(i1_red[x]),
      .rd_addr(lbeat), .rd_data(nl_rd[x]),
      .tw_addr(tw_addr[2*K+2+x]), .tw_data(tw_data[2*K+2+x])
    );
    assign tw_mod[2*K+2+x]     = jl;
    assign tw_inverse[2*K+2+x] = 1'b0;
    for (genvar l = 0; l < PM; l++) begin : g_down
      logic [W-1:0] accw, diff;
      assign accw = (x == 0) ? acc0[jl][int'(lbeat) * PM + l] : acc1[jl][int'(lbeat) * PM + l];
      mod_add  #(.W(W)) u_sub (.a(accw), .b(nl_rd[x][l]), .q(q[jl]), .sub(1'b1), .r(diff));
      mod_mult #(.W(W)) u_mul (.a(diff), .b(p_inv[jl]), .q(q[jl]), .mu(mu[jl]), .r(dn[x][l]));
    end
  end

  // ---------------------------------------------------------------- memories
  always_ff @(posedge clk) begin
    if (in_en && fst == F_IDLE)
      for (int l = 0; l < PM; l++) cin[in_limb][int'(in_addr) * PM + l] <= in_data[l];
    if (fst == F_MAC && key_valid && int'(jf) != K)
      for (int l = 0; l < PM; l++) begin
        acc0[jf[$clog2(K)-1:0]][int'(fbeat) * PM + l] <= mac0[l];
        acc1[jf[$clog2(K)-1:0]][int'(fbeat) * PM + l] <= mac1[l];
      end
  end

  // ---------------------------------------------------------------- former-layer FSM
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fst    <= F_IDLE;
      it     <= '0;
      fbeat  <= '0;
      f_pend <= '0;
    end else begin
      unique case (fst)
        F_IDLE: if (start) begin
          fst    <= F_INTT0;
          it     <= '0;
          fbeat  <= '0;
          f_pend <= '1;
        end
        F_INTT0: begin
          f_pend <= f_pend & ~i0_done;
          if ((f_pend & ~i0_done) == '0) fst <= F_LOAD;
        end
        F_LOAD: begin
          fbeat <= fbeat + 1'b1;
          if (int'(fbeat) == BEATS - 1) begin
            fst <= F_KICK;
            for (int i = 0; i < K; i++) f_pend[i] <= (int'(jf) != i);
          end
        end
        F_KICK: fst <= F_NTT;
        F_NTT: begin
          f_pend <= f_pend & ~nf_done;
          if ((f_pend & ~nf_done) == '0) fst <= F_MAC;
        end
        F_MAC: if (key_valid) begin
          fbeat <= fbeat + 1'b1;
          if (int'(fbeat) == BEATS - 1) begin
            if (int'(it) == K) fst <= F_IDLE;
            else begin
              it  <= it + 1'b1;
              fst <= F_KICK;                     // next input already loaded (f_ovl)
              for (int i = 0; i < K; i++) f_pend[i] <= (int'(it) != i);
            end
          end
        end
        default: fst <= F_IDLE;
      endcase
    end
  end

  // accumulator-ready flags, shared by both layers
  always_ff @(posedge clk) begin
    if (!rst_n) acc_done <= '0;
    else if (fst == F_IDLE && start) acc_done <= '0;
    else if (fst == F_MAC && key_valid && int'(fbeat) == BEATS - 1) acc_done[jf] <= 1'b1;
  end

  // ---------------------------------------------------------------- modulus-down FSM
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lst       <= L_IDLE;
      jl        <= '0;
      lbeat     <= '0;
      l_pend    <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      out_limb  <= '0;
      out_addr  <= '0;
      out0      <= '0;
      out1      <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      if (fst == F_IDLE && start) busy <= 1'b1;
      unique case (lst)
        L_IDLE: if (busy && acc_done[K]) begin
          lst <= L_KICK1;
          jl  <= '0;
        end
        L_KICK1: begin
          lst    <= L_INTT;
          l_pend <= 2'b11;
        end
        L_INTT: begin
          l_pend <= l_pend & ~i1_done;
          if ((l_pend & ~i1_done) == '0) begin
            lst   <= L_LOAD;
            lbeat <= '0;
          end
        end
        L_LOAD: begin
          lbeat <= lbeat + 1'b1;
          if (int'(lbeat) == BEATS - 1) lst <= L_KICK2;
        end
        L_KICK2: begin
          lst    <= L_NTT;
          l_pend <= 2'b11;
        end
        L_NTT: begin
          l_pend <= l_pend & ~nl_done;
          if ((l_pend & ~nl_done) == '0) lst <= L_WAIT;
        end
        L_WAIT: if (acc_done[jl]) begin
          lst   <= L_OUT;
          lbeat <= '0;
        end
        L_OUT: begin
          out_valid <= 1'b1;
          out_limb  <= jl[$clog2(K)-1:0];
          out_addr  <= lbeat;
          out0      <= dn[0];
          out1      <= dn[1];
          lbeat     <= lbeat + 1'b1;
          if (int'(lbeat) == BEATS - 1) begin
            if (int'(jl) == K - 1) begin
              lst  <= L_IDLE;
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              jl  <= jl + 1'b1;
              lst <= L_KICK2;                    // next limb already loaded (l_ovl)
            end
          end
        end
        default: lst <= L_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    ev.bypass      = (fst == F_KICK) && (int'(jf) != K);  // limb i = j skips its NTT
    ev.key_stall   = (fst == F_MAC) && !key_valid;
    ev.acc_wait    = (lst == L_WAIT) && !acc_done[jl];
    ev.intt1_early = (lst == L_KICK1) && (fst != F_IDLE);
  end

  a_no_load_while_busy : assert property (@(posedge clk) disable iff (!rst_n) in_en |-> !busy);
  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
