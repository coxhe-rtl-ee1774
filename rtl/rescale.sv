// rescale: CKKS Rescale, dropping the last RNS modulus of a two-part ciphertext.
//
// For a ciphertext (c0, c1) of L limbs in bit-reversed NTT order it computes, for x = 0, 1 and
// every remaining modulus j < L-1:
//   out_x[j] = (c_x[j] - NTT_j(INTT_{L-1}(c_x[L-1]) mod q_j)) * q_{L-1}^-1 mod q_j
// which divides the encrypted value by q_{L-1} and keeps its scale from growing after a
// multiplication. The datapath is the INTT -> Barrett reduce -> NTT chain of the latency model
// L_INTT + L_BarrettReduce + L_NTT, doubled so both ciphertext parts run side by side: two intt
// units transform the last limbs once, then for each j two ntt units load the reduced
// coefficients (N/P_MULT cycles), transform them and the output pass subtracts and scales.
// Only the first limb has a separate load pass; each output pass loads the next limb.
// The mathematical steps are the standard RNS rescale the document refers to; the unit layout,
// the absence of a rounding correction and the I/O timing are this design's choices.
// Interface: constants through cfg_* (he_const_bank, M = L moduli; CFG_INV holds
// q_{L-1}^-1 mod q_j). Load all limbs of both parts with in_en while idle (part, limb, beat),
// pulse start; results leave as out_valid beats (limb j, beat address, both parts) with no
// back-pressure, and done pulses with the last one.
// The sub-units' busy outputs are left unread (the FSM tracks their done pulses), and the limb
// counter j indexes the L-1 stored limbs with its full MW bits; it never exceeds L-2 there.
module rescale
  import he_pkg::*;
#(
  parameter int unsigned N      = 8192,
  parameter int unsigned W      = 33,
  parameter int unsigned L      = 3,
  parameter int unsigned P_NTT  = 16,
  parameter int unsigned P_MULT = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cfg_we,
  input  cfg_kind_e                     cfg_kind,
  input  logic [$clog2(L)-1:0]          cfg_mod,
  input  logic [$clog2(N)-1:0]          cfg_addr,
  input  logic [W:0]                    cfg_data,
  input  logic                          in_en,
  input  logic                          in_part,
  input  logic [$clog2(L)-1:0]          in_limb,
  input  logic [$clog2(N/P_MULT)-1:0]   in_addr,
  input  logic [P_MULT-1:0][W-1:0]      in_data,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic                          out_valid,
  output logic [$clog2(L)-1:0]          out_limb,
  output logic [$clog2(N/P_MULT)-1:0]   out_addr,
  output logic [P_MULT-1:0][W-1:0]      out0,
  output logic [P_MULT-1:0][W-1:0]      out1
);
  localparam int unsigned MW    = $clog2(L);
  localparam int unsigned LOGN  = $clog2(N);
  localparam int unsigned BEATS = N / P_MULT;
  localparam int unsigned AW    = $clog2(BEATS);
  localparam int unsigned PM    = P_MULT;

  logic [L-1:0][W-1:0]              q, n_inv, ql_inv;
  logic [L-1:0][W:0]                mu;
  logic [3:0][MW-1:0]               tw_mod;
  logic [3:0]                       tw_inverse;
  logic [3:0][P_NTT-1:0][LOGN-1:0]  tw_addr;
  logic [3:0][P_NTT-1:0][W-1:0]     tw_data;

  he_const_bank #(.N(N), .W(W), .M(L), .P(P_NTT), .R(4)) u_bank (
    .clk, .cfg_we, .cfg_kind, .cfg_mod, .cfg_addr, .cfg_data,
    .q, .mu, .n_inv, .inv(ql_inv),
    .rd_mod(tw_mod), .rd_inverse(tw_inverse), .rd_addr(tw_addr), .rd_data(tw_data)
  );

  logic [W-1:0] cin [2][L-1][N];   // limbs 0..L-2 of both parts

  typedef enum logic [2:0] {S_IDLE, S_INTT, S_LOAD, S_KICK, S_NTT, S_OUT} state_e;
  state_e         st;
  logic [MW-1:0]  j;
  logic [AW-1:0]  beat;
  logic [1:0]     pend;

  localparam logic [MW-1:0] LAST = MW'(L - 1);

  // While the output pass reads beat b of limb j from the ntt units, beat b of limb j+1 is
  // loaded into the same address (the read sees the old word); jn is the limb being loaded.
  logic          ovl;
  logic [MW-1:0] jn;
  assign ovl = (st == S_OUT) && (j != LAST - 1'b1);
  assign jn  = (st == S_OUT) ? j + 1'b1 : j;

  logic [1:0]                 it_start, it_done, it_busy, it_ld, nt_start, nt_done, nt_busy, nt_ld;
  logic [1:0][PM-1:0][W-1:0]  it_rd, red, nt_rd, dn;

  for (genvar x = 0; x < 2; x++) begin : g_part
    assign it_ld[x]    = in_en && (st == S_IDLE) && (int'(in_part) == x) && (in_limb == LAST);
    assign it_start[x] = (st == S_IDLE) && start;
    intt #(.N(N), .W(W), .P(P_NTT), .IOP(PM)) u_intt (
      .clk, .rst_n, .q(q[LAST]), .mu(mu[LAST]), .n_inv(n_inv[LAST]),
      .start(it_start[x]), .busy(it_busy[x]), .done(it_done[x]),
      .ld_en(it_ld[x]), .ld_addr(in_addr), .ld_data(in_data),
      .rd_addr(beat), .rd_data(it_rd[x]),
      .tw_addr(tw_addr[x]), .tw_data(tw_data[x])
    );
    assign tw_mod[x]     = LAST;
    assign tw_inverse[x] = 1'b1;

    for (genvar l = 0; l < PM; l++) begin : g_red
      barrett_reduce #(.W(W)) u_red (.x((2*W)'(it_rd[x][l])), .q(q[jn]), .mu(mu[jn]), .r(red[x][l]));
    end

    assign nt_ld[x]    = (st == S_LOAD) || ovl;
    assign nt_start[x] = (st == S_KICK);
    ntt #(.N(N), .W(W), .P(P_NTT), .IOP(PM)) u_ntt (
      .clk, .rst_n, .q(q[j]), .mu(mu[j]),
      .start(nt_start[x]), .busy(nt_busy[x]), .done(nt_done[x]),
      .ld_en(nt_ld[x]), .ld_addr(beat), .ld_data(red[x]),
      .rd_addr(beat), .rd_data(nt_rd[x]),
      .tw_addr(tw_addr[2+x]), .tw_data(tw_data[2+x])
    );
    assign tw_mod[2+x]     = j;
    assign tw_inverse[2+x] = 1'b0;

    for (genvar l = 0; l < PM; l++) begin : g_down
      logic [W-1:0] diff;
      mod_add  #(.W(W)) u_sub (.a(cin[x][j][int'(beat) * PM + l]), .b(nt_rd[x][l]), .q(q[j]),
                               .sub(1'b1), .r(diff));
      mod_mult #(.W(W)) u_mul (.a(diff), .b(ql_inv[j]), .q(q[j]), .mu(mu[j]), .r(dn[x][l]));
    end
  end

  always_ff @(posedge clk) begin
    if (in_en && st == S_IDLE && in_limb != LAST)
      for (int l = 0; l < PM; l++) cin[in_part][in_limb][int'(in_addr) * PM + l] <= in_data[l];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      j         <= '0;
      beat      <= '0;
      pend      <= '0;
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
      unique case (st)
        S_IDLE: if (start) begin
          st   <= S_INTT;
          busy <= 1'b1;
          pend <= 2'b11;
          j    <= '0;
        end
        S_INTT: begin
          pend <= pend & ~it_done;
          if ((pend & ~it_done) == '0) begin
            st   <= S_LOAD;
            beat <= '0;
          end
        end
        S_LOAD: begin
          beat <= beat + 1'b1;
          if (int'(beat) == BEATS - 1) st <= S_KICK;
        end
        S_KICK: begin
          st   <= S_NTT;
          pend <= 2'b11;
        end
        S_NTT: begin
          pend <= pend & ~nt_done;
          if ((pend & ~nt_done) == '0) begin
            st   <= S_OUT;
            beat <= '0;
          end
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_limb  <= j;
          out_addr  <= beat;
          out0      <= dn[0];
          out1      <= dn[1];
          beat      <= beat + 1'b1;
          if (int'(beat) == BEATS - 1) begin
            if (j == LAST - 1'b1) begin
              st   <= S_IDLE;
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              j  <= j + 1'b1;
              st <= S_KICK;                      // next limb already loaded (ovl)
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_no_load_while_busy : assert property (@(posedge clk) disable iff (!rst_n) in_en |-> !busy);
endmodule
