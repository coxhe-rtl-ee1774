// he_const_bank: per-modulus constants and twiddle tables for M RNS moduli.
//
// Holds, for every modulus m < M: q_m, the Barrett constant mu_m, N^-1 mod q_m, one
// unit-specific inverse (p^-1 mod q_m for KeySwitch, q_last^-1 mod q_m for Rescale), and two
// N-word twiddle tables (forward psi^bitrev(a), inverse psi^-bitrev(a)). The host writes them
// once through the configuration port (one word per cycle, kind/modulus/address select the
// target). R transform units read the tables through R independent groups of P combinational
// ports, each group naming its modulus and table. Written as register arrays; an FPGA build
// would map the tables to BRAM, one copy per group of readers. This bank is this design's own
// organisation of the constants the transforms need; the document does not describe one.
module he_const_bank
  import he_pkg::*;
#(
  parameter int unsigned N = 8192,
  parameter int unsigned W = 33,
  parameter int unsigned M = 4,
  parameter int unsigned P = 16,
  parameter int unsigned R = 1
) (
  input  logic                            clk,
  input  logic                            cfg_we,
  input  cfg_kind_e                       cfg_kind,
  input  logic [$clog2(M)-1:0]            cfg_mod,
  input  logic [$clog2(N)-1:0]            cfg_addr,
  input  logic [W:0]                      cfg_data,
  output logic [M-1:0][W-1:0]             q,
  output logic [M-1:0][W:0]               mu,
  output logic [M-1:0][W-1:0]             n_inv,
  output logic [M-1:0][W-1:0]             inv,
  input  logic [R-1:0][$clog2(M)-1:0]     rd_mod,
  input  logic [R-1:0]                    rd_inverse,
  input  logic [R-1:0][P-1:0][$clog2(N)-1:0] rd_addr,
  output logic [R-1:0][P-1:0][W-1:0]      rd_data
);
  logic [W-1:0] twf [M][N];
  logic [W-1:0] twi [M][N];

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      unique case (cfg_kind)
        CFG_Q:    q[cfg_mod]     <= W'(cfg_data);
        CFG_MU:   mu[cfg_mod]    <= cfg_data;
        CFG_NINV: n_inv[cfg_mod] <= W'(cfg_data);
        CFG_INV:  inv[cfg_mod]   <= W'(cfg_data);
        CFG_TWF:  twf[cfg_mod][cfg_addr] <= W'(cfg_data);
        CFG_TWI:  twi[cfg_mod][cfg_addr] <= W'(cfg_data);
        default: ;
      endcase
    end
  end

  always_comb begin
    for (int r = 0; r < R; r++)
      for (int l = 0; l < P; l++)
        rd_data[r][l] = rd_inverse[r] ? twi[rd_mod[r]][rd_addr[r][l]]
                                      : twf[rd_mod[r]][rd_addr[r][l]];
  end
endmodule
