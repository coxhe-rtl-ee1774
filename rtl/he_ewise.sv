// he_ewise: element-wise ciphertext arithmetic on NTT-domain limbs, P coefficients per beat.
//
// One unit covers the four basic high-level operations of CKKS on one RNS limb:
//   P-C Add : (a0 + b0, a1)            b0 is the plaintext
//   P-C Mult: (a0 * b0, a1 * b0)
//   C-C Add : (a0 + b0, a1 + b1)
//   C-C Mult: (a0*b0, a0*b1 + a1*b0, a1*b1), a three-part result that Relinearize reduces to two
// All arithmetic is mod q on P lanes of mod_mult / mod_add; a limb of N coefficients streams
// through in N/P beats (the latency model N / Pintra). Results are registered: out_valid follows
// in_valid by one cycle, with no back-pressure. Unused result parts are driven to zero.
// The document names these operations and their place in the hierarchy; the single shared
// unit, the lane layout and the one-cycle timing are this design's choice.
module he_ewise
  import he_pkg::*;
#(
  parameter int unsigned W = 33,
  parameter int unsigned P = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ew_op_e               op,
  input  logic [W-1:0]         q,
  input  logic [W:0]           mu,
  input  logic                 in_valid,
  input  logic [P-1:0][W-1:0]  a0,
  input  logic [P-1:0][W-1:0]  a1,
  input  logic [P-1:0][W-1:0]  b0,
  input  logic [P-1:0][W-1:0]  b1,
  output logic                 out_valid,
  output logic [P-1:0][W-1:0]  d0,
  output logic [P-1:0][W-1:0]  d1,
  output logic [P-1:0][W-1:0]  d2
);
  logic [P-1:0][W-1:0] s0, s1, m00, m01, m10, m11, mx;

  for (genvar l = 0; l < P; l++) begin : g_lane
    mod_add  #(.W(W)) u_s0  (.a(a0[l]), .b(b0[l]), .q(q), .sub(1'b0), .r(s0[l]));
    mod_add  #(.W(W)) u_s1  (.a(a1[l]), .b(b1[l]), .q(q), .sub(1'b0), .r(s1[l]));
    mod_mult #(.W(W)) u_m00 (.a(a0[l]), .b(b0[l]), .q(q), .mu(mu), .r(m00[l]));
    mod_mult #(.W(W)) u_m01 (.a(a0[l]), .b(b1[l]), .q(q), .mu(mu), .r(m01[l]));
    mod_mult #(.W(W)) u_m10 (.a(a1[l]), .b(b0[l]), .q(q), .mu(mu), .r(m10[l]));
    mod_mult #(.W(W)) u_m11 (.a(a1[l]), .b(b1[l]), .q(q), .mu(mu), .r(m11[l]));
    mod_add  #(.W(W)) u_mx  (.a(m01[l]), .b(m10[l]), .q(q), .sub(1'b0), .r(mx[l]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      d0 <= '0;
      d1 <= '0;
      d2 <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        unique case (op)
          EW_PC_ADD:  begin d0 <= s0;  d1 <= a1;  d2 <= '0;  end
          EW_PC_MULT: begin d0 <= m00; d1 <= m10; d2 <= '0;  end
          EW_CC_ADD:  begin d0 <= s0;  d1 <= s1;  d2 <= '0;  end
          EW_CC_MULT: begin d0 <= m00; d1 <= mx;  d2 <= m11; end
          default:    begin d0 <= '0;  d1 <= '0;  d2 <= '0;  end
        endcase
      end
    end
  end
endmodule
