// intt: in-place inverse negacyclic NTT of one RNS limb, including the scaling by N^-1.
//
// Counterpart of ntt: it takes a limb in bit-reversed NTT order and returns the coefficients in
// natural order. It runs log2(N) stages of N/2 Gentleman-Sande butterflies (U + V, (U - V) * w),
// P per cycle, stage s using twiddle word (N >> (s+1)) + g of a table holding psi^-bitrev(a) mod q.
// The last stage also multiplies both outputs by N^-1 mod q, so the scaling costs no extra pass
// and the transform takes exactly log2(N) * N / (2P) cycles, the same as the forward NTT.
// Interface and timing are those of ntt, plus the constant n_inv = N^-1 mod q.
// The document gives the unit's function and its latency formula; the butterfly order, the
// folded scaling, the register-array buffer and the ports are this design's choice.
module intt #(
  parameter int unsigned N   = 8192,
  parameter int unsigned W   = 33,
  parameter int unsigned P   = 16,
  parameter int unsigned IOP = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [W-1:0]               q,
  input  logic [W:0]                 mu,
  input  logic [W-1:0]               n_inv,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  input  logic                       ld_en,
  input  logic [$clog2(N/IOP)-1:0]   ld_addr,
  input  logic [IOP-1:0][W-1:0]      ld_data,
  input  logic [$clog2(N/IOP)-1:0]   rd_addr,
  output logic [IOP-1:0][W-1:0]      rd_data,
  output logic [P-1:0][$clog2(N)-1:0] tw_addr,
  input  logic [P-1:0][W-1:0]        tw_data
);
  localparam int unsigned LOGN  = $clog2(N);
  localparam int unsigned BEATS = N / (2 * P);
  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1;
  localparam int unsigned SW    = $clog2(LOGN);

  logic [W-1:0] mem [N];
  logic [SW-1:0] stage;
  logic [BW-1:0] beat;

  logic [P-1:0][LOGN-1:0] idx0, idx1;
  logic [P-1:0][W-1:0]    u, v, s0, d0, s1, o0, o1;
  logic                   last;

  always_comb begin
    for (int l = 0; l < P; l++) begin
      int unsigned b, t, g, j;
      b = int'(beat) * P + l;
      t = 1 << int'(stage);
      g = b >> int'(stage);
      j = b & (t - 1);
      idx0[l]    = LOGN'((g << (int'(stage) + 1)) | j);
      idx1[l]    = LOGN'((g << (int'(stage) + 1)) | j | t);
      tw_addr[l] = LOGN'((N >> (int'(stage) + 1)) | g);
      u[l] = mem[idx0[l]];
      v[l] = mem[idx1[l]];
    end
  end

  for (genvar l = 0; l < P; l++) begin : g_bfly
    mod_add  #(.W(W)) u_add  (.a(u[l]), .b(v[l]), .q(q), .sub(1'b0), .r(s0[l]));
    mod_add  #(.W(W)) u_sub  (.a(u[l]), .b(v[l]), .q(q), .sub(1'b1), .r(d0[l]));
    mod_mult #(.W(W)) u_mul  (.a(d0[l]), .b(tw_data[l]), .q(q), .mu(mu), .r(s1[l]));
    // last stage: fold in the N^-1 scaling
    logic [W-1:0] sc0, sc1;
    mod_mult #(.W(W)) u_sc0 (.a(s0[l]), .b(n_inv), .q(q), .mu(mu), .r(sc0));
    mod_mult #(.W(W)) u_sc1 (.a(s1[l]), .b(n_inv), .q(q), .mu(mu), .r(sc1));
    assign o0[l] = last ? sc0 : s0[l];
    assign o1[l] = last ? sc1 : s1[l];
  end

  assign last = (int'(stage) == LOGN - 1);

  always_comb begin
    for (int l = 0; l < IOP; l++) rd_data[l] = mem[int'(rd_addr) * IOP + l];
  end

  always_ff @(posedge clk) begin
    if (busy) begin
      for (int l = 0; l < P; l++) begin
        mem[idx0[l]] <= o0[l];
        mem[idx1[l]] <= o1[l];
      end
    end else if (ld_en) begin
      for (int l = 0; l < IOP; l++) mem[int'(ld_addr) * IOP + l] <= ld_data[l];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= '0;
      beat  <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (int'(beat) == BEATS - 1) begin
          beat <= '0;
          if (int'(stage) == LOGN - 1) begin
            stage <= '0;
            busy  <= 1'b0;
            done  <= 1'b1;
          end else begin
            stage <= stage + 1'b1;
          end
        end else begin
          beat <= beat + 1'b1;
        end
      end else if (start) begin
        busy <= 1'b1;
      end
    end
  end

  a_no_load_while_busy : assert property (@(posedge clk) disable iff (!rst_n) !(busy && ld_en));
endmodule
