// ntt: in-place negacyclic number-theoretic transform of one RNS limb (N coefficients mod q).
//
// The limb sits in an on-chip buffer of N words. A transform runs log2(N) stages of N/2
// Cooley-Tukey butterflies, P butterflies per cycle, so it takes exactly log2(N) * N / (2P)
// cycles from start to done, the NTT latency the performance model uses. Each cycle reads 2P
// words, runs them through P butterflies (U + V*w, U - V*w mod q) and writes them back, so a
// stage sees the results of the one before without any stall.
// Ordering: coefficients are loaded in natural order; the result is in bit-reversed order, i.e.
// word k holds a(psi^(2*bitrev(k)+1)), where psi is a primitive 2N-th root of unity mod q.
// Stage s, group g uses twiddle word 2^s + g of a table holding psi^bitrev(a) mod q at address a;
// the table lives outside the unit (tw_addr / tw_data, read combinationally).
// Interface: ld_en writes IOP words at ld_addr*IOP; rd_addr reads IOP words combinationally;
// start begins a transform (busy high during it, done pulses one cycle after the last write).
// Loads are not allowed while busy. q and mu (Barrett constant) must be stable while busy.
// The document gives the unit's function and its latency formula; the butterfly order, the
// storage as a register array with 2P ports (instead of banked BRAM) and the ports are this
// design's choice.
module ntt #(
  parameter int unsigned N   = 8192,
  parameter int unsigned W   = 33,
  parameter int unsigned P   = 16,
  parameter int unsigned IOP = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [W-1:0]               q,
  input  logic [W:0]                 mu,
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
  logic [P-1:0][W-1:0]    u, v, vw, o0, o1;

  always_comb begin
    for (int l = 0; l < P; l++) begin
      int unsigned b, t, g, j;
      b = int'(beat) * P + l;
      t = N >> (int'(stage) + 1);
      g = b >> (LOGN - 1 - int'(stage));
      j = b & (t - 1);
      idx0[l]    = LOGN'((g << (LOGN - int'(stage))) | j);
      idx1[l]    = LOGN'((g << (LOGN - int'(stage))) | j | t);
      tw_addr[l] = LOGN'((1 << int'(stage)) | g);
      u[l] = mem[idx0[l]];
      v[l] = mem[idx1[l]];
    end
  end

  for (genvar l = 0; l < P; l++) begin : g_bfly
    mod_mult #(.W(W)) u_mul (.a(v[l]), .b(tw_data[l]), .q(q), .mu(mu), .r(vw[l]));
    mod_add  #(.W(W)) u_add (.a(u[l]), .b(vw[l]), .q(q), .sub(1'b0), .r(o0[l]));
    mod_add  #(.W(W)) u_sub (.a(u[l]), .b(vw[l]), .q(q), .sub(1'b1), .r(o1[l]));
  end

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
