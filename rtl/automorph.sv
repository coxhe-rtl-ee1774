// automorph: slot rotation of one NTT-domain limb, the permutation part of Rotate.
//
// Rotating the slots of a CKKS ciphertext applies the Galois automorphism x -> x^g (g odd,
// g < 2N) to both polynomials. On a limb kept in bit-reversed NTT order this is a pure
// permutation: output word i = input word bitrev((g * (2*bitrev(i)+1) mod 2N - 1) / 2).
// The limb is written into an N-word buffer (ld_en, P words per beat), then read out in N/P
// beats after start; out_valid marks the P permuted words of beat out_addr. The buffer is not
// written while a read-out runs. The document names Rotate and states that it changes the order
// of the vector elements and invokes KeySwitch; the permutation formula, the buffer and the
// timing are this design's choice.
module automorph #(
  parameter int unsigned N = 8192,
  parameter int unsigned W = 33,
  parameter int unsigned P = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(N):0]        galois,
  input  logic                      ld_en,
  input  logic [$clog2(N/P)-1:0]    ld_addr,
  input  logic [P-1:0][W-1:0]       ld_data,
  input  logic                      start,
  output logic                      busy,
  output logic                      out_valid,
  output logic [$clog2(N/P)-1:0]    out_addr,
  output logic [P-1:0][W-1:0]       out_data
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned AW   = $clog2(N/P);

  logic [W-1:0] mem [N];
  logic [AW-1:0] beat;

  function automatic logic [LOGN-1:0] brev(logic [LOGN-1:0] x);
    for (int i = 0; i < LOGN; i++) brev[i] = x[LOGN-1-i];
  endfunction

  logic [P-1:0][LOGN-1:0] src;
  always_comb begin
    for (int l = 0; l < P; l++) begin
      logic [LOGN:0]   odd;
      logic [LOGN:0]   e;
      logic [LOGN-1:0] i;
      i      = LOGN'(int'(beat) * P + l);
      odd    = {brev(i), 1'b1};
      e      = odd * galois;      // mod 2N by truncation
      src[l] = brev(e[LOGN:1]);   // (e mod 2N - 1) / 2 for odd e
    end
  end

  always_ff @(posedge clk) begin
    if (ld_en && !busy)
      for (int l = 0; l < P; l++) mem[int'(ld_addr) * P + l] <= ld_data[l];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      beat      <= '0;
      out_valid <= 1'b0;
      out_addr  <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (busy) begin
        out_valid <= 1'b1;
        out_addr  <= beat;
        for (int l = 0; l < P; l++) out_data[l] <= mem[src[l]];
        beat <= beat + 1'b1;
        if (int'(beat) == N / P - 1) busy <= 1'b0;
      end else if (start) begin
        busy <= 1'b1;
        beat <= '0;
      end
    end
  end

  a_galois_odd : assert property (@(posedge clk) disable iff (!rst_n) start |-> galois[0]);
endmodule
