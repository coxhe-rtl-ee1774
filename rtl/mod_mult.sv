// mod_mult: modular multiplication r = a * b mod q.
//
// The full 2W-bit product is formed and reduced by a barrett_reduce instance. Operands must be
// reduced (a, b < q). Combinational, one result per instance; the streaming units place P of
// these side by side to reach the parallelism the latency model N / Pintra assumes. The document
// names ModMult as a basic operation; the structure here is this design's choice.
module mod_mult #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] q,
  input  logic [W:0]   mu,
  output logic [W-1:0] r
);
  logic [2*W-1:0] prod;

  always_comb prod = (2*W)'(a) * (2*W)'(b);

  barrett_reduce #(.W(W)) u_red (.x(prod), .q(q), .mu(mu), .r(r));
endmodule
