// barrett_reduce: x mod q for a double-width operand, by Barrett's method.
//
// The quotient estimate is qhat = (x * mu) >> 2W with mu = floor(2^(2W) / q), a constant the
// host computes once per modulus. For any x < 2^(2W) the estimate is at most one below the true
// quotient, so a single conditional subtraction of q gives the remainder in [0, q).
// The modulus must use its full width (2^(W-1) < q < 2^W), which makes mu fit in W+1 bits.
// Combinational; a caller registers the result where its pipeline needs it. The document names
// this unit as a basic operation; the method and the constant format are this design's choice.
module barrett_reduce #(
  parameter int unsigned W = 33
) (
  input  logic [2*W-1:0] x,
  input  logic [W-1:0]   q,
  input  logic [W:0]     mu,
  output logic [W-1:0]   r
);
  logic [3*W:0]   prod;
  logic [W:0]     qhat;
  logic [2*W+1:0] qq;
  logic [W+1:0]   rem;

  always_comb begin
    prod = (3*W+1)'(x) * (3*W+1)'(mu);
    qhat = prod[3*W -: (W+1)] ;
    qq   = (2*W+2)'(qhat) * (2*W+2)'(q);
    rem  = (W+2)'((2*W+2)'(x) - qq);
    if (rem >= (W+2)'(q)) r = W'(rem - (W+2)'(q));
    else                  r = W'(rem);
  end
endmodule
