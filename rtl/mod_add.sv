// mod_add: modular addition or subtraction, r = a + b mod q or r = a - b mod q.
//
// Operands must be reduced (a, b < q). The sum is corrected by one conditional subtraction of q,
// the difference by one conditional addition of q. Combinational. The document names Modular Add
// as a basic operation; the subtract mode is this design's addition, needed by the butterflies,
// the KeySwitch modulus-down step and Rescale.
module mod_add #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] q,
  input  logic         sub,   // 1: a - b, 0: a + b
  output logic [W-1:0] r
);
  logic [W:0] s;

  always_comb begin
    if (sub) begin
      s = (W+1)'(a) - (W+1)'(b);
      r = (a >= b) ? W'(s) : W'(s + (W+1)'(q));
    end else begin
      s = (W+1)'(a) + (W+1)'(b);
      r = (s >= (W+1)'(q)) ? W'(s - (W+1)'(q)) : W'(s);
    end
  end
endmodule
