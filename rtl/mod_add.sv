// mod_add: modular adder, s = (a + b) mod p.
//
// The sum a + b is formed one bit wider than the operands, and p is
// subtracted once if the sum is p or more. This gives the right result
// whenever a + b < 2p, e.g. for a, b in [0, p-1], or for a in [0, p] and
// b = 0. The inverter uses it with b tied to zero as the final reduction
// R = x mod p, which only has to map x = p to 0. Combinational, no clock.
//
// Ports: a, b, p and s are W bits; p must be non-zero.
module mod_add #(
  parameter int unsigned W = 258
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] p,
  output logic [W-1:0] s,
  output logic         reduced
);

  logic [W:0] sum;
  logic [W-1:0] diff;

  always_comb begin
    sum     = {1'b0, a} + {1'b0, b};
    diff    = W'(sum - {1'b0, p});
    reduced = (sum >= {1'b0, p});
    s       = reduced ? diff[W-1:0] : sum[W-1:0];
  end

endmodule
