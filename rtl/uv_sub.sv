// uv_sub: the compare-and-subtract stage of the binary modular inverter.
//
// If u >= v: u = u - v and x = x - y when x > y, otherwise x = x + p - y.
// Else:      v = v - u and y = y - x when y > x, otherwise y = y + p - x.
// These are the flow chart's states S13..S19, built here as one layer of
// combinational logic. With x, y in [0, p] the new x or y stays in [0, p]
// (it equals p only when x == y).
//
// Ports: all operands W = n+2 bits. u_ge_v reports the branch taken, wrap
// that p had to be added to keep x or y non-negative.
module uv_sub #(
  parameter int unsigned W = 258
) (
  input  logic [W-1:0] u,
  input  logic [W-1:0] v,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] p,
  output logic [W-1:0] u_o,
  output logic [W-1:0] v_o,
  output logic [W-1:0] x_o,
  output logic [W-1:0] y_o,
  output logic         u_ge_v,
  output logic         wrap
);

  always_comb begin
    u_ge_v = (u >= v);
    u_o    = u;
    v_o    = v;
    x_o    = x;
    y_o    = y;
    if (u_ge_v) begin
      u_o  = u - v;
      wrap = !(x > y);
      x_o  = wrap ? (x + p - y) : (x - y);
    end else begin
      v_o  = v - u;
      wrap = !(y > x);
      y_o  = wrap ? (y + p - x) : (y - x);
    end
  end

endmodule
