// inv_datapath: registers and arithmetic of the binary modular inverter.
//
// Four W = N+2 bit registers u, v, x, y carry the state of the binary
// inversion algorithm, with the invariants a*x = u and a*y = v (mod p).
// On load they take u = a, v = p, x = 1, y = 0, and p is captured with them.
// On iter, one pass of the loop body is applied in one clock: the psm stage
// halves u (with x) and v (with y) where they are even, and the uv_sub stage
// then subtracts the smaller of the halved u, v from the larger, updating
// x or y modulo p. On store_r the result register takes x mod p (sel_y low)
// or y mod p (sel_y high) through mod_add with its second operand tied to
// zero. x and y stay in [0, p] throughout, so that single reduction is
// enough.
//
// Ports: a and p are N bits and are sampled on the clock edge that ends load;
// p must be odd and a in [1, p-1] with gcd(a, p) = 1. u_is_one / v_is_one
// report the registered u and v to the controller. The remaining outputs
// tell which operations the current loop pass performs (for observation).
// Reset (synchronous, active high) clears all registers.
module inv_datapath #(
  parameter int unsigned N = 256
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         iter,
  input  logic         store_r,
  input  logic         sel_y,
  input  logic [N-1:0] a,
  input  logic [N-1:0] p,
  output logic [N-1:0] r,
  output logic         u_is_one,
  output logic         v_is_one,
  output logic         u_halved,
  output logic         x_odd,
  output logic         v_halved,
  output logic         y_odd,
  output logic         u_ge_v,
  output logic         wrap
);

  localparam int unsigned W = N + 2;

  logic [W-1:0] u_q, v_q, x_q, y_q, p_q;
  logic [W-1:0] u_h, v_h, x_h, y_h;      // after the parallel halving stage
  logic [W-1:0] u_s, v_s, x_s, y_s;      // after the compare-and-subtract stage
  logic [W-1:0] red_in, red_out;
  logic         red_wrapped;
  logic [N-1:0] r_q;

  psm #(.W(W)) u_psm (
    .u(u_q), .v(v_q), .x(x_q), .y(y_q), .p(p_q),
    .u_o(u_h), .v_o(v_h), .x_o(x_h), .y_o(y_h),
    .u_halved(u_halved), .x_odd(x_odd), .v_halved(v_halved), .y_odd(y_odd)
  );

  uv_sub #(.W(W)) u_sub (
    .u(u_h), .v(v_h), .x(x_h), .y(y_h), .p(p_q),
    .u_o(u_s), .v_o(v_s), .x_o(x_s), .y_o(y_s),
    .u_ge_v(u_ge_v), .wrap(wrap)
  );

  assign red_in = sel_y ? y_q : x_q;

  mod_add #(.W(W)) u_reduce (
    .a(red_in), .b('0), .p(p_q), .s(red_out), .reduced(red_wrapped)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      u_q <= '0;
      v_q <= '0;
      x_q <= '0;
      y_q <= '0;
      p_q <= '0;
      r_q <= '0;
    end else if (load) begin
      u_q <= W'(a);
      v_q <= W'(p);
      x_q <= W'(1);
      y_q <= '0;
      p_q <= W'(p);
    end else if (iter) begin
      u_q <= u_s;
      v_q <= v_s;
      x_q <= x_s;
      y_q <= y_s;
    end else if (store_r) begin
      r_q <= red_out[N-1:0];
    end
  end

  assign r        = r_q;
  assign u_is_one = (u_q == W'(1));
  assign v_is_one = (v_q == W'(1));

  // The algorithm keeps x and y within [0, p] and u, v non-zero.
  a_xy_bound: assert property (@(posedge clk) disable iff (rst)
    iter |-> (x_q <= p_q) && (y_q <= p_q));
  a_uv_nonzero: assert property (@(posedge clk) disable iff (rst)
    iter |-> (u_q != '0) && (v_q != '0));

endmodule
