// fp_inv: modular inverter R = a^-1 mod p over an N-bit prime field
// (N = 256 by default), built as a controller (inv_ctrl) driving a datapath
// (inv_datapath) that runs the binary inversion algorithm.
//
// Operation: with the unit idle (busy low), raise go for a clock with a and
// p valid, and hold a and p until busy has risen (they are sampled on the
// edge that ends the load state, one clock after go is seen). The unit
// repeats one pass of the algorithm's loop body per clock until u or v
// reaches 1, then reduces x or y modulo p into r. done pulses for one clock
// when r is valid; r then holds until the next result. sig_inv is high
// while the final reduction is under way. state (the controller state) and
// step (what the current loop pass does: which of u, v is halved, whether
// p is added, which way the subtraction goes) are status outputs for
// observation and debugging; they are not needed to use the unit.
//
// Timing: from the clock that samples go to the done pulse takes k + 4
// clocks, k being the number of loop passes. For random 256-bit operands
// modulo P-256 this averaged 319 clocks (max 359 seen), against the bound
// of 2N+1 = 513 clocks and the average of 1.33N+10 = 350 clocks that this
// architecture is meant to meet; the end-to-end testbench checks both.
// The whole loop body is one clock here, where the flow chart it comes from
// draws one state per operation; that folding is what gives this latency.
// Requirements: p odd (a prime in practice) and gcd(a, p) = 1, a in [1, p-1].
// Reset is synchronous and active high.
module fp_inv
  import inv_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         go,
  input  logic [N-1:0] a,
  input  logic [N-1:0] p,
  output logic [N-1:0] r,
  output logic         done,
  output logic         sig_inv,
  output logic         busy,
  output inv_state_t   state,
  output inv_step_t    step
);

  logic       load, iter, store_r, sel_y;
  logic       u_is_one, v_is_one;

  inv_ctrl u_ctrl (
    .clk, .rst, .go, .u_is_one, .v_is_one,
    .load, .iter, .store_r, .sel_y, .sig_inv, .done, .busy, .state
  );

  inv_datapath #(.N(N)) u_dp (
    .clk, .rst, .load, .iter, .store_r, .sel_y, .a, .p, .r,
    .u_is_one, .v_is_one, .u_halved(step.u_halved), .x_odd(step.x_odd),
    .v_halved(step.v_halved), .y_odd(step.y_odd), .u_ge_v(step.u_ge_v), .wrap(step.wrap)
  );

  assign step.valid = iter;

endmodule
