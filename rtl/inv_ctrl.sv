// inv_ctrl: controller of the binary modular inverter.
//
// States and their work (names follow the inverter's flow chart):
//   S0   idle; leaves for S1 when go is high.
//   S1   load u = a, v = p, x = 1, y = 0 and clear sig_inv.
//   S2   if u == 1 or v == 1 go to S20; otherwise apply one pass of the loop
//        body (parallel halving, then compare-and-subtract) and stay in S2.
//   S20  set sig_inv; go to S21 if u == 1, else to S22 (v == 1).
//   S21  R = x mod p, clear sig_inv, back to S0.
//   S22  R = y mod p, clear sig_inv, back to S0.
// The flow chart draws the loop body as states S3..S19, one operation each.
// This controller folds them into S2, so one loop pass costs one clock; the
// flow chart's own note that synthesis shrinks its 23 states to about ten,
// and its latency of at most 2n+1 clocks, both call for such a folding.
//
// Outputs: load, iter, store_r and sel_y steer inv_datapath during the
// current clock (Moore outputs of the state, iter also depends on the
// u == 1 / v == 1 flags). sig_inv and done are registers written as the state
// is left, as in a high-level state machine: sig_inv is high while S21/S22
// reduces the result, done is a one-clock pulse in the clock after S21/S22,
// when R is valid. busy is high outside S0. Reset is synchronous, active high.
module inv_ctrl
  import inv_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       go,
  input  logic       u_is_one,
  input  logic       v_is_one,
  output logic       load,
  output logic       iter,
  output logic       store_r,
  output logic       sel_y,
  output logic       sig_inv,
  output logic       done,
  output logic       busy,
  output inv_state_t state
);

  inv_state_t state_q, state_d;
  logic       exit_loop;

  assign exit_loop = u_is_one | v_is_one;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S0:      if (go) state_d = S1;
      S1:      state_d = S2;
      S2:      if (exit_loop) state_d = S20;
      S20:     state_d = u_is_one ? S21 : S22;
      S21:     state_d = S0;
      S22:     state_d = S0;
      default: state_d = S0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S0;
      sig_inv <= 1'b0;
      done    <= 1'b0;
    end else begin
      state_q <= state_d;
      done    <= (state_q == S21) || (state_q == S22);
      unique case (state_q)
        S1:       sig_inv <= 1'b0;
        S20:      sig_inv <= 1'b1;
        S21, S22: sig_inv <= 1'b0;
        default:  ;
      endcase
    end
  end

  assign load    = (state_q == S1);
  assign iter    = (state_q == S2) && !exit_loop;
  assign store_r = (state_q == S21) || (state_q == S22);
  assign sel_y   = (state_q == S22);
  assign busy    = (state_q != S0);
  assign state   = state_q;

  // S20 is only reached with u == 1 or v == 1, which hold until S21/S22.
  a_exit_flag: assert property (@(posedge clk) disable iff (rst)
    (state_q == S20) |-> exit_loop);

endmodule
