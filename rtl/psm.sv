// psm: the parallel halving stage ("parallel state machine") of the binary
// modular inverter.
//
// Two mod_half branches work side by side: one halves u and updates x, the
// other halves v and updates y, each only when its u or v is even. Each
// branch drives its own result signals (u_o/x_o and v_o/y_o), so the two
// never write the same variable; this is the separation of the two branches
// that the inverter's architecture calls for. Combinational, no clock.
//
// Ports: u, v, x, y, p are W = n+2 bits; x, y must not exceed p. The flags
// tell which branch halved and which took the (t+p)/2 path.
module psm #(
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
  output logic         u_halved,
  output logic         x_odd,
  output logic         v_halved,
  output logic         y_odd
);

  mod_half #(.W(W)) u_branch (
    .w(u), .t(x), .p(p), .w_o(u_o), .t_o(x_o), .halved(u_halved), .t_odd(x_odd)
  );

  mod_half #(.W(W)) v_branch (
    .w(v), .t(y), .p(p), .w_o(v_o), .t_o(y_o), .halved(v_halved), .t_odd(y_odd)
  );

endmodule
