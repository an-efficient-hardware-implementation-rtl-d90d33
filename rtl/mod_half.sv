// mod_half: one branch of the parallel halving stage (PSM) of the binary
// modular inverter.
//
// If w is even, w is halved and its companion t is divided by two modulo p:
// t/2 when t is even, (t+p)/2 when t is odd (p is odd, so t+p is then even).
// If w is odd, both pass unchanged. The u/x branch is the flow chart's states
// S3..S7, the v/y branch states S8..S12; here the branch is one layer of
// combinational logic, with no clock.
//
// Ports: w, t, p are W bits wide (W = n+2 for an n-bit modulus, the bound
// the algorithm keeps on every intermediate value). t must not exceed p so
// that t+p fits in W bits. halved reports that w was even; t_odd that the
// (t+p)/2 branch was taken.
module mod_half #(
  parameter int unsigned W = 258
) (
  input  logic [W-1:0] w,
  input  logic [W-1:0] t,
  input  logic [W-1:0] p,
  output logic [W-1:0] w_o,
  output logic [W-1:0] t_o,
  output logic         halved,
  output logic         t_odd
);

  logic [W-1:0] t_plus_p;

  always_comb begin
    t_plus_p = t + p;
    halved   = ~w[0];
    t_odd    = halved & t[0];
    w_o      = w;
    t_o      = t;
    if (halved) begin
      w_o = w >> 1;
      t_o = t[0] ? (t_plus_p >> 1) : (t >> 1);
    end
  end

endmodule
