// inv_pkg: types and constants shared by the binary modular inverter.
//
// The controller states keep the names of the flow chart they come from
// (S0, S1, S2, S20, S21, S22). In that flow chart the states S3..S19 form the
// body of the main loop; here they are not separate clock cycles but the
// combinational PSM and subtraction stages that S2 applies once per clock
// (see inv_ctrl and inv_datapath). N_DEFAULT is the 256-bit field size the
// design targets; P256 is the NIST P-256 prime, a convenient odd modulus of
// that size. inv_step_t reports what one loop pass did.
package inv_pkg;

  parameter int unsigned N_DEFAULT = 256;

  parameter logic [255:0] P256 =
    256'hffffffff_00000001_00000000_00000000_00000000_ffffffff_ffffffff_ffffffff;

  typedef enum logic [2:0] {
    S0  = 3'd0,  // idle, waiting for go
    S1  = 3'd1,  // load u = a, v = p, x = 1, y = 0; sig_inv = 0
    S2  = 3'd2,  // loop test, and one pass of the loop body per clock
    S20 = 3'd3,  // loop left; sig_inv = 1
    S21 = 3'd4,  // R = x mod p; sig_inv = 0
    S22 = 3'd5   // R = y mod p; sig_inv = 0
  } inv_state_t;

  // What one loop pass did, for observation: u (v) was even and halved,
  // with x (y) odd so that p was added before halving; the subtraction
  // took u >= v, and p was added to keep x or y non-negative.
  typedef struct packed {
    logic valid;     // a loop pass happens in this clock
    logic u_halved;
    logic x_odd;
    logic v_halved;
    logic y_odd;
    logic u_ge_v;
    logic wrap;
  } inv_step_t;

endpackage
