// tb_fp_inv: end-to-end test of the modular inverter at its default size
// (N = 256, no parameter override).
//
// Moduli: the NIST P-256 and P-224 primes (the latter zero-extended to 256
// bits), secp256k1's prime, 2^255 - 19 and the small example p = 17
// (13^-1 mod 17 = 4). For each operation the result is checked
// independently of the design: r < p and a * r mod p == 1, computed with
// 512-bit multiplication and remainder. The latency from the clock that
// samples go to done must not exceed 2n + 1 clocks, n being the bit length
// of the modulus, and the average per modulus must not exceed 1.33n + 10.
// Operations are issued both after idle gaps (go held low) and back to back
// (go raised in the clock of done). Each path of the loop body - u or v
// halved with an even or odd companion, subtraction with and without adding
// p, u >= v and u < v - and both exits (u == 1, v == 1) are counted, and a
// path that never occurs counts as a failure.
module tb_fp_inv
  import inv_pkg::*;
;
  localparam int unsigned N = N_DEFAULT;

  localparam logic [N-1:0] P224 = N'(224'hffffffff_ffffffff_ffffffff_ffffffff_00000000_00000000_00000001);
  localparam logic [N-1:0] K256 =
    256'hffffffff_ffffffff_ffffffff_ffffffff_ffffffff_ffffffff_fffffffe_fffffc2f;
  localparam logic [N-1:0] P25519 =
    256'h7fffffff_ffffffff_ffffffff_ffffffff_ffffffff_ffffffff_ffffffff_ffffffed;

  logic         clk = 1'b0, rst = 1'b1, go = 1'b0;
  logic [N-1:0] a = '0, p = '0, r;
  logic         done, sig_inv, busy;
  inv_state_t   state;
  inv_step_t    step;
  int checks = 0, failures = 0;

  // how often each mechanism happened
  int n_u_x_even = 0, n_u_x_odd = 0, n_v_y_even = 0, n_v_y_odd = 0;
  int n_sub_x = 0, n_sub_x_wrap = 0, n_sub_y = 0, n_sub_y_wrap = 0;
  int n_exit_u = 0, n_exit_v = 0, n_idle = 0, n_b2b = 0, n_sig_inv = 0;
  longint total_cycles = 0;
  int n_ops = 0, max_cycles = 0;
  longint mod_cycles [4] = '{default: 0};
  int     mod_max    [4] = '{default: 0};
  int     mod_ops    [4] = '{default: 0};

  fp_inv dut (.clk, .rst, .go, .a, .p, .r, .done, .sig_inv, .busy, .state, .step);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the loop body and the exits through the status outputs.
  always @(posedge clk) if (!rst) begin
    if (step.valid) begin
      if (step.u_halved) begin if (step.x_odd) n_u_x_odd++; else n_u_x_even++; end
      if (step.v_halved) begin if (step.y_odd) n_v_y_odd++; else n_v_y_even++; end
      if (step.u_ge_v) begin if (step.wrap) n_sub_x_wrap++; else n_sub_x++; end
      else begin if (step.wrap) n_sub_y_wrap++; else n_sub_y++; end
    end
    if (state == S21) n_exit_u++;
    if (state == S22) n_exit_v++;
    if (state == S0 && !go) n_idle++;
    if (sig_inv) n_sig_inv++;
  end

  function automatic logic [N-1:0] rand_below(input logic [N-1:0] m);
    logic [N-1:0] v;
    for (int i = 0; i < N / 32; i++) v[i*32 +: 32] = $urandom;
    v = v % m;
    return (v == '0) ? N'(1) : v;
  endfunction

  // Issue one inversion; when b2b is set, go is raised in the done clock.
  task automatic invert(input logic [N-1:0] la, input logic [N-1:0] lp, input bit b2b,
                        input int nbits = N, input int m = -1);
    logic [2*N-1:0] prod;
    int cyc = 0;
    if (!b2b) begin
      @(negedge clk);
      @(negedge clk);
    end else begin
      n_b2b++;
    end
    check(!busy, "idle when go is raised");
    a = la; p = lp; go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 4 * N) break;
    end
    check(done, "operation completes");
    check(cyc <= 2 * nbits + 1, $sformatf("latency %0d above 2n+1 for n=%0d", cyc, nbits));
    if (m >= 0) begin
      mod_cycles[m] += cyc;
      mod_ops[m]++;
      if (cyc > mod_max[m]) mod_max[m] = cyc;
    end
    total_cycles += cyc;
    n_ops++;
    if (cyc > max_cycles) max_cycles = cyc;
    prod = (2 * N)'(la) * (2 * N)'(r);
    check(r < lp && (prod % (2 * N)'(lp)) == (2 * N)'(1),
          $sformatf("inverse of %h mod %h gave %h", la, lp, r));
  endtask

  initial begin
    logic [N-1:0] mods [4];
    int           bits [4];
    string        names [4];
    mods[0] = N'(P256); mods[1] = P224; mods[2] = K256; mods[3] = P25519;
    bits  = '{256, 224, 256, 255};
    names = '{"P-256", "P-224", "secp256k1", "2^255-19"};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);

    invert(N'(13), N'(17), 1'b0, 5);
    check(r == N'(4), "13^-1 mod 17 = 4");
    invert(N'(1), N'(P256), 1'b1);
    check(r == N'(1), "1^-1 = 1");
    invert(N'(P256) - 1, N'(P256), 1'b1);
    check(r == N'(P256) - 1, "(p-1)^-1 = p-1");
    invert(N'(2), N'(P256), 1'b0);
    check(r == (N'(P256) >> 1) + 1, "2^-1 = (p+1)/2");
    for (int m = 0; m < 4; m++) begin
      for (int i = 0; i < 60; i++)
        invert(rand_below(mods[m]), mods[m], i % 3 == 0, bits[m], m);
    end
    for (int m = 0; m < 4; m++)
      $display("%-10s n=%0d: average latency %0d clocks, max %0d, 2n+1 = %0d, 1.33n+10 = %0d",
               names[m], bits[m], int'(mod_cycles[m] / mod_ops[m]), mod_max[m],
               2 * bits[m] + 1, (133 * bits[m]) / 100 + 10);
    for (int m = 0; m < 4; m++)
      check(mod_cycles[m] * 100 <= longint'(mod_ops[m]) * (133 * bits[m] + 1000),
            $sformatf("%s: average latency above 1.33n+10", names[m]));

    $display("ops=%0d average latency=%0d.%02d clocks, max=%0d (2N+1=%0d)", n_ops,
             int'(total_cycles / n_ops), int'((total_cycles * 100 / n_ops) % 100),
             max_cycles, 2 * N + 1);
    $display("u halved x even=%0d x odd=%0d | v halved y even=%0d y odd=%0d",
             n_u_x_even, n_u_x_odd, n_v_y_even, n_v_y_odd);
    $display("x-=y %0d x+=p-y %0d | y-=x %0d y+=p-x %0d | exit u=%0d v=%0d | idle=%0d b2b=%0d sig_inv=%0d",
             n_sub_x, n_sub_x_wrap, n_sub_y, n_sub_y_wrap, n_exit_u, n_exit_v,
             n_idle, n_b2b, n_sig_inv);
    check(n_u_x_even > 0 && n_u_x_odd > 0 && n_v_y_even > 0 && n_v_y_odd > 0,
          "every halving path exercised");
    check(n_sub_x > 0 && n_sub_x_wrap > 0 && n_sub_y > 0 && n_sub_y_wrap > 0,
          "every subtraction path exercised");
    check(n_exit_u > 0 && n_exit_v > 0, "both loop exits exercised");
    check(n_idle > 0 && n_b2b > 0 && n_sig_inv > 0, "idle, back-to-back and sig_inv seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
