// tb_inv_datapath: self-checking test of the inverter datapath at N = 16.
// The testbench sequences load / iter / store_r itself. After every clock it
// checks the algorithm's invariants a*x = u and a*y = v (mod p) on the
// datapath registers and the bounds x, y <= p; at the end it checks
// a * r = 1 (mod p) with 64-bit integer arithmetic. Moduli are random
// 16-bit primes (found by trial division) plus the small example 13^-1 mod 17.
module tb_inv_datapath;
  localparam int unsigned N = 16;

  logic         clk = 1'b0, rst = 1'b1;
  logic         load = 1'b0, iter = 1'b0, store_r = 1'b0, sel_y = 1'b0;
  logic [N-1:0] a = '0, p = '0, r;
  logic         u_is_one, v_is_one, u_halved, x_odd, v_halved, y_odd, u_ge_v, wrap;
  int checks = 0, failures = 0;
  int max_iter = 0;

  inv_datapath #(.N(N)) dut (.clk, .rst, .load, .iter, .store_r, .sel_y, .a, .p, .r,
                             .u_is_one, .v_is_one, .u_halved, .x_odd, .v_halved,
                             .y_odd, .u_ge_v, .wrap);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit is_prime(input longint unsigned n);
    if (n < 2) return 0;
    for (longint unsigned d = 2; d * d <= n; d++)
      if (n % d == 0) return 0;
    return 1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic invert(input longint unsigned la, input longint unsigned lp);
    int k = 0;
    @(negedge clk);
    a = N'(la); p = N'(lp); load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    while (!(u_is_one || v_is_one)) begin
      iter = 1'b1;
      @(negedge clk);
      k++;
      check((la * longint'(dut.x_q)) % lp == longint'(dut.u_q) % lp &&
            (la * longint'(dut.y_q)) % lp == longint'(dut.v_q) % lp &&
            longint'(dut.x_q) <= lp && longint'(dut.y_q) <= lp,
            $sformatf("invariant a=%0d p=%0d step %0d", la, lp, k));
      if (k > 2 * N) begin
        check(0, "loop does not end");
        break;
      end
    end
    iter = 1'b0;
    if (k > max_iter) max_iter = k;
    sel_y = !u_is_one;
    store_r = 1'b1;
    @(negedge clk);
    store_r = 1'b0;
    check((la * longint'(r)) % lp == 1, $sformatf("%0d^-1 mod %0d gave %0d", la, lp, r));
  endtask

  initial begin
    longint unsigned lp;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    invert(13, 17);
    check(r == N'(4), "13^-1 mod 17 = 4");
    invert(1, 17);
    invert(16, 17);
    for (int i = 0; i < 300; i++) begin
      do lp = longint'($urandom_range(65535, 32769)) | 1; while (!is_prime(lp));
      invert(longint'($urandom_range(int'(lp) - 1, 1)), lp);
    end
    $display("longest loop: %0d passes", max_iter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
