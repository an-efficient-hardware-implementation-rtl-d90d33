// tb_inv_ctrl: self-checking test of the inverter controller.
// The u == 1 / v == 1 flags are driven by the testbench. Checked: idle while
// go is low; go -> load for exactly one clock; iter while neither flag is
// set; exit through S20 to S21 (u == 1) or S22 (v == 1, sel_y high);
// sig_inv high only in the clock(s) after S20 until the reduction ends;
// done a one-clock pulse after the store; back-to-back operations.
module tb_inv_ctrl
  import inv_pkg::*;
;
  logic       clk = 1'b0, rst = 1'b1, go = 1'b0, u_is_one = 1'b0, v_is_one = 1'b0;
  logic       load, iter, store_r, sel_y, sig_inv, done, busy;
  inv_state_t state;
  int checks = 0, failures = 0;

  inv_ctrl dut (.clk, .rst, .go, .u_is_one, .v_is_one, .load, .iter, .store_r,
                .sel_y, .sig_inv, .done, .busy, .state);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (state=%s)", what, state.name());
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One operation: k loop clocks, then exit with the given flags.
  task automatic run_op(input int k, input bit uf, input bit vf);
    @(negedge clk);
    go = 1'b1;
    check(state == S0 && !busy && !load && !iter, "idle before go");
    @(negedge clk);
    go = 1'b0;
    check(state == S1 && load && !iter && busy && !store_r, "load state");
    @(negedge clk);
    for (int i = 0; i < k; i++) begin
      check(state == S2 && iter && !load && !store_r && !sig_inv, "iterating");
      @(negedge clk);
    end
    u_is_one = uf;
    v_is_one = vf;
    #1;
    check(state == S2 && !iter, "loop test sees exit");
    @(negedge clk);
    check(state == S20 && !iter && !store_r && !sig_inv, "S20");
    @(negedge clk);
    check(state == (uf ? S21 : S22) && store_r && (sel_y == !uf) && sig_inv && !done,
          "reduction state");
    @(negedge clk);
    u_is_one = 1'b0;
    v_is_one = 1'b0;
    check(state == S0 && done && !sig_inv && !busy, "done pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    repeat (4) begin
      @(negedge clk);
      check(state == S0 && !done && !sig_inv, "stays idle without go");
    end
    run_op(7, 1'b1, 1'b0);
    @(negedge clk);
    check(!done && state == S0, "done lasts one clock");
    run_op(3, 1'b0, 1'b1);
    run_op(0, 1'b1, 1'b1);   // back to back, loop left at once
    run_op(20, 1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
