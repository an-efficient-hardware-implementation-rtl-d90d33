// tb_fp_inv_n224: the modular inverter built for a 224-bit field (N = 224),
// inverting random elements modulo the NIST P-224 prime.
// Each result is checked independently: r < p and a * r mod p == 1 with
// 448-bit arithmetic. The latency from the clock that samples go to done
// must stay within 2n + 1 clocks, and its average within 1.33n + 10.
module tb_fp_inv_n224
  import inv_pkg::*;
;
  localparam int unsigned N = 224;
  localparam logic [N-1:0] P224 = 224'hffffffff_ffffffff_ffffffff_ffffffff_00000000_00000000_00000001;

  logic         clk = 1'b0, rst = 1'b1, go = 1'b0;
  logic [N-1:0] a = '0, r;
  logic         done, sig_inv, busy;
  inv_state_t   state;
  inv_step_t    step;
  int checks = 0, failures = 0;
  longint total = 0;
  int max_cyc = 0;
  localparam int OPS = 100;

  fp_inv #(.N(N)) dut (.clk, .rst, .go, .a, .p(P224), .r, .done, .sig_inv, .busy,
                       .state, .step);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0]   la;
    logic [2*N-1:0] prod;
    int cyc;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < OPS; i++) begin
      for (int w = 0; w < N / 32; w++) la[w*32 +: 32] = $urandom;
      la = la % P224;
      if (la == '0) la = N'(1);
      @(negedge clk);
      a = la; go = 1'b1;
      @(negedge clk);
      go = 1'b0;
      cyc = 1;
      while (!done && cyc <= 4 * N) begin
        @(negedge clk);
        cyc++;
      end
      check(done && cyc <= 2 * N + 1, $sformatf("latency %0d", cyc));
      total += cyc;
      if (cyc > max_cyc) max_cyc = cyc;
      prod = (2 * N)'(la) * (2 * N)'(r);
      check(r < P224 && prod % (2 * N)'(P224) == (2 * N)'(1),
            $sformatf("inverse of %h gave %h", la, r));
    end
    $display("P-224 at N=224: average latency %0d clocks, max %0d", int'(total / OPS), max_cyc);
    check(total * 100 <= longint'(OPS) * (133 * N + 1000), "average latency above 1.33n+10");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
