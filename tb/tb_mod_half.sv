// tb_mod_half: self-checking test of one halving branch.
// For random odd p, t in [0, p] and random w, an even w must come out
// halved with 2*t_o = t (mod p) and t_o in [0, p]; an odd w must leave both
// unchanged. The reference is modular arithmetic on 64-bit integers.
module tb_mod_half;
  localparam int unsigned W = 18;

  logic [W-1:0] w, t, p, w_o, t_o;
  logic         halved, t_odd;
  int checks = 0, failures = 0;
  int n_even = 0, n_odd_t = 0;

  mod_half #(.W(W)) dut (.w, .t, .p, .w_o, .t_o, .halved, .t_odd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned lw, lt, lp;
    for (int i = 0; i < 2000; i++) begin
      lp = longint'($urandom_range(65535, 3)) | 1;
      lt = longint'($urandom) % (lp + 1);
      lw = longint'($urandom_range(65535, 1));
      w = W'(lw); t = W'(lt); p = W'(lp);
      #1;
      if (lw % 2 == 0) begin
        n_even++;
        if (lt % 2 == 1) n_odd_t++;
        check(halved && longint'(w_o) == lw / 2, $sformatf("w=%0d w_o=%0d", lw, w_o));
        check(longint'(t_o) <= lp && (2 * longint'(t_o)) % lp == lt % lp,
              $sformatf("t=%0d p=%0d t_o=%0d", lt, lp, t_o));
        check(t_odd == (lt % 2 == 1), "t_odd flag");
      end else begin
        check(!halved && !t_odd && w_o == w && t_o == t,
              $sformatf("odd w=%0d changed", lw));
      end
    end
    check(n_even > 100 && n_odd_t > 50, "both halving cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
