// tb_uv_sub: self-checking test of the compare-and-subtract stage.
// Random odd p, x, y in [0, p], u, v >= 1. The larger-or-equal of u, v
// (u when equal) must lose the other; its companion must become
// x - y (resp. y - x) modulo p, kept in [0, p]. Reference: 64-bit integers.
module tb_uv_sub;
  localparam int unsigned W = 18;

  logic [W-1:0] u, v, x, y, p, u_o, v_o, x_o, y_o;
  logic         u_ge_v, wrap;
  int checks = 0, failures = 0;
  int n_wrap = 0;

  uv_sub #(.W(W)) dut (.u, .v, .x, .y, .p, .u_o, .v_o, .x_o, .y_o, .u_ge_v, .wrap);

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
    longint unsigned lu, lv, lx, ly, lp;
    for (int i = 0; i < 2000; i++) begin
      lp = longint'($urandom_range(65535, 3)) | 1;
      lx = longint'($urandom) % (lp + 1);
      ly = (i % 10 == 0) ? lx : longint'($urandom) % (lp + 1);
      lu = longint'($urandom_range(65535, 1));
      lv = (i % 17 == 0) ? lu : longint'($urandom_range(65535, 1));
      u = W'(lu); v = W'(lv); x = W'(lx); y = W'(ly); p = W'(lp);
      #1;
      if (wrap) n_wrap++;
      if (lu >= lv) begin
        check(u_ge_v && longint'(u_o) == lu - lv && longint'(v_o) == lv &&
              longint'(y_o) == ly, $sformatf("u>=v: u=%0d v=%0d", lu, lv));
        check(longint'(x_o) <= lp && (longint'(x_o) + ly) % lp == lx % lp,
              $sformatf("x update x=%0d y=%0d p=%0d -> %0d", lx, ly, lp, x_o));
        check(wrap == (lx <= ly), "wrap flag (u>=v)");
      end else begin
        check(!u_ge_v && longint'(v_o) == lv - lu && longint'(u_o) == lu &&
              longint'(x_o) == lx, $sformatf("u<v: u=%0d v=%0d", lu, lv));
        check(longint'(y_o) <= lp && (longint'(y_o) + lx) % lp == ly % lp,
              $sformatf("y update y=%0d x=%0d p=%0d -> %0d", ly, lx, lp, y_o));
        check(wrap == (ly <= lx), "wrap flag (u<v)");
      end
    end
    check(n_wrap > 100, "wrap case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
