// tb_psm: self-checking test of the parallel halving stage.
// Random odd p, x, y in [0, p] and u, v that are not both even. Each of
// u and v must be halved exactly when even, with its companion divided by
// two modulo p; the other pair must pass unchanged. Reference: 64-bit
// integer arithmetic.
module tb_psm;
  localparam int unsigned W = 18;

  logic [W-1:0] u, v, x, y, p, u_o, v_o, x_o, y_o;
  logic         u_halved, x_odd, v_halved, y_odd;
  int checks = 0, failures = 0;

  psm #(.W(W)) dut (.u, .v, .x, .y, .p, .u_o, .v_o, .x_o, .y_o,
                    .u_halved, .x_odd, .v_halved, .y_odd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check_pair(input longint unsigned lw, lt, lp,
                            input logic [W-1:0] wo, to, input logic h,
                            input string nm);
    if (lw % 2 == 0)
      check(h && longint'(wo) == lw / 2 && longint'(to) <= lp &&
            (2 * longint'(to)) % lp == lt % lp,
            $sformatf("%s halving w=%0d t=%0d p=%0d -> %0d %0d", nm, lw, lt, lp, wo, to));
    else
      check(!h && longint'(wo) == lw && longint'(to) == lt,
            $sformatf("%s pass-through w=%0d", nm, lw));
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
      ly = longint'($urandom) % (lp + 1);
      lu = longint'($urandom_range(65535, 1));
      lv = longint'($urandom_range(65535, 1));
      if (lu % 2 == 0 && lv % 2 == 0) begin
        if (i % 2 == 0) lu = lu | 1; else lv = lv | 1;
      end
      u = W'(lu); v = W'(lv); x = W'(lx); y = W'(ly); p = W'(lp);
      #1;
      check_pair(lu, lx, lp, u_o, x_o, u_halved, "u/x");
      check_pair(lv, ly, lp, v_o, y_o, v_halved, "v/y");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
