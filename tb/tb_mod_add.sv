// tb_mod_add: self-checking test of the modular adder.
// Random odd moduli and operands in [0, p-1] are checked against (a+b) % p
// worked out with 64-bit integers; the edge a = p, b = 0 (the only
// out-of-range input the final reduction sees) must give 0. A second
// instance at the full 258-bit width checks the same edge and a wrap case.
module tb_mod_add;
  localparam int unsigned W  = 18;
  localparam int unsigned WF = 258;

  logic [W-1:0]  a, b, p, s;
  logic          reduced;
  logic [WF-1:0] fa, fb, fp, fs;
  logic          freduced;
  int checks = 0, failures = 0;

  mod_add #(.W(W))  dut  (.a, .b, .p, .s, .reduced);
  mod_add #(.W(WF)) dutf (.a(fa), .b(fb), .p(fp), .s(fs), .reduced(freduced));

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
    longint unsigned la, lb, lp;
    for (int i = 0; i < 2000; i++) begin
      lp = longint'($urandom_range(65535, 3)) | 1;
      la = longint'($urandom) % lp;
      lb = (i % 4 == 0) ? 0 : longint'($urandom) % lp;
      if (i % 50 == 1) begin la = lp; lb = 0; end
      a = W'(la); b = W'(lb); p = W'(lp);
      #1;
      check(longint'(s) == (la + lb) % lp,
            $sformatf("a=%0d b=%0d p=%0d s=%0d", la, lb, lp, s));
    end
    fp = WF'(inv_pkg::P256);
    fa = fp; fb = '0;
    #1 check(fs == '0 && freduced, "full width: p + 0 mod p");
    fa = fp - 1; fb = WF'(5);
    #1 check(fs == WF'(4) && freduced, "full width: (p-1) + 5 mod p");
    fa = WF'(123); fb = WF'(456);
    #1 check(fs == WF'(579) && !freduced, "full width: no wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
