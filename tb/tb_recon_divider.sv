// tb_recon_divider -- random and corner-case checks of the fixed-point
// divider against integer division of the scaled magnitudes, truncated
// toward zero and saturated to +-255/32, for Q3.5 and for Q3.12.
module tb_recon_divider;
  import recon_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [8:0]  n9, d9, q9;
  logic [15:0] n16, d16, q16;
  recon_divider #(.WIDTH(9),  .FRAC(5))  dut9  (.num(n9),  .den(d9),  .q(q9));
  recon_divider #(.WIDTH(16), .FRAC(12)) dut16 (.num(n16), .den(d16), .q(q16));

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    // tanh-like (|n| < d) and sigmoid-like cases, and the corners
    for (int t = 0; t < 3000; t++) begin
      a = $urandom_range(0, 511) - 256;
      b = $urandom_range(0, 511) - 256;
      if (t < 4) begin a = (t == 0) ? 100 : (t == 1) ? -256 : (t == 2) ? 5 : 0; b = (t == 2) ? 0 : 32; end
      n9 = 9'(a); d9 = 9'(b);
      #1;
      chk(sx(q9, 9), sdiv(a, b, 9, 5), $sformatf("%0d/%0d", a, b));
    end
    chk(sx(q9, 9), sx(q9, 9), "");
    n9 = 9'd26; d9 = 9'd41; #1; chk(sx(q9, 9), 20, "26/41 (tanh example)");
    for (int t = 0; t < 2000; t++) begin
      a = $urandom_range(0, 65535) - 32768;
      b = $urandom_range(1, 32767);
      n16 = 16'(a); d16 = 16'(b);
      #1;
      begin
        longint q;
        q = (longint'(a < 0 ? -a : a) << 12) / longint'(b);
        if (q > 32767) q = 32767;
        chk(sx(q16, 16), a < 0 ? -int'(q) : int'(q), $sformatf("Q3.12 %0d/%0d", a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
