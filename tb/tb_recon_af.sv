// tb_recon_af -- checks the activation back end: for cosh/sinh pairs from a
// real-valued z, f must equal the reference quotient (sinh/cosh for tanh,
// e/(1+e) for sigmoid), exp_z must equal cosh + sinh for sigmoid, and the
// adders must be isolated (exp_z = 0, sleep raised) for tanh. The result is
// also compared with the real tanh/sigmoid within 2 LSB.
module tb_recon_af;
  import recon_pkg::*;
  import recon_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [8:0] ch, sh, e, f;
  af_sel_t    af;
  logic       pg;
  recon_af dut (.cosh_z(ch), .sinh_z(sh), .select_af(af), .exp_z(e), .f, .pg_sleep(pg));

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic near(real got, real exp, real tol, string what);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real z, c, s;
    int ci, si;
    for (int t = 0; t < 400; t++) begin
      z  = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;   // |z| <= 1
      c  = ($exp(z) + $exp(-z)) / 2.0;
      s  = ($exp(z) - $exp(-z)) / 2.0;
      ci = $rtoi(c * 32.0 + 0.5);
      si = (s >= 0.0) ? $rtoi(s * 32.0 + 0.5) : -$rtoi(-s * 32.0 + 0.5);
      ch = 9'(ci); sh = 9'(si);
      af = AF_TANH; #1;
      chk(sx(f, 9), act(ci, si, 1'b1, 9, 5), "tanh quotient");
      chk(int'(pg), 1, "adders asleep for tanh");
      chk(int'(e), 0, "isolated adder output");
      near(real'(sx(f, 9)) / 32.0, (s / c), 2.0 / 32.0, "tanh value");
      af = AF_SIGMOID; #1;
      chk(sx(f, 9), act(ci, si, 1'b0, 9, 5), "sigmoid quotient");
      chk(sx(e, 9), wrap(ci + si, 9), "e^z");
      chk(int'(pg), 0, "adders awake for sigmoid");
      near(real'(sx(f, 9)) / 32.0, 1.0 / (1.0 + $exp(-z)), 2.0 / 32.0, "sigmoid value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
