// tb_recon_cordic -- drives the CORDIC datapath directly.
//  1. The worked MAC example: x = 0.6875, bias = 0.1875, w = 0.90625 in Q3.5;
//     Y and Z after each linear step must be 28,17,22,24,25 and
//     -3,13,5,1,-1 (/32), X must stay 22.
//  2. The MAC result is taken into Z through Ctr and five hyperbolic steps
//     run; X/Y must follow the reference model and approximate cosh/sinh.
//  3. Random operands in both modes against the reference model, checking
//     the direction output and the sleep control too.
module tb_recon_cordic;
  import recon_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic en, step, select, sel1, sel2, sel3, ctr, di, pg_sleep;
  logic [2:0] idx;
  logic [8:0] x0, y0, z0, xn, yn, zn;

  recon_cordic dut (.*);

  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic drive(bit e, bit st, bit s, bit s1, bit s2, bit s3, bit c, int i);
    en = e; step = st; select = s; sel1 = s1; sel2 = s2; sel3 = s3; ctr = c; idx = i[2:0];
    @(posedge clk); #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ty[5] = '{28, 17, 22, 24, 25};
    int tz[5] = '{-3, 13, 5, 1, -1};
    int rx, ry, rz, rxn, ryn, e;
    real ch, sh;
    en = 0; step = 0; select = 0; sel1 = 0; sel2 = 0; sel3 = 0; ctr = 0; idx = 0;
    x0 = 0; y0 = 0; z0 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. worked MAC example
    x0 = 9'd22; y0 = 9'd6; z0 = 9'd29;
    drive(1, 0, 1, 1, 1, 1, 0, 0);
    chk(sx(yn, 9), 6, "load Y"); chk(sx(zn, 9), 29, "load Z");
    for (int i = 0; i < 5; i++) begin
      chk(int'(pg_sleep), 1, "sleep in linear mode");
      drive(1, 1, 1, 0, 0, 0, 0, i);
      chk(sx(xn, 9), 22, $sformatf("X after linear i=%0d", i));
      chk(sx(yn, 9), ty[i], $sformatf("Y after linear i=%0d", i));
      chk(sx(zn, 9), tz[i], $sformatf("Z after linear i=%0d", i));
      chk(int'(di), tz[i] >= 0, $sformatf("d after linear i=%0d", i));
    end

    // 2. AF run on the MAC result (Z <- Y through Ctr, X <- 1/K, Y <- 0)
    x0 = 9'(inv_k(5)); y0 = 0; z0 = 9'h155;   // z0 must be ignored (Ctr = 1)
    rx = inv_k(5); ry = 0; rz = 25;
    for (int i = 1; i <= 5; i++) begin
      drive(1, 1, 0, i == 1, i == 1, i == 1, i == 1, i);
      if (rz >= 0) begin rxn = rx + fdiv_pow2(ry, i); ryn = ry + fdiv_pow2(rx, i); rz -= atanh_fx(i, 5); end
      else         begin rxn = rx - fdiv_pow2(ry, i); ryn = ry - fdiv_pow2(rx, i); rz += atanh_fx(i, 5); end
      rx = rxn; ry = ryn;
      chk(sx(xn, 9), rx, $sformatf("X after hyperbolic i=%0d", i));
      chk(sx(yn, 9), ry, $sformatf("Y after hyperbolic i=%0d", i));
      chk(sx(zn, 9), rz, $sformatf("Z after hyperbolic i=%0d", i));
      chk(int'(pg_sleep), 0, "awake in hyperbolic mode");
    end
    // Near cosh(0.78125) = 1.3205, sinh(0.78125) = 0.8627 (within 3 LSB).
    ch = real'(sx(xn, 9)) / 32.0; sh = real'(sx(yn, 9)) / 32.0;
    checks++; if (ch < 1.2205 || ch > 1.4205) begin failures++; $display("FAIL cosh %f", ch); end
    checks++; if (sh < 0.7627 || sh > 0.9627) begin failures++; $display("FAIL sinh %f", sh); end

    // en = 0 holds the registers
    drive(0, 1, 0, 0, 0, 0, 0, 2);
    chk(sx(xn, 9), rx, "hold X"); chk(sx(yn, 9), ry, "hold Y");

    // 3. random runs in both modes
    for (int t = 0; t < 300; t++) begin
      int xi, bi, wi, ym;
      xi = $urandom_range(0, 127) - 64;       // |x| < 2
      bi = $urandom_range(0, 127) - 64;
      wi = $urandom_range(0, 119) - 60;       // |w| < 1.9
      x0 = 9'(xi); y0 = 9'(bi); z0 = 9'(wi);
      drive(1, 0, 1, 1, 1, 1, 0, 0);
      for (int i = 0; i < 5; i++) drive(1, 1, 1, 0, 0, 0, 0, i);
      ym = mac_step(xi, bi, wi, 9, 5, 5);
      chk(sx(yn, 9), ym, $sformatf("MAC %0d*%0d+%0d", xi, wi, bi));
      chk(sx(xn, 9), xi, "MAC keeps X");
      // Error bound while in range: residual angle (at most 2^-4) times |x|
      // plus one truncated LSB per step.
      if (ym > -200 && ym < 200) begin
        real exact, tol, err;
        exact = real'(bi) + real'(xi) * real'(wi) / 32.0;
        tol   = real'(xi < 0 ? -xi : xi) / 16.0 + 5.0;
        err   = real'(ym) - exact;
        checks++;
        if (err > tol || -err > tol) begin
          failures++; $display("FAIL MAC accuracy %0d vs %f", ym, exact);
        end
      end
      x0 = 9'(inv_k(5)); y0 = 0;
      for (int i = 1; i <= 5; i++) drive(1, 1, 0, i == 1, i == 1, i == 1, i == 1, i);
      begin
        int c, s;
        hyp(ym, 9, 5, 5, c, s);
        chk(sx(xn, 9), c, "cosh");
        chk(sx(yn, 9), s, "sinh");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
