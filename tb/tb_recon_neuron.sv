// tb_recon_neuron -- end-to-end checks of one neuron.
//  1. The worked example (x = 0.6875, bias = 0.1875, w = 0.90625, tanh):
//     the X/Y/Z registers must show the MAC iterations at count 1..5
//     (Y = 28,17,22,24,25 /32), the MAC result 25/32 = 0.78125 must enter
//     the AF run, count must reach 10, and valid must rise 11 cycles after
//     the start edge with f = tanh result of the reference model, close to
//     tanh(0.78125).
//  2. Random single-input neurons with tanh and sigmoid against the
//     reference model, with the latency checked every time.
//  3. A three-input neuron (running sum kept in Y) against the reference
//     model; latency 5 * 3 + 5 + 1 cycles.
// Also counts how often each power-gating sleep control was raised.
module tb_recon_neuron;
  import recon_pkg::*;
  import recon_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic [8:0] x1 [1], w1 [1], b1, f1, mac1, xn1, yn1, zn1;
  logic [8:0] x3 [3], w3 [3], b3, f3, mac3, xn3, yn3, zn3;
  af_sel_t    af;
  logic busy1, valid1, sel_1, ctr1, pgc1, pga1;
  logic busy3, valid3, sel_3, ctr3, pgc3, pga3;
  logic [3:0] cnt1;
  logic [4:0] cnt3;
  logic start3 = 0;
  int   pgc_cycles = 0, pga_cycles = 0;

  recon_neuron dut1 (.clk, .rst_n, .start, .x(x1), .w(w1), .bias(b1), .select_af(af),
    .busy(busy1), .valid(valid1), .f_out(f1), .mac_out(mac1), .count(cnt1), .select(sel_1),
    .ctr(ctr1), .xn(xn1), .yn(yn1), .zn(zn1), .pg_sleep_cordic(pgc1), .pg_sleep_af(pga1));
  recon_neuron #(.N_IN(3)) dut3 (.clk, .rst_n, .start(start3), .x(x3), .w(w3), .bias(b3),
    .select_af(af), .busy(busy3), .valid(valid3), .f_out(f3), .mac_out(mac3), .count(cnt3),
    .select(sel_3), .ctr(ctr3), .xn(xn3), .yn(yn3), .zn(zn3), .pg_sleep_cordic(pgc3),
    .pg_sleep_af(pga3));

  always @(posedge clk) begin
    if (busy1 && pgc1) pgc_cycles++;
    if (busy1 && pga1) pga_cycles++;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Start dut1 and return the number of cycles from the start edge to valid.
  task automatic run1(output int lat);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    lat = 0;
    while (!valid1 && lat < 100) begin @(posedge clk); #1; lat++; end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ty[5] = '{28, 17, 22, 24, 25};
    int lat, mac, exp_f;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. worked example, tanh
    x1[0] = 9'd22; b1 = 9'd6; w1[0] = 9'd29; af = AF_TANH;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    chk(int'(cnt1), 0, "count after load");
    chk(sx(yn1, 9), 6, "bias loaded");
    for (int c = 1; c <= 5; c++) begin
      @(posedge clk); #1;
      chk(int'(cnt1), c, "count in MAC");
      chk(sx(yn1, 9), ty[c-1], $sformatf("Y at count %0d", c));
      chk(sx(xn1, 9), 22, "X kept in MAC");
    end
    chk(int'(ctr1), 1, "ctr raised at count 5");
    repeat (5) begin @(posedge clk); #1; end
    chk(int'(cnt1), 10, "count 10 at end of AF");
    chk(sx(mac1, 9), 25, "MAC result 0.78125");
    @(posedge clk); #1;
    chk(int'(valid1), 1, "valid 11 cycles after start edge");
    exp_f = neuron('{22}, '{29}, 6, 1'b1, 9, 5, 5, mac);
    chk(sx(f1, 9), exp_f, "tanh of worked example");
    checks++;
    if (sx(f1, 9) < 18 || sx(f1, 9) > 23) begin
      failures++; $display("FAIL tanh(0.78125) = %0d/32", sx(f1, 9));
    end
    @(posedge clk); #1;
    chk(int'(valid1), 0, "valid is a pulse");
    chk(int'(cnt1), 0, "count reset");

    // 2. random single-input neurons
    for (int t = 0; t < 200; t++) begin
      int xi, wi, bi;
      xi = $urandom_range(0, 63) - 32;   // |x| <= 1
      wi = $urandom_range(0, 63) - 32;   // |w| <= 1
      bi = $urandom_range(0, 31) - 16;   // |b| <= 0.5
      x1[0] = 9'(xi); w1[0] = 9'(wi); b1 = 9'(bi);
      af = (t % 2) ? AF_TANH : AF_SIGMOID;
      run1(lat);
      chk(lat, 11, "latency");
      exp_f = neuron('{xi}, '{wi}, bi, af == AF_TANH, 9, 5, 5, mac);
      chk(sx(mac1, 9), mac, "MAC");
      chk(sx(f1, 9), exp_f, $sformatf("f (af=%0d)", af));
    end

    // 3. three-input neuron
    for (int t = 0; t < 60; t++) begin
      int xs[3], ws[3], bi;
      for (int k = 0; k < 3; k++) begin
        xs[k] = $urandom_range(0, 31) - 16;
        ws[k] = $urandom_range(0, 31) - 16;
        x3[k] = 9'(xs[k]); w3[k] = 9'(ws[k]);
      end
      bi = $urandom_range(0, 15) - 8;
      b3 = 9'(bi);
      af = (t % 2) ? AF_SIGMOID : AF_TANH;
      start3 = 1;
      @(posedge clk); #1;
      start3 = 0;
      lat = 0;
      while (!valid3 && lat < 100) begin @(posedge clk); #1; lat++; end
      chk(lat, 21, "latency with 3 inputs");
      exp_f = neuron(xs, ws, bi, af == AF_TANH, 9, 5, 5, mac);
      chk(sx(mac3, 9), mac, "3-input MAC");
      chk(sx(f3, 9), exp_f, "3-input f");
    end

    checks++;
    if (pgc_cycles == 0 || pga_cycles == 0) begin
      failures++; $display("FAIL sleep controls never raised (%0d, %0d)", pgc_cycles, pga_cycles);
    end
    $display("sleep cycles: cordic %0d, af adders %0d", pgc_cycles, pga_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
