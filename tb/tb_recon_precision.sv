// tb_recon_precision -- single sigmoid/tanh neurons at the three precisions
// of the precision comparison: 8, 12 and 16 magnitude bits plus sign, each
// with 3 integer bits (9/5, 13/9 and 17/13 word/fraction bits) and 5
// micro-rotations per mode. Each neuron is checked against the bit-level
// reference model, for the 11-cycle latency, and against the real-valued
// function; the mean absolute error of the wider words is reported and must
// not exceed that of the 9-bit word.
module tb_recon_precision;
  import recon_pkg::*;
  import recon_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  af_sel_t af;
  logic [8:0]  xa [1], wa [1], ba, fa;
  logic [12:0] xb [1], wb [1], bb, fb;
  logic [16:0] xc [1], wc [1], bc, fc;
  logic va, vb, vc;

  recon_neuron #(.WIDTH(9),  .FRAC(5))  n9  (.clk, .rst_n, .start, .x(xa), .w(wa), .bias(ba),
    .select_af(af), .busy(), .valid(va), .f_out(fa), .mac_out(), .count(), .select(), .ctr(),
    .xn(), .yn(), .zn(), .pg_sleep_cordic(), .pg_sleep_af());
  recon_neuron #(.WIDTH(13), .FRAC(9))  n13 (.clk, .rst_n, .start, .x(xb), .w(wb), .bias(bb),
    .select_af(af), .busy(), .valid(vb), .f_out(fb), .mac_out(), .count(), .select(), .ctr(),
    .xn(), .yn(), .zn(), .pg_sleep_cordic(), .pg_sleep_af());
  recon_neuron #(.WIDTH(17), .FRAC(13)) n17 (.clk, .rst_n, .start, .x(xc), .w(wc), .bias(bc),
    .select_af(af), .busy(), .valid(vc), .f_out(fc), .mac_out(), .count(), .select(), .ctr(),
    .xn(), .yn(), .zn(), .pg_sleep_cordic(), .pg_sleep_af());

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr, wr, br, zr, fr, err9 = 0.0, err13 = 0.0, err17 = 0.0;
    int  lat, mac, ix, iw, ib;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 150; t++) begin
      xr = (real'($urandom_range(0, 1000)) - 500.0) / 500.0;   // [-1, 1]
      wr = (real'($urandom_range(0, 1000)) - 500.0) / 600.0;
      br = (real'($urandom_range(0, 1000)) - 500.0) / 2500.0;
      af = (t % 2) ? AF_TANH : AF_SIGMOID;
      xa[0] = 9'($rtoi(xr * 32.0));    wa[0] = 9'($rtoi(wr * 32.0));    ba = 9'($rtoi(br * 32.0));
      xb[0] = 13'($rtoi(xr * 512.0));  wb[0] = 13'($rtoi(wr * 512.0));  bb = 13'($rtoi(br * 512.0));
      xc[0] = 17'($rtoi(xr * 8192.0)); wc[0] = 17'($rtoi(wr * 8192.0)); bc = 17'($rtoi(br * 8192.0));
      start = 1;
      @(posedge clk); #1;
      start = 0;
      lat = 0;
      while (!va && lat < 50) begin @(posedge clk); #1; lat++; end
      chk(lat, 11, "latency");
      chk(int'(vb & vc), 1, "all widths finish together");
      chk(sx(fa, 9),  neuron('{sx(xa[0], 9)},  '{sx(wa[0], 9)},  sx(ba, 9),  af == AF_TANH, 9, 5, 5, mac),  "9-bit");
      chk(sx(fb, 13), neuron('{sx(xb[0], 13)}, '{sx(wb[0], 13)}, sx(bb, 13), af == AF_TANH, 13, 9, 5, mac), "13-bit");
      chk(sx(fc, 17), neuron('{sx(xc[0], 17)}, '{sx(wc[0], 17)}, sx(bc, 17), af == AF_TANH, 17, 13, 5, mac), "17-bit");
      zr = xr * wr + br;
      fr = (af == AF_TANH) ? ($exp(zr) - $exp(-zr)) / ($exp(zr) + $exp(-zr)) : 1.0 / (1.0 + $exp(-zr));
      err9  += rabs(real'(sx(fa, 9)) / 32.0 - fr);
      err13 += rabs(real'(sx(fb, 13)) / 512.0 - fr);
      err17 += rabs(real'(sx(fc, 17)) / 8192.0 - fr);
      // five micro-rotations without a repeated step leave up to about 0.075
      // of the angle unresolved, which bounds the accuracy at every width
      checks++;
      if (rabs(real'(sx(fc, 17)) / 8192.0 - fr) > 0.1) begin
        failures++; $display("FAIL 17-bit f=%f real %f", real'(sx(fc, 17)) / 8192.0, fr);
      end
      @(posedge clk); #1;
    end
    $display("mean |error|: 9-bit %f, 13-bit %f, 17-bit %f", err9 / 150.0, err13 / 150.0, err17 / 150.0);
    checks++;
    if (err13 > err9 || err17 > err9) begin failures++; $display("FAIL wider word less accurate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
