// tb_recon_network -- end-to-end test of the 4:4:2 network at its default
// parameters (9-bit words, 5 micro-rotations per mode).
// Each run draws inputs, weights and biases, starts the network, and checks
// the four hidden outputs and the two outputs against the bit-level
// reference model layer by layer, and the latency of 53 cycles from the
// start edge to done. Runs alternate sigmoid (the prototype's activation)
// and tanh. The testbench counts, and requires at least once each: a
// sigmoid run, a tanh run, a MAC accumulating over several inputs (at least
// 20 linear-mode cycles per run in a hidden neuron), the MAC result fed back
// into Z (Ctr) in both layers, the CORDIC add/sub sleep control and the AF
// adder sleep control.
module tb_recon_network;
  import recon_pkg::*;
  import recon_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int RUNS = 40;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  af_sel_t    af;
  logic [8:0] x [4], w_h [4][4], b_h [4], w_o [2][4], b_o [2], hidden [4], y [2];
  logic       busy, done;
  logic [5:0] pgc, pga, macm, afs;

  recon_network dut (.clk, .rst_n, .start, .select_af(af), .x, .w_h, .b_h, .w_o, .b_o,
    .busy, .done, .hidden, .y, .mac_mode(macm), .af_start(afs), .pg_sleep_cordic(pgc), .pg_sleep_af(pga));

  int n_sigmoid = 0, n_tanh = 0, n_ctr = 0, n_ctr_o = 0, n_pgc = 0, n_pga = 0, n_mac = 0;

  always @(posedge clk) begin
    if (afs[0]) n_ctr++;
    if (afs[4]) n_ctr_o++;
    if (busy && macm[0]) n_mac++;
    if (busy && pgc[0]) n_pgc++;
    if (busy && pga[4]) n_pga++;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int rnd(int lo, int hi);
    return $urandom_range(0, hi - lo) + lo;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs[4], hs[4], wv[4], mac, lat, e;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < RUNS; r++) begin
      af = (r % 2) ? AF_TANH : AF_SIGMOID;
      for (int i = 0; i < 4; i++) begin
        xs[i] = rnd(-32, 32);
        x[i]  = 9'(xs[i]);
        b_h[i] = 9'(rnd(-8, 8));
        for (int j = 0; j < 4; j++) w_h[i][j] = 9'(rnd(-10, 10));
      end
      for (int o = 0; o < 2; o++) begin
        b_o[o] = 9'(rnd(-8, 8));
        for (int j = 0; j < 4; j++) w_o[o][j] = 9'(rnd(-12, 12));
      end
      start = 1;
      @(posedge clk); #1;
      start = 0;
      lat = 0;
      while (!done && lat < 200) begin @(posedge clk); #1; lat++; end
      chk(lat, 53, "latency start to done");
      for (int i = 0; i < 4; i++) begin
        for (int j = 0; j < 4; j++) wv[j] = sx(w_h[i][j], 9);
        hs[i] = neuron(xs, wv, sx(b_h[i], 9), af == AF_TANH, 9, 5, 5, mac);
        chk(sx(hidden[i], 9), hs[i], $sformatf("run %0d hidden %0d", r, i));
      end
      for (int o = 0; o < 2; o++) begin
        for (int j = 0; j < 4; j++) wv[j] = sx(w_o[o][j], 9);
        e = neuron(hs, wv, sx(b_o[o], 9), af == AF_TANH, 9, 5, 5, mac);
        chk(sx(y[o], 9), e, $sformatf("run %0d output %0d", r, o));
        // sigmoid outputs lie in [0, 1], tanh outputs in [-1, 1]
        checks++;
        if (sx(y[o], 9) > 32 || sx(y[o], 9) < ((af == AF_TANH) ? -32 : 0)) begin
          failures++; $display("FAIL output %0d out of range: %0d", o, sx(y[o], 9));
        end
      end
      if (af == AF_TANH) n_tanh++; else n_sigmoid++;
      @(posedge clk); #1;
    end
    $display("mechanisms: sigmoid runs %0d, tanh runs %0d, Ctr feedback hidden %0d output %0d, MAC cycles %0d, cordic sleep %0d, AF adder sleep %0d",
             n_sigmoid, n_tanh, n_ctr, n_ctr_o, n_mac, n_pgc, n_pga);
    if (n_sigmoid == 0) begin failures++; $display("FAIL no sigmoid run"); end
    if (n_tanh == 0)    begin failures++; $display("FAIL no tanh run"); end
    if (n_ctr == 0 || n_ctr_o == 0) begin failures++; $display("FAIL no MAC-to-AF feedback"); end
    if (n_mac < RUNS * 20) begin failures++; $display("FAIL multi-input MAC phases too short"); end
    if (n_pgc == 0)     begin failures++; $display("FAIL CORDIC sleep never raised"); end
    if (n_pga == 0)     begin failures++; $display("FAIL AF adder sleep never raised"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
