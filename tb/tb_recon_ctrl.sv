// tb_recon_ctrl -- checks the neuron sequencer cycle by cycle.
// For one input (N_IN = 1) the count register must run 0..10 with the MAC
// steps at count 0..4 (select = 1, idx = count), the AF start at count 5
// (Ctr and Sel1..3 raised, select = 0, idx = 1), AF steps at count 6..9,
// capture at count 10 and then a return to idle with count = 0. A second
// instance with three inputs checks that Sel1/Sel3 reload X and Z at the
// first step of every further input while Y is kept (Sel2 = 0), and that
// the run takes 5 * 3 + 5 micro-rotations. A start while busy is ignored.
module tb_recon_ctrl;
  import recon_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  phase_t ph1, ph3;
  logic [3:0] cnt1;
  logic [4:0] cnt3;
  logic busy1, en1, step1, sel1_1, sel2_1, sel3_1, ctr1, cap1, s1;
  logic busy3, en3, step3, sel1_3, sel2_3, sel3_3, ctr3, cap3, s3;
  logic [2:0] idx1, idx3;
  logic [0:0] k1;
  logic [1:0] k3;

  recon_ctrl dut1 (.clk, .rst_n, .start, .phase(ph1), .count(cnt1), .busy(busy1), .en(en1),
    .step(step1), .select(s1), .sel1(sel1_1), .sel2(sel2_1), .sel3(sel3_1), .ctr(ctr1),
    .idx(idx1), .in_idx(k1), .capture(cap1));
  recon_ctrl #(.N_IN(3)) dut3 (.clk, .rst_n, .start, .phase(ph3), .count(cnt3), .busy(busy3),
    .en(en3), .step(step3), .select(s3), .sel1(sel1_3), .sel2(sel2_3), .sel3(sel3_3), .ctr(ctr3),
    .idx(idx3), .in_idx(k3), .capture(cap3));

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(int'(busy1), 0, "idle after reset");
    start = 1;
    #1;
    chk(int'(en1 & ~step1 & s1 & sel1_1 & sel2_1 & sel3_1 & ~ctr1), 1, "load on start");
    @(posedge clk); #1;
    start = 0;
    // 1 input: count 0..9 are micro-rotations, 10 is capture
    for (int c = 0; c <= 10; c++) begin
      chk(int'(cnt1), c, "count");
      chk(int'(busy1), 1, "busy");
      if (c < 5) begin
        chk(int'(s1), 1, $sformatf("select at count %0d", c));
        chk(int'(idx1), c, $sformatf("idx at count %0d", c));
        chk(int'(en1 & step1), 1, "MAC step");
        chk(int'(sel1_1 | sel2_1 | sel3_1 | ctr1), 0, "MAC feedback");
      end else if (c < 10) begin
        chk(int'(s1), 0, $sformatf("select at count %0d", c));
        chk(int'(idx1), c - 4, $sformatf("idx at count %0d", c));
        chk(int'(ctr1), c == 5, $sformatf("ctr at count %0d", c));
        chk(int'(sel1_1 & sel2_1 & sel3_1), c == 5, $sformatf("sel at count %0d", c));
        chk(int'(en1 & step1), 1, "AF step");
      end else begin
        chk(int'(cap1), 1, "capture at count 10");
        chk(int'(en1), 0, "no update at capture");
      end
      if (c == 3) start = 1;   // must be ignored
      @(posedge clk); #1;
      start = 0;
    end
    chk(int'(busy1), 0, "idle after capture");
    chk(int'(cnt1), 0, "count reset");
    // 3 inputs: walk on until capture
    cyc = 11;
    while (!cap3 && cyc < 40) begin
      if (ph3 == PH_MAC && idx3 == 0) begin
        chk(int'(sel1_3 & sel3_3), k3 != 0, $sformatf("reload x/w for input %0d", k3));
        chk(int'(sel2_3), 0, "Y kept between inputs");
      end
      @(posedge clk); #1;
      cyc++;
    end
    chk(int'(cap3), 1, "capture with 3 inputs");
    chk(int'(cnt3), 20, "count at capture with 3 inputs");
    chk(cyc, 20, "cycles from load to capture with 3 inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
