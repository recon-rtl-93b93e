// tb_cordic_rom -- checks the CORDIC angle table against 2^-i and against
// atanh(2^-i) computed with real arithmetic, for the default Q3.5 word and a
// 16-bit word with 12 fractional bits.
module tb_cordic_rom;
  int checks = 0, failures = 0;

  logic       sel;
  logic [2:0] idx;
  logic [8:0] e9;
  logic [15:0] e16;

  cordic_rom dut (.select(sel), .idx(idx), .e_i(e9));
  cordic_rom #(.WIDTH(16), .FRAC(12)) dut16 (.select(sel), .idx(idx), .e_i(e16));

  function automatic int ref_e(bit s, int i, int f);
    real t;
    t = 1.0 / real'(1 << i);
    if (s) return (i > f) ? 0 : (1 << (f - i));
    if (i == 0) return 0;
    return $rtoi(0.5 * $ln((1.0 + t) / (1.0 - t)) * real'(1 << f) + 0.5);
  endfunction

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < 6; i++) begin
        sel = s[0];
        idx = i[2:0];
        #1;
        chk(int'(e9), ref_e(s[0], i, 5), $sformatf("Q3.5 select=%0d i=%0d", s, i));
        chk(int'(e16), ref_e(s[0], i, 12), $sformatf("Q3.12 select=%0d i=%0d", s, i));
      end
    end
    // Values of the worked example: atanh(1/2) -> 18/32, atanh(1/4) -> 8/32.
    sel = 1'b0; idx = 3'd1; #1; chk(int'(e9), 18, "atanh(1/2)");
    idx = 3'd2; #1; chk(int'(e9), 8, "atanh(1/4)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
