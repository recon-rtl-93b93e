// tb_cordic_shifter -- exhaustive check of the arithmetic right shifter
// against floor(v / 2^sh) for every 9-bit signed value and shift 0..7.
module tb_cordic_shifter;
  int checks = 0, failures = 0;
  logic [8:0] v, y;
  logic [2:0] sh;

  cordic_shifter #(.WIDTH(9), .SH_W(3)) dut (.v, .sh, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sv, d, exp;
    for (int iv = -256; iv < 256; iv++)
      for (int s = 0; s < 8; s++) begin
        v = iv[8:0]; sh = s[2:0];
        #1;
        d   = 1 << s;
        exp = (iv >= 0) ? iv / d : -((-iv + d - 1) / d);
        sv  = (y[8] ? int'(y) - 512 : int'(y));
        checks++;
        if (sv != exp) begin
          failures++;
          if (failures < 10) $display("FAIL v=%0d sh=%0d got %0d exp %0d", iv, s, sv, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
