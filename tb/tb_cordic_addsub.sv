// tb_cordic_addsub -- exhaustive check of the 9-bit ripple adder/subtractor
// against integer a + b and a - b modulo 2^9.
module tb_cordic_addsub;
  int checks = 0, failures = 0;
  logic [8:0] a, b, s;
  logic       sub;

  cordic_addsub #(.WIDTH(9)) dut (.a, .b, .sub, .s);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int op = 0; op < 2; op++)
      for (int ia = 0; ia < 512; ia++)
        for (int ib = 0; ib < 512; ib += 3) begin
          a = ia[8:0]; b = ib[8:0]; sub = op[0];
          #1;
          exp = op ? (ia - ib) : (ia + ib);
          exp = ((exp % 512) + 512) % 512;
          checks++;
          if (int'(s) != exp) begin
            failures++;
            if (failures < 10) $display("FAIL a=%0d b=%0d sub=%0d got %0d exp %0d", ia, ib, op, s, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
