// cordic_shifter -- arithmetic right shift of a CORDIC path by i bits.
//
// Produces v * 2^-i by an arithmetic (sign-extending) right shift, so the
// same hardware serves signed and unsigned-in-range operands. Bits shifted
// out are dropped (truncation toward minus infinity), which is how the
// design's worked MAC example loses its low bits. Combinational barrel
// shifter; shift amounts of WIDTH or more give all sign bits.
module cordic_shifter #(
  parameter int unsigned WIDTH = 9,
  parameter int unsigned SH_W  = 3
) (
  input  logic [WIDTH-1:0] v,
  input  logic [SH_W-1:0]  sh,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    y = v;
    for (int b = 0; b < SH_W; b++) begin
      if (sh[b]) y = WIDTH'($signed(y) >>> (1 << b));
    end
  end

endmodule
