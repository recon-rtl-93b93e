// cordic_rom -- micro-rotation angle table E_i of the CORDIC Z path.
//
// Holds the constant subtracted from (or added to) Z in iteration i:
//   select = 1 (linear mode, MAC):          E_i = 2^-i
//   select = 0 (hyperbolic mode, AF):       E_i = atanh(2^-i)
// Both tables and the select polarity are those of the RECON CORDIC figure.
// The entries are generated at elaboration time from recon_pkg (integer
// series for atanh, rounded to FRAC bits); for the default Q3.5 word they are
//   linear     i=0..5: 32 16 8 4 2 1   (/32)
//   hyperbolic i=1..5: 18  8 4 2 1     (/32), entry 0 unused (atanh(1) = inf)
// Purely combinational: the address is the iteration index, the output is
// valid in the same cycle.
module cordic_rom
  import recon_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned FRAC  = DEF_FRAC,
  parameter int unsigned DEPTH = DEF_ITER + 1,
  parameter int unsigned IDX_W = $clog2(DEPTH)
) (
  input  logic             select,   // 1: linear (2^-i), 0: hyperbolic (atanh 2^-i)
  input  logic [IDX_W-1:0] idx,      // iteration index i
  output logic [WIDTH-1:0] e_i       // constant E_i, FRAC fractional bits
);

  logic [WIDTH-1:0] lin_tab [DEPTH];
  logic [WIDTH-1:0] hyp_tab [DEPTH];

  for (genvar g = 0; g < DEPTH; g++) begin : g_tab
    localparam longint LIN = pow2_neg_fx(g, FRAC);
    localparam longint HYP = (g == 0) ? longint'(0) : atanh_pow2_fx(g, FRAC);
    assign lin_tab[g] = WIDTH'(LIN);
    assign hyp_tab[g] = WIDTH'(HYP);
  end

  always_comb begin
    e_i = '0;
    if (int'(idx) < DEPTH) e_i = select ? lin_tab[idx] : hyp_tab[idx];
  end

endmodule
