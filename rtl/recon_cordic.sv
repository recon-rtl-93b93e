// recon_cordic -- iterative CORDIC datapath of the RECON neuron.
//
// Three paths X, Y, Z, each with an input multiplexer (Sel1/Sel2/Sel3:
// external value or fed-back result), a register, and an add/sub unit. The
// X and Y values are shifted right by i and cross-added; Z is driven to zero
// with constants E_i from cordic_rom, and the sign bit of Z gives the
// direction d_i (d_i = +1 when Z >= 0). One micro-rotation per clock:
//   linear     (select = 1, MAC): X' = X
//                                 Y' = Y + d_i * X * 2^-i
//                                 Z' = Z - d_i * 2^-i
//   hyperbolic (select = 0, AF):  X' = X + d_i * Y * 2^-i
//                                 Y' = Y + d_i * X * 2^-i
//                                 Z' = Z - d_i * atanh(2^-i)
// A Ctr-controlled 2:1 multiplexer in front of the Z input multiplexer picks
// either the external z0 or the Y result, so the MAC result can start the
// activation function as its angle.
//
// Control (all sampled on the rising clock edge when en = 1):
//   step = 0 : the registers load the multiplexer outputs unchanged
//   step = 1 : the registers load one micro-rotation of the multiplexer
//              outputs, with shift amount / ROM address idx
// In linear mode the X add/sub and the shifter feeding it are unused; their
// operands are held at zero (operand isolation) and pg_sleep is raised as the
// sleep control for their power switch. The design places power gating on
// these blocks; operand isolation standing in for the switch is this RTL's
// choice. One register per path holds the state (the separate input and
// output registers drawn for each path are merged); asynchronous active-low
// reset clears them.
module recon_cordic
  import recon_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned FRAC  = DEF_FRAC,
  parameter int unsigned ITER  = DEF_ITER,
  parameter int unsigned IDX_W = $clog2(ITER + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,        // register update enable
  input  logic             step,      // 1: micro-rotate, 0: plain load
  input  logic             select,    // 1: linear (MAC), 0: hyperbolic (AF)
  input  logic             sel1,      // X: 1 = x0, 0 = feedback
  input  logic             sel2,      // Y: 1 = y0, 0 = feedback
  input  logic             sel3,      // Z: 1 = external (see ctr), 0 = feedback
  input  logic             ctr,       // external Z source: 1 = Y result, 0 = z0
  input  logic [IDX_W-1:0] idx,       // iteration index i
  input  logic [WIDTH-1:0] x0,
  input  logic [WIDTH-1:0] y0,
  input  logic [WIDTH-1:0] z0,
  output logic [WIDTH-1:0] xn,
  output logic [WIDTH-1:0] yn,
  output logic [WIDTH-1:0] zn,
  output logic             di,        // direction of the next step: 1 = +1
  output logic             pg_sleep   // sleep control of X add/sub + Y shifter
);

  logic [WIDTH-1:0] x_r, y_r, z_r;
  logic [WIDTH-1:0] x_m, y_m, z_m, z_ext;
  logic [WIDTH-1:0] x_sh, y_sh, y_sh_iso, y_m_iso, e_i;
  logic [WIDTH-1:0] x_as, y_as, z_as;
  logic             d_pos;

  // Input multiplexers (Sel1..Sel3) and the Ctr 2:1 multiplexer.
  assign z_ext = ctr ? y_r : z0;
  assign x_m   = sel1 ? x0    : x_r;
  assign y_m   = sel2 ? y0    : y_r;
  assign z_m   = sel3 ? z_ext : z_r;

  // Direction from the sign bit of Z.
  assign d_pos = ~z_m[WIDTH-1];

  cordic_shifter #(.WIDTH(WIDTH), .SH_W(IDX_W)) u_shx (.v(x_m), .sh(idx), .y(x_sh));

  // Power-gated pair: shifter of Y and add/sub of X (unused in linear mode).
  assign pg_sleep = select;
  assign y_m_iso  = pg_sleep ? '0 : y_m;
  cordic_shifter #(.WIDTH(WIDTH), .SH_W(IDX_W)) u_shy (.v(y_m_iso), .sh(idx), .y(y_sh));
  assign y_sh_iso = pg_sleep ? '0 : y_sh;

  // m = -1 in hyperbolic mode: X' = X - m*d*Y*2^-i = X + d*Y*2^-i.
  cordic_addsub #(.WIDTH(WIDTH)) u_asx (.a(pg_sleep ? '0 : x_m), .b(y_sh_iso), .sub(~d_pos), .s(x_as));
  cordic_addsub #(.WIDTH(WIDTH)) u_asy (.a(y_m), .b(x_sh), .sub(~d_pos), .s(y_as));

  cordic_rom #(.WIDTH(WIDTH), .FRAC(FRAC), .DEPTH(ITER + 1), .IDX_W(IDX_W)) u_rom (
    .select(select), .idx(idx), .e_i(e_i)
  );
  cordic_addsub #(.WIDTH(WIDTH)) u_asz (.a(z_m), .b(e_i), .sub(d_pos), .s(z_as));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_r <= '0;
      y_r <= '0;
      z_r <= '0;
    end else if (en) begin
      if (step) begin
        x_r <= select ? x_m : x_as;   // linear mode bypasses the X add/sub
        y_r <= y_as;
        z_r <= z_as;
      end else begin
        x_r <= x_m;
        y_r <= y_m;
        z_r <= z_m;
      end
    end
  end

  assign xn = x_r;
  assign yn = y_r;
  assign zn = z_r;
  assign di = ~z_r[WIDTH-1];

endmodule
