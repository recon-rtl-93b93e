// recon_af -- activation function back end of the RECON neuron.
//
// Turns the hyperbolic CORDIC results cosh(z) (X) and sinh(z) (Y) into the
// neuron output f(z):
//   e^z        = cosh(z) + sinh(z)          first adder
//   1 + e^z                                 second adder
//   tanh(z)    = sinh(z) / cosh(z)          select_af = 1
//   sigmoid(z) = e^z / (1 + e^z)            select_af = 0
// Two 2:1 multiplexers steered by select_af choose numerator and denominator
// of the single divider. Both adders serve only the sigmoid, so for tanh they
// are power gated: their operands are held at zero and pg_sleep (the sleep
// control of their power switch) is raised. Operand isolation in place of the
// switch is this RTL's choice. Combinational; the neuron registers f.
module recon_af
  import recon_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned FRAC  = DEF_FRAC
) (
  input  logic [WIDTH-1:0] cosh_z,
  input  logic [WIDTH-1:0] sinh_z,
  input  af_sel_t          select_af,
  output logic [WIDTH-1:0] exp_z,     // e^z (zero while gated)
  output logic [WIDTH-1:0] f,         // tanh(z) or sigmoid(z)
  output logic             pg_sleep   // sleep control of both adders
);

  localparam logic [WIDTH-1:0] ONE = WIDTH'(one_fx(FRAC));

  logic [WIDTH-1:0] c_iso, s_iso, one_iso, one_plus_exp, num, den;

  assign pg_sleep = (select_af == AF_TANH);
  assign c_iso    = pg_sleep ? '0 : cosh_z;
  assign s_iso    = pg_sleep ? '0 : sinh_z;
  assign one_iso  = pg_sleep ? '0 : ONE;

  cordic_addsub #(.WIDTH(WIDTH)) u_add_exp (.a(c_iso),   .b(s_iso), .sub(1'b0), .s(exp_z));
  cordic_addsub #(.WIDTH(WIDTH)) u_add_one (.a(one_iso), .b(exp_z), .sub(1'b0), .s(one_plus_exp));

  assign num = (select_af == AF_TANH) ? sinh_z : exp_z;
  assign den = (select_af == AF_TANH) ? cosh_z : one_plus_exp;

  recon_divider #(.WIDTH(WIDTH), .FRAC(FRAC)) u_div (.num(num), .den(den), .q(f));

endmodule
