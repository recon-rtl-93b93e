// recon_network -- fully connected N_X : N_H : N_O network of RECON neurons
// (default 4:4:2, the prototype network of the design).
//
// The input layer only distributes the N_X inputs. The hidden layer has N_H
// recon_neuron instances, each with N_X inputs; the output layer has N_O
// instances, each taking all N_H hidden outputs. All neurons of a layer run
// in parallel and in lockstep; the output layer starts on the cycle after
// the hidden layer's results are valid. Every neuron uses the activation
// chosen by select_af (sigmoid, select_af = 0, in the prototype).
//
// Interface: pulse start for one cycle with x, weights, biases and select_af
// valid; keep x and the weights steady while busy. done pulses for one cycle
// with y valid (y holds until the next run). hidden exposes the hidden-layer
// outputs. Latency: the two layers take ITER*(N_X+1)+1 and ITER*(N_H+1)+1
// cycles, plus one cycle between them (53 cycles from the start edge to done
// for 4:4:2).
// Weights and biases are ports; where they are stored is left to the system
// around the network. The layer wiring is this RTL's reading of a fully
// connected network; weight memories and layer scheduling are not specified
// by the design.
module recon_network
  import recon_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned FRAC  = DEF_FRAC,
  parameter int unsigned ITER  = DEF_ITER,
  parameter int unsigned N_X   = 4,
  parameter int unsigned N_H   = 4,
  parameter int unsigned N_O   = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  af_sel_t          select_af,
  input  logic [WIDTH-1:0] x      [N_X],
  input  logic [WIDTH-1:0] w_h    [N_H][N_X],   // hidden weights [neuron][input]
  input  logic [WIDTH-1:0] b_h    [N_H],
  input  logic [WIDTH-1:0] w_o    [N_O][N_H],   // output weights [neuron][hidden]
  input  logic [WIDTH-1:0] b_o    [N_O],
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] hidden [N_H],
  output logic [WIDTH-1:0] y      [N_O],
  // per-neuron status, hidden neurons first: linear (MAC) mode, and the
  // cycle in which the MAC result is fed back as the AF angle (Ctr)
  output logic [N_H+N_O-1:0] mac_mode,
  output logic [N_H+N_O-1:0] af_start,
  // sleep controls for the power switches, hidden neurons first
  output logic [N_H+N_O-1:0] pg_sleep_cordic,
  output logic [N_H+N_O-1:0] pg_sleep_af
);

  localparam int unsigned CH = $clog2(ITER * N_X + ITER + 1);
  localparam int unsigned CO = $clog2(ITER * N_H + ITER + 1);

  logic [N_H-1:0] h_busy, h_valid;
  logic [N_O-1:0] o_busy, o_valid;
  logic           start_o;
  af_sel_t        af_r;

  for (genvar n = 0; n < N_H; n++) begin : g_hid
    logic [CH-1:0]    count;
    logic [WIDTH-1:0] mac, xn, yn, zn;
    recon_neuron #(.WIDTH(WIDTH), .FRAC(FRAC), .ITER(ITER), .N_IN(N_X)) u_n (
      .clk, .rst_n, .start, .x, .w(w_h[n]), .bias(b_h[n]), .select_af,
      .busy(h_busy[n]), .valid(h_valid[n]), .f_out(hidden[n]), .mac_out(mac),
      .count, .select(mac_mode[n]), .ctr(af_start[n]), .xn, .yn, .zn, .pg_sleep_cordic(pg_sleep_cordic[n]), .pg_sleep_af(pg_sleep_af[n])
    );
  end

  // The hidden results start the output layer; select_af is held from start.
  assign start_o = h_valid[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  af_r <= AF_SIGMOID;
    else if (start && !busy)     af_r <= select_af;
  end

  for (genvar n = 0; n < N_O; n++) begin : g_out
    logic [CO-1:0]    count;
    logic [WIDTH-1:0] mac, xn, yn, zn;
    recon_neuron #(.WIDTH(WIDTH), .FRAC(FRAC), .ITER(ITER), .N_IN(N_H)) u_n (
      .clk, .rst_n, .start(start_o), .x(hidden), .w(w_o[n]), .bias(b_o[n]), .select_af(af_r),
      .busy(o_busy[n]), .valid(o_valid[n]), .f_out(y[n]), .mac_out(mac),
      .count, .select(mac_mode[N_H+n]), .ctr(af_start[N_H+n]), .xn, .yn, .zn, .pg_sleep_cordic(pg_sleep_cordic[N_H+n]), .pg_sleep_af(pg_sleep_af[N_H+n])
    );
  end

  assign busy = (|h_busy) | (|o_busy) | start_o;
  assign done = o_valid[0];

endmodule
