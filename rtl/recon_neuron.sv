// recon_neuron -- one RECON neuron: MAC and activation function on a single
// iterative CORDIC.
//
// Computes f(sum_k x[k] * w[k] + bias) with f = tanh or sigmoid. The CORDIC
// (recon_cordic) first runs in linear mode, where ITER micro-rotations per
// input drive Z (the weight) to zero while Y accumulates x * w onto the bias.
// The MAC result in Y is then fed back as the angle Z of a hyperbolic-mode
// run (X = 1/K, Y = 0), which leaves cosh(z) in X and sinh(z) in Y; the back
// end (recon_af) forms tanh = sinh/cosh or sigmoid = e^z/(1 + e^z).
//
// Interface: pulse start for one cycle with x, w, bias and select_af valid
// (select_af: 1 = tanh, 0 = sigmoid; sampled at start and held). The x/w
// inputs must stay valid while busy. valid pulses for one cycle with f_out,
// which then holds until the next result; mac_out holds the MAC result of the
// last evaluation. Timing for N_IN inputs: the operands are loaded at the
// start edge, then 5*N_IN + 5 micro-rotations and one output cycle follow, so
// valid rises ITER*(N_IN+1) + 1 cycles after the start edge (11 cycles for a
// single input, as in the design's waveform).
//
// Number format: WIDTH-bit two's complement with FRAC fractional bits
// (default 9 bits: sign, 3 integer, 5 fraction). The linear run converges for
// |w| < 2 - 2^-(ITER-1) and the hyperbolic run for |MAC| below about 1.02
// (the sum of atanh(2^-i), i = 1..5); outside these ranges the result is
// that of the truncated iteration. Sums wrap around in the word.
module recon_neuron
  import recon_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned FRAC  = DEF_FRAC,
  parameter int unsigned ITER  = DEF_ITER,
  parameter int unsigned N_IN  = 1,
  parameter int unsigned IDX_W = $clog2(ITER + 1),
  parameter int unsigned K_W   = (N_IN > 1) ? $clog2(N_IN) : 1,
  parameter int unsigned CNT_W = $clog2(ITER * N_IN + ITER + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] x    [N_IN],
  input  logic [WIDTH-1:0] w    [N_IN],
  input  logic [WIDTH-1:0] bias,
  input  af_sel_t          select_af,
  output logic             busy,
  output logic             valid,
  output logic [WIDTH-1:0] f_out,
  output logic [WIDTH-1:0] mac_out,
  // observation of the iteration (waveform signals)
  output logic [CNT_W-1:0] count,
  output logic             select,
  output logic             ctr,
  output logic [WIDTH-1:0] xn,
  output logic [WIDTH-1:0] yn,
  output logic [WIDTH-1:0] zn,
  // sleep controls for the power switches
  output logic             pg_sleep_cordic,
  output logic             pg_sleep_af
);

  localparam logic [WIDTH-1:0] INV_K = WIDTH'(inv_k_fx(FRAC));

  phase_t           phase;     // observed through count/busy only
  logic             en, step, sel1, sel2, sel3, capture, di;
  logic [IDX_W-1:0] idx;
  logic [K_W-1:0]   in_idx;
  logic [WIDTH-1:0] x0, y0, z0, f_comb, exp_z;
  af_sel_t          af_r;

  recon_ctrl #(.ITER(ITER), .N_IN(N_IN), .IDX_W(IDX_W), .K_W(K_W), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .start, .phase, .count, .busy,
    .en, .step, .select, .sel1, .sel2, .sel3, .ctr, .idx, .in_idx, .capture
  );

  // External operands: the input/bias/weight in linear mode, the
  // hyperbolic initial values (X = 1/K, Y = 0) otherwise. Z in the AF start
  // step comes from the Y feedback through Ctr.
  assign x0 = select ? x[in_idx] : INV_K;
  assign y0 = select ? bias      : '0;
  assign z0 = w[in_idx];

  recon_cordic #(.WIDTH(WIDTH), .FRAC(FRAC), .ITER(ITER), .IDX_W(IDX_W)) u_cordic (
    .clk, .rst_n, .en, .step, .select, .sel1, .sel2, .sel3, .ctr, .idx,
    .x0, .y0, .z0, .xn, .yn, .zn, .di, .pg_sleep(pg_sleep_cordic)
  );

  recon_af #(.WIDTH(WIDTH), .FRAC(FRAC)) u_af (
    .cosh_z(xn), .sinh_z(yn), .select_af(af_r), .exp_z, .f(f_comb), .pg_sleep(pg_sleep_af)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      af_r    <= AF_SIGMOID;
      f_out   <= '0;
      mac_out <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= capture;
      if (start && !busy) af_r <= select_af;
      if (ctr)     mac_out <= yn;      // MAC result enters the AF run
      if (capture) f_out   <= f_comb;
    end
  end

endmodule
