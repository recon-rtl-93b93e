// recon_pkg -- constants, types and constant functions shared by the RECON
// neuron blocks.
//
// Numbers are two's complement fixed point with FRAC fractional bits in a
// WIDTH-bit word. The default word is 9 bits (sign, 3 integer bits, 5
// fractional bits), the "fixed (8,5)" format with a separate sign bit.
// The CORDIC runs ITER micro-rotations per mode: i = 0..ITER-1 in linear
// mode (MAC) and i = 1..ITER in hyperbolic mode (activation function), as in
// the worked examples of the design.
//
// The hyperbolic ROM constants atanh(2^-i) and the gain compensation 1/K are
// computed here at elaboration time from integer series, so the tables follow
// WIDTH/FRAC without any data file:
//   atanh(t) = sum_{k>=0} t^(2k+1) / (2k+1),   t = 2^-i
// evaluated with 40 fractional bits and rounded to FRAC bits. 1/K uses the
// value 1.2075 given for the 5-iteration hyperbolic sequence, rounded to FRAC
// bits (39/32 = 1.21875 at FRAC = 5).
package recon_pkg;

  localparam int unsigned DEF_WIDTH = 9;   // sign + 3 integer + 5 fraction
  localparam int unsigned DEF_FRAC  = 5;
  localparam int unsigned DEF_ITER  = 5;   // micro-rotations per mode

  // Operating phase of a neuron (see recon_ctrl).
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,   // waiting for start
    PH_MAC  = 2'd1,   // linear-mode iterations: Y += X * Z
    PH_AF   = 2'd2,   // hyperbolic-mode iterations: X -> cosh, Y -> sinh
    PH_OUT  = 2'd3    // activation back end result is registered
  } phase_t;

  // Activation function select, encoded as the select_af line.
  typedef enum logic {
    AF_SIGMOID = 1'b0,
    AF_TANH    = 1'b1
  } af_sel_t;

  // atanh(2^-i) rounded to frac fractional bits, for i >= 1.
  function automatic longint atanh_pow2_fx(int unsigned i, int unsigned frac);
    longint acc;
    longint term;
    int unsigned k;
    acc = 0;
    for (k = 0; k < 20; k++) begin
      if (i * (2 * k + 1) < 40) begin
        term = (longint'(1) << (40 - i * (2 * k + 1))) / longint'(2 * k + 1);
        acc  = acc + term;
      end
    end
    return (acc + (longint'(1) << (40 - frac - 1))) >>> (40 - frac);
  endfunction

  // 2^-i in frac fractional bits (0 once the shift runs past the word).
  function automatic longint pow2_neg_fx(int unsigned i, int unsigned frac);
    return (i > frac) ? longint'(0) : (longint'(1) << (frac - i));
  endfunction

  // Gain compensation 1/K = 1.2075 rounded to frac fractional bits.
  function automatic longint inv_k_fx(int unsigned frac);
    return ((longint'(12075) << frac) + longint'(5000)) / longint'(10000);
  endfunction

  // The constant 1.0 in frac fractional bits.
  function automatic longint one_fx(int unsigned frac);
    return longint'(1) << frac;
  endfunction

endpackage
