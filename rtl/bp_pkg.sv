// bp_pkg: number format and shared arithmetic for the back-propagation network.
//
// Every value in the network (inputs, weights, sums, activations, derivatives,
// deltas and errors) is a signed fixed-point number of FIX_W bits with FRAC_W
// fraction bits (Q8.24 by default: range about +-128, resolution 6e-8). The
// original model of this network used real numbers; the fixed-point format,
// the rounding of products and the sigmoid look-up table below are choices of
// this implementation.
//
// The network shape is fixed at N_IN inputs and N_NEUR neurons per layer
// (4 and 4): a two-layer network with sixteen synapses per layer.
//
// The sigmoid is produced from a table of SIG_SEG+1 samples of 1/(1+e^-z)
// taken every 2^-SIG_STEP_LOG2 over [-SIG_ZMAX, +SIG_ZMAX), with linear
// interpolation between samples. The samples are computed at elaboration by
// sig_table(): e^z is evaluated as (sum of the first terms of the Taylor series
// of e^(z/256)) raised to the power 256 by eight squarings, in double precision,
// and rounded to the fixed-point format.
package bp_pkg;

  parameter int unsigned FIX_W  = 32;
  parameter int unsigned FRAC_W = 24;
  parameter int unsigned N_IN   = 4;
  parameter int unsigned N_NEUR = 4;

  typedef logic signed [FIX_W-1:0]   fix_t;
  typedef logic signed [2*FIX_W-1:0] fix2_t;

  typedef fix_t vec_t [N_NEUR];
  typedef fix_t mat_t [N_NEUR][N_IN];

  localparam fix_t FIX_ONE  = fix_t'(1) <<< FRAC_W;

  // Sigmoid table geometry: samples every 1/32 over [-8, 8).
  parameter int unsigned SIG_STEP_LOG2 = 5;
  parameter int unsigned SIG_ZMAX_LOG2 = 3;
  localparam int unsigned SIG_SEG   = 2 ** (SIG_ZMAX_LOG2 + 1 + SIG_STEP_LOG2);
  localparam int unsigned SIG_IDX_W = SIG_ZMAX_LOG2 + 1 + SIG_STEP_LOG2;
  localparam int unsigned SIG_FR_W  = FRAC_W - SIG_STEP_LOG2;

  typedef fix_t sig_tab_t [SIG_SEG + 1];

  // Fixed-point product, rounded to nearest.
  function automatic fix_t fmul(input fix_t a, input fix_t b);
    fix2_t p;
    p = fix2_t'(a) * fix2_t'(b) + (fix2_t'(1) <<< (FRAC_W - 1));
    return fix_t'(p >>> FRAC_W);
  endfunction

  function automatic real exp_r(input real z);
    real y, term, sum;
    y = z / 256.0;
    sum  = 1.0;
    term = 1.0;
    for (int k = 1; k <= 10; k++) begin
      term = term * y / k;
      sum  = sum + term;
    end
    for (int k = 0; k < 8; k++) sum = sum * sum;
    return sum;
  endfunction

  function automatic sig_tab_t sig_table();
    sig_tab_t t;
    real z, s;
    for (int k = 0; k <= int'(SIG_SEG); k++) begin
      z = -(2.0 ** SIG_ZMAX_LOG2) + real'(k) / (2.0 ** SIG_STEP_LOG2);
      s = 1.0 / (1.0 + exp_r(-z));
      t[k] = fix_t'(longint'(s * (2.0 ** FRAC_W)));
    end
    return t;
  endfunction

endpackage
