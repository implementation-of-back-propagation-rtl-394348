// sigmoid_interp: combinational sigmoid by table look-up and interpolation.
//
// o = 1/(1+e^-z) for a fixed-point z. The table bp_pkg::sig_table() holds
// samples every 2^-SIG_STEP_LOG2 over [-2^SIG_ZMAX_LOG2, 2^SIG_ZMAX_LOG2]
// (every 1/32 over [-8, 8] by default); the output interpolates linearly between
// the two samples around z, with an error below about 2e-5. A z outside the
// table range is clamped to its end and flagged on `sat`.
//
// Shared by neuron and chip_neuron. The table method is a choice of this
// implementation; the sigmoid function itself is the one of the design.
module sigmoid_interp
  import bp_pkg::*;
(
  input  fix_t z,
  output fix_t o,
  output logic sat
);

  localparam sig_tab_t SIG = sig_table();

  localparam fix_t Z_MIN = -(fix_t'(1) <<< (FRAC_W + SIG_ZMAX_LOG2));
  localparam fix_t Z_MAX = (fix_t'(1) <<< (FRAC_W + SIG_ZMAX_LOG2)) - fix_t'(1);

  fix_t                 zc;
  // zc - Z_MIN lies in [0, 2^(SIG_FR_W+SIG_IDX_W)).
  logic [SIG_FR_W+SIG_IDX_W-1:0] u;
  logic [SIG_IDX_W-1:0] idx;
  logic [SIG_FR_W-1:0]  fr;
  fix_t                 y0, y1;
  fix2_t                dy;

  always_comb begin
    sat = (z < Z_MIN) || (z > Z_MAX);
    zc  = (z < Z_MIN) ? Z_MIN : ((z > Z_MAX) ? Z_MAX : z);
    u   = (SIG_FR_W+SIG_IDX_W)'(unsigned'(zc - Z_MIN));
    idx = u[SIG_FR_W +: SIG_IDX_W];
    fr  = u[SIG_FR_W-1:0];
    y0  = SIG[{1'b0, idx}];
    y1  = SIG[{1'b0, idx} + (SIG_IDX_W+1)'(1)];
    dy  = fix2_t'(fix_t'(y1 - y0)) * fix2_t'({1'b0, fr});
    o   = y0 + fix_t'(dy >>> SIG_FR_W);
  end

endmodule
