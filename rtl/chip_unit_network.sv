// chip_unit_network: the expandable unit network: a 4 x 4 synapse array, a row
// of four neurons and a row of four configurable error generators.
//
// Rows i carry the inputs x_in[i]; columns j belong to neuron j. Synapse
// cell (i, j) holds weight w[i][j]. The array works in three phases, each
// started by its own pulse:
//   forward  (fwd_start): column sums mul[j] = s_j = sum_i w[i][j] * x_in[i]
//            go to neuron j, which gives x_out[j] and its x1/x2 outputs.
//            fwd_done after 3 cycles.
//   backward (bwd_start): error generator j forms del[j] from t_e_in[j]
//            (a target if cfg[j] = 1, an error if cfg[j] = 0), x_out[j] and
//            x1 - x2; then the row sums e_out[i] = eps_i = sum_j w[i][j] *
//            del[j] are registered. bwd_done after 2 cycles.
//   update   (upd_start): every cell adds (x_in[i] * del[j]) >>> ETA_SHIFT to
//            its weight. upd_done after 1 cycle.
// x_in and t_e_in must be held from the start of a phase to its done, and x_in
// also through the update. e_out feeds the t_e_in of the unit before this one
// when units are chained layer after layer; mul and del are the column lines
// brought out as well.
//
// The array structure, the three per-cell functions, the configurable error
// generators and the line names (X_in, X_out, E_out, T/E_in, CFG, Del, Mul)
// follow the design, an analog prototype there. The split into three clocked
// phases, all latencies, the registered e_out and mul, and the load port for
// initial weights are choices of this digital realization.
module chip_unit_network
  import bp_pkg::*;
#(
  parameter int unsigned ETA_SHIFT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  fix_t              w_init [N_IN][N_NEUR],
  input  fix_t              alpha,
  input  fix_t              theta,
  input  logic [N_NEUR-1:0] cfg,
  input  fix_t              x_in   [N_IN],
  input  fix_t              t_e_in [N_NEUR],
  input  logic              fwd_start,
  input  logic              bwd_start,
  input  logic              upd_start,
  output fix_t              x_out  [N_NEUR],
  output fix_t              e_out  [N_IN],
  output fix_t              del    [N_NEUR],
  output fix_t              mul    [N_NEUR],
  output fix_t              w      [N_IN][N_NEUR],
  output logic [N_NEUR-1:0] sat,
  output logic              fwd_done,
  output logic              bwd_done,
  output logic              upd_done
);

  fix_t m   [N_IN][N_NEUR];
  fix_t eps [N_IN][N_NEUR];
  fix_t s   [N_NEUR];
  fix_t ei  [N_IN];
  fix_t x1  [N_NEUR];
  fix_t x2  [N_NEUR];
  logic [N_NEUR-1:0] n_done, e_done;

  // Synapse array.
  for (genvar i = 0; i < N_IN; i++) begin : g_row
    for (genvar j = 0; j < N_NEUR; j++) begin : g_col
      chip_synapse #(.ETA_SHIFT(ETA_SHIFT)) u_s (
        .clk, .rst_n, .load, .w_init(w_init[i][j]), .upd(upd_start),
        .x(x_in[i]), .delta(del[j]), .w(w[i][j]), .m(m[i][j]), .eps_out(eps[i][j])
      );
    end
  end

  // Summing lines: columns (forward) and rows (backward).
  always_comb begin
    for (int j = 0; j < int'(N_NEUR); j++) begin
      s[j] = '0;
      for (int i = 0; i < int'(N_IN); i++) s[j] = s[j] + m[i][j];
    end
    for (int i = 0; i < int'(N_IN); i++) begin
      ei[i] = '0;
      for (int j = 0; j < int'(N_NEUR); j++) ei[i] = ei[i] + eps[i][j];
    end
  end

  // Neuron row and error-generator row.
  for (genvar j = 0; j < N_NEUR; j++) begin : g_neur
    chip_neuron u_n (
      .clk, .rst_n, .start(fwd_start), .alpha, .theta, .s(s[j]),
      .x(x_out[j]), .x1(x1[j]), .x2(x2[j]), .sat(sat[j]), .done(n_done[j])
    );
    chip_error_gen u_e (
      .clk, .rst_n, .start(bwd_start), .c(cfg[j]), .t_eps(t_e_in[j]),
      .x(x_out[j]), .x1(x1[j]), .x2(x2[j]), .delta(del[j]), .done(e_done[j])
    );
  end

  assign fwd_done = n_done[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bwd_done <= 1'b0;
      upd_done <= 1'b0;
      for (int i = 0; i < int'(N_IN); i++) e_out[i] <= '0;
      for (int j = 0; j < int'(N_NEUR); j++) mul[j] <= '0;
    end else begin
      bwd_done <= e_done[0];
      upd_done <= upd_start && !load;
      if (fwd_start) mul <= s;
      if (e_done[0]) e_out <= ei;
    end
  end

  // All neurons and all error generators run in lock-step.
  property p_lockstep;
    @(posedge clk) disable iff (!rst_n) (&n_done == |n_done) && (&e_done == |e_done);
  endproperty
  a_lockstep: assert property (p_lockstep);

endmodule
