// bp_top: the two on-chip training networks side by side.
//
// Function: `net` is the 4-4 network built from the partition units
// (synapse, neuron, error_genr_op, error_genr_ip, weight_update,
// weight_transfer, chained by bp_network). `arr` is the same-size network
// built from two cascaded expandable unit networks (chip_network), whose
// cells are digital realizations of the current-mode synapse, neuron and
// error generator. Both see the same input pattern x, targets t, gain alpha
// and threshold theta; each has its own start, iteration count, initial
// weights and result ports, so they can be run alone or together.
//
// Interface and timing: see bp_network (ports net_*, an iteration every 14
// cycles) and chip_network (ports arr_*, an iteration every 16 cycles).
// Weights of `net` are indexed [destination][source], those of `arr`
// [source][destination], as in the two source descriptions. ETA_SHIFT
// (learning rate 2^-ETA_SHIFT, default 0) applies to both. Reset is
// asynchronous, active low; one clock.
//
// Placing both networks in one top is a choice of this implementation.
module bp_top
  import bp_pkg::*;
#(
  parameter int unsigned ETA_SHIFT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fix_t              alpha,
  input  fix_t              theta,
  input  fix_t              x              [N_IN],
  input  fix_t              t              [N_NEUR],
  // Partition-unit network.
  input  logic              net_start,
  input  logic [15:0]       net_n_iter,
  input  fix_t              net_w_ij_init  [N_NEUR][N_IN],
  input  fix_t              net_w_jk_init  [N_NEUR][N_NEUR],
  output fix_t              net_mi         [N_NEUR][N_IN],
  output fix_t              net_si         [N_NEUR],
  output fix_t              net_oi         [N_NEUR],
  output fix_t              net_di         [N_NEUR],
  output fix_t              net_mj         [N_NEUR][N_NEUR],
  output fix_t              net_sj         [N_NEUR],
  output fix_t              net_oj         [N_NEUR],
  output fix_t              net_dj         [N_NEUR],
  output fix_t              net_delta_j    [N_NEUR],
  output fix_t              net_delta_i    [N_NEUR],
  output fix_t              net_error_i    [N_NEUR],
  output fix_t              net_w_ij       [N_NEUR][N_IN],
  output fix_t              net_w_jk       [N_NEUR][N_NEUR],
  output logic [N_NEUR-1:0] net_sat_i,
  output logic [N_NEUR-1:0] net_sat_j,
  output logic              net_busy,
  output logic              net_iter_done,
  output logic [15:0]       net_iter,
  output logic              net_done,
  // Expandable unit network pair.
  input  logic              arr_start,
  input  logic [15:0]       arr_n_iter,
  input  fix_t              arr_w_hid_init [N_IN][N_NEUR],
  input  fix_t              arr_w_out_init [N_NEUR][N_NEUR],
  output fix_t              arr_h          [N_NEUR],
  output fix_t              arr_y          [N_NEUR],
  output fix_t              arr_s_hid      [N_NEUR],
  output fix_t              arr_s_out      [N_NEUR],
  output fix_t              arr_del_hid    [N_NEUR],
  output fix_t              arr_del_out    [N_NEUR],
  output fix_t              arr_e_hid      [N_NEUR],
  output fix_t              arr_e_in_side  [N_IN],
  output fix_t              arr_w_hid      [N_IN][N_NEUR],
  output fix_t              arr_w_out      [N_NEUR][N_NEUR],
  output logic [N_NEUR-1:0] arr_sat_hid,
  output logic [N_NEUR-1:0] arr_sat_out,
  output logic              arr_busy,
  output logic              arr_iter_done,
  output logic [15:0]       arr_iter,
  output logic              arr_done
);

  bp_network #(.ETA_SHIFT(ETA_SHIFT)) u_net (
    .clk, .rst_n, .start(net_start), .n_iter(net_n_iter), .alpha, .theta, .x, .t,
    .w_ij_init(net_w_ij_init), .w_jk_init(net_w_jk_init),
    .mi(net_mi), .si(net_si), .oi(net_oi), .di(net_di),
    .mj(net_mj), .sj(net_sj), .oj(net_oj), .dj(net_dj),
    .delta_j(net_delta_j), .delta_i(net_delta_i), .error_i(net_error_i),
    .w_ij(net_w_ij), .w_jk(net_w_jk), .sat_i(net_sat_i), .sat_j(net_sat_j),
    .busy(net_busy), .iter_done(net_iter_done), .iter(net_iter), .done(net_done)
  );

  chip_network #(.ETA_SHIFT(ETA_SHIFT)) u_arr (
    .clk, .rst_n, .start(arr_start), .n_iter(arr_n_iter), .alpha, .theta, .x, .t,
    .w_hid_init(arr_w_hid_init), .w_out_init(arr_w_out_init),
    .h(arr_h), .y(arr_y), .s_hid(arr_s_hid), .s_out(arr_s_out),
    .del_hid(arr_del_hid), .del_out(arr_del_out), .e_hid(arr_e_hid), .e_in_side(arr_e_in_side),
    .w_hid(arr_w_hid), .w_out(arr_w_out), .sat_hid(arr_sat_hid), .sat_out(arr_sat_out),
    .busy(arr_busy), .iter_done(arr_iter_done), .iter(arr_iter), .done(arr_done)
  );

endmodule
