// bp_network: on-chip back-propagation training of a 4-4 two-layer network.
//
// Data path (one training iteration, with w_ij the hidden-layer weights and
// w_jk the output-layer weights):
//   s1 : si = w_ij * x                 synapse, hidden layer
//   n1 : oi = f(si), di = oi(1-oi)     neuron, hidden layer
//   s2 : sj = w_jk * oi                synapse, output layer
//   n2 : oj = f(sj), dj = oj(1-oj)     neuron, output layer
//   e1 : delta_j = (oj - t) * dj       error generator at the output
//   e2 : e_i = w_jk^T * delta_j,       error generator at the input
//        delta_i = e_i * di
//   w1 : dw_jk = w_jk - delta_j * oj   weight update, output layer
//   w2 : dw_ij = w_ij - delta_i * oi   weight update, hidden layer
//   wu1, wu2 : w_jk <- dw_jk, w_ij <- dw_ij   weight transfer
// Each unit has a start input and a done output, and the units are chained
// done-to-start in the order above. e2 and w1 both start when e1 is done; the
// weight transfer starts only when both weight updates are done (a join,
// since w1 finishes before the longer e2 -> w2 path). After the transfer the
// next iteration starts with the new weights, until n_iter iterations have run.
//
// Interface: with the unit idle, a one-cycle `start` pulse loads the initial
// weights w_ij_init and w_jk_init into the weight registers and begins
// training on the input pattern x with target t; x, t, alpha, theta and n_iter
// must stay stable while `busy` is high. `iter_done` pulses at the end of every
// iteration, `iter` counts completed iterations and `done` pulses once after
// the last. `mi`/`mj` are the sixteen partial products of each synapse and
// `sat_i`/`sat_j` flag neurons whose input fell outside the sigmoid table. All
// intermediate results of the latest iteration are outputs.
// n_iter = 0 is treated as 1.
//
// Latency: every iteration takes 14 clock cycles (1 to load the weights or to
// restart, then s1 1, n1 3, s2 1, n2 3, e1 1, e2 2, w2 1, wu 1). iter_done
// pulses 14*n cycles after the clock edge that samples start, for n = 1 ..
// n_iter, and done pulses one cycle after the last iter_done.
//
// The unit partition, the equations and the start/done chaining follow the
// original design; the iteration counter, the join before the weight
// transfer, the load step and all latencies are choices of this implementation.
module bp_network
  import bp_pkg::*;
#(
  parameter int unsigned ETA_SHIFT = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] n_iter,
  input  fix_t        alpha,
  input  fix_t        theta,
  input  fix_t        x         [N_IN],
  input  fix_t        t         [N_NEUR],
  input  fix_t        w_ij_init [N_NEUR][N_IN],
  input  fix_t        w_jk_init [N_NEUR][N_NEUR],
  output fix_t        mi        [N_NEUR][N_IN],
  output fix_t        si        [N_NEUR],
  output fix_t        oi        [N_NEUR],
  output fix_t        di        [N_NEUR],
  output fix_t        mj        [N_NEUR][N_NEUR],
  output fix_t        sj        [N_NEUR],
  output fix_t        oj        [N_NEUR],
  output fix_t        dj        [N_NEUR],
  output fix_t        delta_j   [N_NEUR],
  output fix_t        delta_i   [N_NEUR],
  output fix_t        error_i   [N_NEUR],
  output fix_t        w_ij      [N_NEUR][N_IN],
  output fix_t        w_jk      [N_NEUR][N_NEUR],
  output logic [N_NEUR-1:0] sat_i,
  output logic [N_NEUR-1:0] sat_j,
  output logic        busy,
  output logic        iter_done,
  output logic [15:0] iter,
  output logic        done
);

  logic load;
  logic s1_start, s1_done, n1_done, s2_done, n2_done, e1_done, e2_done;
  logic w1_done, w2_done, wu_start, wu1_done, wu2_done;
  logic w1_fin, w2_fin;
  logic [15:0] iter_last;

  fix_t dw_ij [N_NEUR][N_IN];
  fix_t dw_jk [N_NEUR][N_NEUR];

  assign iter_last = (n_iter == 16'd0) ? 16'd1 : n_iter;

  // ---------------------------------------------------------------- control
  assign wu_start  = (w1_fin || w1_done) && (w2_fin || w2_done);
  assign iter_done = wu1_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      load     <= 1'b0;
      s1_start <= 1'b0;
      iter     <= '0;
      done     <= 1'b0;
      w1_fin   <= 1'b0;
      w2_fin   <= 1'b0;
    end else begin
      load     <= start && !busy;
      s1_start <= load || (wu1_done && (iter + 16'd1 < iter_last));
      done     <= wu1_done && (iter + 16'd1 >= iter_last);
      if (start && !busy) begin
        busy <= 1'b1;
        iter <= '0;
      end else if (wu1_done) begin
        iter <= iter + 16'd1;
        if (iter + 16'd1 >= iter_last) busy <= 1'b0;
      end
      if (wu_start) begin
        w1_fin <= 1'b0;
        w2_fin <= 1'b0;
      end else begin
        if (w1_done) w1_fin <= 1'b1;
        if (w2_done) w2_fin <= 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- forward
  synapse u_s1 (
    .clk, .rst_n, .start(s1_start), .x(x), .w(w_ij), .s(si), .m(mi), .done(s1_done)
  );

  neuron u_n1 (
    .clk, .rst_n, .start(s1_done), .alpha, .theta, .s(si), .o(oi), .d(di),
    .sat(sat_i), .done(n1_done)
  );

  synapse u_s2 (
    .clk, .rst_n, .start(n1_done), .x(oi), .w(w_jk), .s(sj), .m(mj), .done(s2_done)
  );

  neuron u_n2 (
    .clk, .rst_n, .start(s2_done), .alpha, .theta, .s(sj), .o(oj), .d(dj),
    .sat(sat_j), .done(n2_done)
  );

  // --------------------------------------------------------------- backward
  error_genr_op u_e1 (
    .clk, .rst_n, .start(n2_done), .o(oj), .d(dj), .t(t), .delta(delta_j), .done(e1_done)
  );

  error_genr_ip u_e2 (
    .clk, .rst_n, .start(e1_done), .d_i(di), .w_jk(w_jk), .delta_j(delta_j),
    .e(error_i), .delta_i(delta_i), .done(e2_done)
  );

  weight_update #(.ETA_SHIFT(ETA_SHIFT)) u_w1 (
    .clk, .rst_n, .start(e1_done), .delta(delta_j), .o(oj), .w(w_jk), .dw(dw_jk),
    .done(w1_done)
  );

  weight_update #(.ETA_SHIFT(ETA_SHIFT)) u_w2 (
    .clk, .rst_n, .start(e2_done), .delta(delta_i), .o(oi), .w(w_ij), .dw(dw_ij),
    .done(w2_done)
  );

  weight_transfer u_wu1 (
    .clk, .rst_n, .load, .w_init(w_jk_init), .start(wu_start), .dw(dw_jk), .w(w_jk),
    .done(wu1_done)
  );

  weight_transfer u_wu2 (
    .clk, .rst_n, .load, .w_init(w_ij_init), .start(wu_start), .dw(dw_ij), .w(w_ij),
    .done(wu2_done)
  );

  // wu2 runs in lock-step with wu1; its done is checked here rather than used.
  property p_wu_lockstep;
    @(posedge clk) disable iff (!rst_n) wu1_done == wu2_done;
  endproperty
  a_wu_lockstep: assert property (p_wu_lockstep);

  // Exactly one unit of the chain is active at a time on the forward path.
  property p_one_forward;
    @(posedge clk) disable iff (!rst_n) $onehot0({s1_done, n1_done, s2_done, n2_done});
  endproperty
  a_one_forward: assert property (p_one_forward);

endmodule
