// tb_bp_top: full-size end-to-end test of bp_top at its default parameters.
//
// Both networks are trained at the same time on the same pattern, from the
// same initial weights (the expandable network gets the transposed arrays,
// because it indexes weights [source][destination]). Every iteration of each
// network is checked against a real-number model of its own algorithm,
// started from the weights that network held at the beginning of the
// iteration:
//   net: output delta (o - t)o(1 - o), hidden delta = error x derivative,
//        weight step delta x the layer's own output, subtracted;
//   arr: output delta (t - y)y(1 - y), hidden delta = error x derivative,
//        weight step source activation x delta, added.
// The forward pass of the first iteration must agree between the two.
// Trainings: (1) inputs 0.1, targets 0.101, weights 0.01, four iterations,
// outputs must move towards the target; (2) a random pattern for 300
// iterations, output error must shrink, one start pulse to each network
// while busy must be ignored; (3) large weights, neuron inputs clamped;
// (4) n_iter = 0 runs one iteration. The iteration periods (14 and 16
// cycles) are checked, and every mechanism of both networks is counted:
// iterations, weight loads, weight transfers, join waits, the five phases of
// the unit networks, clamping and ignored starts; one that never occurred is
// a failure.
module tb_bp_top;
  import bp_pkg::*;

  localparam int NET_PERIOD = 14;
  localparam int ARR_PERIOD = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  fix_t alpha, theta;
  fix_t x [N_IN];
  fix_t t [N_NEUR];

  logic net_start = 1'b0;
  logic [15:0] net_n_iter;
  fix_t net_w_ij_init [N_NEUR][N_IN];
  fix_t net_w_jk_init [N_NEUR][N_NEUR];
  fix_t net_mi [N_NEUR][N_IN];
  fix_t net_si [N_NEUR], net_oi [N_NEUR], net_di [N_NEUR];
  fix_t net_mj [N_NEUR][N_NEUR];
  fix_t net_sj [N_NEUR], net_oj [N_NEUR], net_dj [N_NEUR];
  fix_t net_delta_j [N_NEUR], net_delta_i [N_NEUR], net_error_i [N_NEUR];
  fix_t net_w_ij [N_NEUR][N_IN];
  fix_t net_w_jk [N_NEUR][N_NEUR];
  logic [N_NEUR-1:0] net_sat_i, net_sat_j;
  logic net_busy, net_iter_done, net_done;
  logic [15:0] net_iter;

  logic arr_start = 1'b0;
  logic [15:0] arr_n_iter;
  fix_t arr_w_hid_init [N_IN][N_NEUR];
  fix_t arr_w_out_init [N_NEUR][N_NEUR];
  fix_t arr_h [N_NEUR], arr_y [N_NEUR], arr_s_hid [N_NEUR], arr_s_out [N_NEUR];
  fix_t arr_del_hid [N_NEUR], arr_del_out [N_NEUR], arr_e_hid [N_NEUR];
  fix_t arr_e_in_side [N_IN];
  fix_t arr_w_hid [N_IN][N_NEUR];
  fix_t arr_w_out [N_NEUR][N_NEUR];
  logic [N_NEUR-1:0] arr_sat_hid, arr_sat_out;
  logic arr_busy, arr_iter_done, arr_done;
  logic [15:0] arr_iter;

  int checks = 0, failures = 0;
  int net_iters = 0, net_loads = 0, net_transfers = 0, net_join_wait = 0, net_sat = 0, net_ignored = 0;
  int arr_iters = 0, arr_loads = 0, arr_fwd_hid = 0, arr_fwd_out = 0, arr_bwd_out = 0;
  int arr_bwd_hid = 0, arr_upd = 0, arr_sat = 0, arr_ignored = 0;
  real net_first_o [N_NEUR], net_first_h [N_NEUR], arr_first_y [N_NEUR], arr_first_h [N_NEUR];

  bp_top dut (.*);

  always #5 clk = ~clk;

  // Mechanism counters, from the internal control signals.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_net.load) net_loads++;
    if (dut.u_net.wu_start) net_transfers++;
    if (dut.u_net.w1_fin && !dut.u_net.wu_start) net_join_wait++;
    if (dut.u_arr.load) arr_loads++;
    if (dut.u_arr.fwd_hid_start) arr_fwd_hid++;
    if (dut.u_arr.fwd_out_start) arr_fwd_out++;
    if (dut.u_arr.bwd_out_start) arr_bwd_out++;
    if (dut.u_arr.bwd_hid_start) arr_bwd_hid++;
    if (dut.u_arr.upd_start) arr_upd++;
  end

  function automatic fix_t to_fix(real r);
    return fix_t'(longint'(r * (2.0 ** FRAC_W)));
  endfunction
  function automatic real to_real(fix_t f);
    return real'(f) / (2.0 ** FRAC_W);
  endfunction
  function automatic real sig(real z);
    if (z < -8.0) z = -8.0;
    if (z > 8.0) z = 8.0;
    return 1.0 / (1.0 + $exp(-z));
  endfunction

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic check_true(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Weights at the start of the current iteration of each network.
  real pw_ij [N_NEUR][N_IN];
  real pw_jk [N_NEUR][N_NEUR];
  real pw_hid [N_IN][N_NEUR];
  real pw_out [N_NEUR][N_NEUR];

  task automatic check_net_iteration(int it);
    real a, th, rsi [N_NEUR], roi [N_NEUR], rdi [N_NEUR], rsj [N_NEUR], roj [N_NEUR], rdj [N_NEUR];
    real rdelj [N_NEUR], re [N_NEUR], rdeli [N_NEUR];
    a = to_real(alpha);
    th = to_real(theta);
    for (int j = 0; j < int'(N_NEUR); j++) begin
      rsi[j] = 0.0;
      for (int i = 0; i < int'(N_IN); i++) rsi[j] += pw_ij[j][i] * to_real(x[i]);
      roi[j] = sig(a * (rsi[j] + th));
      rdi[j] = roi[j] * (1.0 - roi[j]);
    end
    for (int k = 0; k < int'(N_NEUR); k++) begin
      rsj[k] = 0.0;
      for (int j = 0; j < int'(N_NEUR); j++) rsj[k] += pw_jk[k][j] * roi[j];
      roj[k] = sig(a * (rsj[k] + th));
      rdj[k] = roj[k] * (1.0 - roj[k]);
      rdelj[k] = (roj[k] - to_real(t[k])) * rdj[k];
    end
    for (int j = 0; j < int'(N_NEUR); j++) begin
      re[j] = 0.0;
      for (int k = 0; k < int'(N_NEUR); k++) re[j] += pw_jk[k][j] * rdelj[k];
      rdeli[j] = re[j] * rdi[j];
    end
    for (int n = 0; n < int'(N_NEUR); n++) begin
      for (int i = 0; i < int'(N_IN); i++)
        check($sformatf("net it%0d mi[%0d][%0d]", it, n, i), to_real(net_mi[n][i]), pw_ij[n][i] * to_real(x[i]), 1e-6);
      check($sformatf("net it%0d si[%0d]", it, n), to_real(net_si[n]), rsi[n], 1e-5);
      check($sformatf("net it%0d oi[%0d]", it, n), to_real(net_oi[n]), roi[n], 1e-4);
      check($sformatf("net it%0d di[%0d]", it, n), to_real(net_di[n]), rdi[n], 1e-4);
      check($sformatf("net it%0d sj[%0d]", it, n), to_real(net_sj[n]), rsj[n], 1e-4);
      check($sformatf("net it%0d oj[%0d]", it, n), to_real(net_oj[n]), roj[n], 2e-4);
      check($sformatf("net it%0d dj[%0d]", it, n), to_real(net_dj[n]), rdj[n], 2e-4);
      check($sformatf("net it%0d delta_j[%0d]", it, n), to_real(net_delta_j[n]), rdelj[n], 2e-4);
      check($sformatf("net it%0d error_i[%0d]", it, n), to_real(net_error_i[n]), re[n], 5e-4);
      check($sformatf("net it%0d delta_i[%0d]", it, n), to_real(net_delta_i[n]), rdeli[n], 5e-4);
      if (net_sat_i[n] || net_sat_j[n]) net_sat++;
    end
    for (int r = 0; r < int'(N_NEUR); r++)
      for (int c = 0; c < int'(N_NEUR); c++) begin
        check($sformatf("net it%0d w_jk[%0d][%0d]", it, r, c), to_real(net_w_jk[r][c]),
              pw_jk[r][c] - rdelj[r] * roj[r], 3e-4);
        check($sformatf("net it%0d w_ij[%0d][%0d]", it, r, c), to_real(net_w_ij[r][c]),
              pw_ij[r][c] - rdeli[r] * roi[r], 3e-4);
      end
  endtask

  task automatic check_arr_iteration(int it);
    real a, th, rsh [N_NEUR], rh [N_NEUR], rso [N_NEUR], ry [N_NEUR];
    real rdo [N_NEUR], re [N_NEUR], rdh [N_NEUR], rei;
    a = to_real(alpha);
    th = to_real(theta);
    for (int j = 0; j < int'(N_NEUR); j++) begin
      rsh[j] = 0.0;
      for (int i = 0; i < int'(N_IN); i++) rsh[j] += pw_hid[i][j] * to_real(x[i]);
      rh[j] = sig(a * (rsh[j] + th));
    end
    for (int k = 0; k < int'(N_NEUR); k++) begin
      rso[k] = 0.0;
      for (int j = 0; j < int'(N_NEUR); j++) rso[k] += pw_out[j][k] * rh[j];
      ry[k] = sig(a * (rso[k] + th));
      rdo[k] = (to_real(t[k]) - ry[k]) * ry[k] * (1.0 - ry[k]);
    end
    for (int j = 0; j < int'(N_NEUR); j++) begin
      re[j] = 0.0;
      for (int k = 0; k < int'(N_NEUR); k++) re[j] += pw_out[j][k] * rdo[k];
      rdh[j] = re[j] * rh[j] * (1.0 - rh[j]);
    end
    for (int n = 0; n < int'(N_NEUR); n++) begin
      check($sformatf("arr it%0d s_hid[%0d]", it, n), to_real(arr_s_hid[n]), rsh[n], 1e-5);
      check($sformatf("arr it%0d h[%0d]", it, n), to_real(arr_h[n]), rh[n], 1e-4);
      check($sformatf("arr it%0d s_out[%0d]", it, n), to_real(arr_s_out[n]), rso[n], 1e-4);
      check($sformatf("arr it%0d y[%0d]", it, n), to_real(arr_y[n]), ry[n], 2e-4);
      check($sformatf("arr it%0d del_out[%0d]", it, n), to_real(arr_del_out[n]), rdo[n], 2e-4);
      check($sformatf("arr it%0d e_hid[%0d]", it, n), to_real(arr_e_hid[n]), re[n], 5e-4);
      check($sformatf("arr it%0d del_hid[%0d]", it, n), to_real(arr_del_hid[n]), rdh[n], 5e-4);
      if (arr_sat_hid[n] || arr_sat_out[n]) arr_sat++;
    end
    for (int i = 0; i < int'(N_IN); i++) begin
      rei = 0.0;
      for (int j = 0; j < int'(N_NEUR); j++) rei += pw_hid[i][j] * rdh[j];
      check($sformatf("arr it%0d e_in_side[%0d]", it, i), to_real(arr_e_in_side[i]), rei, 5e-4);
    end
    for (int r = 0; r < int'(N_NEUR); r++)
      for (int c = 0; c < int'(N_NEUR); c++) begin
        check($sformatf("arr it%0d w_out[%0d][%0d]", it, r, c), to_real(arr_w_out[r][c]),
              pw_out[r][c] + rh[r] * rdo[c], 3e-4);
        check($sformatf("arr it%0d w_hid[%0d][%0d]", it, r, c), to_real(arr_w_hid[r][c]),
              pw_hid[r][c] + to_real(x[r]) * rdh[c], 3e-4);
      end
  endtask

  task automatic run_net(input int n, input int expect_iters, input bit poke_start,
                         output real first_o [N_NEUR], output real last_o [N_NEUR]);
    int cyc, got;
    for (int r = 0; r < int'(N_NEUR); r++)
      for (int c = 0; c < int'(N_NEUR); c++) begin
        pw_ij[r][c] = to_real(net_w_ij_init[r][c]);
        pw_jk[r][c] = to_real(net_w_jk_init[r][c]);
      end
    net_n_iter = 16'(n);
    @(negedge clk) net_start = 1'b1;
    @(negedge clk) net_start = 1'b0;
    cyc = 1;
    got = 0;
    while (!net_done && cyc < 20000) begin
      if (net_iter_done) begin
        got++;
        net_iters++;
        check_true($sformatf("net iteration %0d ends at cycle %0d", got, cyc), cyc == NET_PERIOD * got + 1);
        check_net_iteration(got);
        if (got == 1) foreach (net_oj[k]) begin
          first_o[k] = to_real(net_oj[k]);
          net_first_o[k] = to_real(net_oj[k]);
          net_first_h[k] = to_real(net_oi[k]);
        end
        foreach (net_oj[k]) last_o[k] = to_real(net_oj[k]);
        for (int r = 0; r < int'(N_NEUR); r++)
          for (int c = 0; c < int'(N_NEUR); c++) begin
            pw_ij[r][c] = to_real(net_w_ij[r][c]);
            pw_jk[r][c] = to_real(net_w_jk[r][c]);
          end
      end
      if (poke_start && cyc == 20) begin
        net_start = 1'b1;
        net_ignored++;
      end else net_start = 1'b0;
      @(negedge clk);
      cyc++;
    end
    net_start = 1'b0;
    check_true($sformatf("net done after %0d iterations at cycle %0d", got, cyc),
               net_done && got == expect_iters && cyc == NET_PERIOD * expect_iters + 2 && !net_busy);
    check_true("net iteration counter", net_iter == 16'(expect_iters));
  endtask

  task automatic run_arr(input int n, input int expect_iters, input bit poke_start,
                         output real first_y [N_NEUR], output real last_y [N_NEUR]);
    int cyc, got;
    for (int r = 0; r < int'(N_NEUR); r++)
      for (int c = 0; c < int'(N_NEUR); c++) begin
        pw_hid[r][c] = to_real(arr_w_hid_init[r][c]);
        pw_out[r][c] = to_real(arr_w_out_init[r][c]);
      end
    arr_n_iter = 16'(n);
    @(negedge clk) arr_start = 1'b1;
    @(negedge clk) arr_start = 1'b0;
    cyc = 1;
    got = 0;
    while (!arr_done && cyc < 20000) begin
      if (arr_iter_done) begin
        got++;
        arr_iters++;
        check_true($sformatf("arr iteration %0d ends at cycle %0d", got, cyc), cyc == ARR_PERIOD * got + 1);
        check_arr_iteration(got);
        if (got == 1) foreach (arr_y[k]) begin
          first_y[k] = to_real(arr_y[k]);
          arr_first_y[k] = to_real(arr_y[k]);
          arr_first_h[k] = to_real(arr_h[k]);
        end
        foreach (arr_y[k]) last_y[k] = to_real(arr_y[k]);
        for (int r = 0; r < int'(N_NEUR); r++)
          for (int c = 0; c < int'(N_NEUR); c++) begin
            pw_hid[r][c] = to_real(arr_w_hid[r][c]);
            pw_out[r][c] = to_real(arr_w_out[r][c]);
          end
      end
      if (poke_start && cyc == 25) begin
        arr_start = 1'b1;
        arr_ignored++;
      end else arr_start = 1'b0;
      @(negedge clk);
      cyc++;
    end
    arr_start = 1'b0;
    check_true($sformatf("arr done after %0d iterations at cycle %0d", got, cyc),
               arr_done && got == expect_iters && cyc == ARR_PERIOD * expect_iters + 2 && !arr_busy);
    check_true("arr iteration counter", arr_iter == 16'(expect_iters));
  endtask

  // Set both networks to the same initial weights.
  task automatic set_weights(input real hid [N_NEUR][N_IN], input real out [N_NEUR][N_NEUR]);
    for (int r = 0; r < int'(N_NEUR); r++)
      for (int c = 0; c < int'(N_NEUR); c++) begin
        net_w_ij_init[r][c] = to_fix(hid[r][c]);
        net_w_jk_init[r][c] = to_fix(out[r][c]);
        arr_w_hid_init[c][r] = to_fix(hid[r][c]);
        arr_w_out_init[c][r] = to_fix(out[r][c]);
      end
  endtask

  // Train both networks at once; compare their first forward passes.
  task automatic train_both(input int n, input int expect_iters, input bit poke_start,
                            output real nf [N_NEUR], output real nl [N_NEUR],
                            output real af [N_NEUR], output real al [N_NEUR]);
    fork
      run_net(n, expect_iters, poke_start, nf, nl);
      run_arr(n, expect_iters, poke_start, af, al);
    join
    foreach (nf[k]) begin
      check($sformatf("first hidden output %0d agrees", k), net_first_h[k], arr_first_h[k], 1e-6);
      check($sformatf("first output %0d agrees", k), net_first_o[k], arr_first_y[k], 1e-6);
    end
  endtask

  initial begin
    real nf [N_NEUR], nl [N_NEUR], af [N_NEUR], al [N_NEUR];
    real hid [N_NEUR][N_IN], out [N_NEUR][N_NEUR];
    real nerr0, nerr1, aerr0, aerr1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    alpha = to_fix(1.0);
    theta = to_fix(0.0);

    // 1. Small uniform operating point.
    foreach (x[i]) x[i] = to_fix(0.1);
    foreach (t[k]) t[k] = to_fix(0.101);
    foreach (hid[r, c]) hid[r][c] = 0.01;
    foreach (out[r, c]) out[r][c] = 0.01;
    set_weights(hid, out);
    train_both(4, 4, 1'b0, nf, nl, af, al);
    foreach (nf[k]) begin
      check("net first output 0.50501", nf[k], 0.50501, 2e-5);
      check_true($sformatf("net output %0d moved towards target", k), nl[k] < nf[k] && nl[k] > 0.101);
      check_true($sformatf("arr output %0d moved towards target", k), al[k] < af[k] && al[k] > 0.101);
    end
    // 2. Random pattern, long training, a start pulse to each while busy.
    foreach (x[i]) x[i] = to_fix(real'($urandom_range(0, 1000)) / 1000.0);
    foreach (t[k]) t[k] = to_fix(real'($urandom_range(100, 900)) / 1000.0);
    foreach (hid[r, c]) hid[r][c] = (real'($urandom_range(0, 1000)) - 500.0) / 1000.0;
    foreach (out[r, c]) out[r][c] = (real'($urandom_range(0, 1000)) - 500.0) / 1000.0;
    set_weights(hid, out);
    train_both(300, 300, 1'b1, nf, nl, af, al);
    nerr0 = 0.0;
    nerr1 = 0.0;
    aerr0 = 0.0;
    aerr1 = 0.0;
    foreach (nf[k]) begin
      nerr0 += (nf[k] - to_real(t[k])) ** 2;
      nerr1 += (nl[k] - to_real(t[k])) ** 2;
      aerr0 += (af[k] - to_real(t[k])) ** 2;
      aerr1 += (al[k] - to_real(t[k])) ** 2;
    end
    $display("squared output error, first / 300th iteration: net %f / %f, arr %f / %f",
             nerr0, nerr1, aerr0, aerr1);
    check_true("net training reduced the output error", nerr1 < 0.5 * nerr0);
    check_true("arr training reduced the output error", aerr1 < 0.5 * aerr0);
    // 3. Large weights: neuron inputs beyond the sigmoid table.
    foreach (x[i]) x[i] = to_fix(1.0);
    foreach (t[k]) t[k] = to_fix(0.5);
    foreach (hid[r, c]) hid[r][c] = 3.0;
    foreach (out[r, c]) out[r][c] = -2.5;
    set_weights(hid, out);
    train_both(3, 3, 1'b0, nf, nl, af, al);
    // 4. n_iter = 0 runs one iteration.
    train_both(0, 1, 1'b0, nf, nl, af, al);

    check_true($sformatf("net iterations %0d", net_iters), net_iters == 308);
    check_true($sformatf("net weight loads %0d", net_loads), net_loads == 4);
    check_true($sformatf("net weight transfers %0d", net_transfers), net_transfers == 308);
    check_true($sformatf("net join waits %0d", net_join_wait), net_join_wait > 0);
    check_true($sformatf("net clamped neuron inputs %0d", net_sat), net_sat > 0);
    check_true($sformatf("net ignored starts %0d", net_ignored), net_ignored == 1);
    check_true($sformatf("arr iterations %0d", arr_iters), arr_iters == 308);
    check_true($sformatf("arr weight loads %0d", arr_loads), arr_loads == 4);
    check_true($sformatf("arr phases %0d %0d %0d %0d %0d", arr_fwd_hid, arr_fwd_out, arr_bwd_out, arr_bwd_hid, arr_upd),
               arr_fwd_hid == 308 && arr_fwd_out == 308 && arr_bwd_out == 308 && arr_bwd_hid == 308 && arr_upd == 308);
    check_true($sformatf("arr clamped neuron inputs %0d", arr_sat), arr_sat > 0);
    check_true($sformatf("arr ignored starts %0d", arr_ignored), arr_ignored == 1);
    $display("mechanisms net: iterations=%0d loads=%0d transfers=%0d join_waits=%0d clamps=%0d ignored_starts=%0d",
             net_iters, net_loads, net_transfers, net_join_wait, net_sat, net_ignored);
    $display("mechanisms arr: iterations=%0d loads=%0d hidden_fwd=%0d output_fwd=%0d output_bwd=%0d hidden_bwd=%0d updates=%0d clamps=%0d ignored_starts=%0d",
             arr_iters, arr_loads, arr_fwd_hid, arr_fwd_out, arr_bwd_out, arr_bwd_hid, arr_upd, arr_sat, arr_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
