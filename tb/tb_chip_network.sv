// tb_chip_network: end-to-end test of the two-unit expandable network at its
// default parameters.
//
// Every iteration is checked against a real-number model of textbook
// back-propagation (sigmoid with $exp, derivative x(1-x), output delta
// (t-y)y(1-y), back-propagated error through the output weights before their
// update, every weight moved by source activation x delta), started from the
// weights the network held at the beginning of that iteration: column sums,
// hidden and output activations, both sets of deltas, the errors sent back,
// and all 32 new weights. Trainings run:
//   1. inputs 0.1, targets 0.101, all weights 0.01, gain 1, threshold 0,
//      four iterations; the outputs must move towards the target;
//   2. a random pattern trained for 300 iterations, the output error required
//      to shrink; a second start pulse during it must be ignored;
//   3. large weights, so that neuron inputs leave the sigmoid table;
//   4. n_iter = 0, which runs one iteration.
// The iteration period (16 cycles) is checked, and the testbench counts how
// often each mechanism occurred: iterations, weight loads, the five phases,
// hidden-mode and output-mode error generation, clamping and ignored starts;
// one that never occurred is a failure.
module tb_chip_network;
  import bp_pkg::*;

  localparam int PERIOD = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] n_iter;
  fix_t alpha, theta;
  fix_t x [N_IN];
  fix_t t [N_NEUR];
  fix_t w_hid_init [N_IN][N_NEUR];
  fix_t w_out_init [N_NEUR][N_NEUR];
  fix_t h [N_NEUR], y [N_NEUR], s_hid [N_NEUR], s_out [N_NEUR];
  fix_t del_hid [N_NEUR], del_out [N_NEUR], e_hid [N_NEUR];
  fix_t e_in_side [N_IN];
  fix_t w_hid [N_IN][N_NEUR];
  fix_t w_out [N_NEUR][N_NEUR];
  logic [N_NEUR-1:0] sat_hid, sat_out;
  logic busy, iter_done, done;
  logic [15:0] iter;

  int checks = 0, failures = 0;
  int n_iters = 0, n_loads = 0, n_fwd_hid = 0, n_fwd_out = 0, n_bwd_out = 0, n_bwd_hid = 0;
  int n_upd = 0, n_sat = 0, n_ignored = 0;

  chip_network dut (.*);

  always #5 clk = ~clk;

  // Mechanism counters, from the network's internal control signals.
  always @(posedge clk) if (rst_n) begin
    if (dut.load) n_loads++;
    if (dut.fwd_hid_start) n_fwd_hid++;
    if (dut.fwd_out_start) n_fwd_out++;
    if (dut.bwd_out_start) n_bwd_out++;
    if (dut.bwd_hid_start) n_bwd_hid++;
    if (dut.upd_start) n_upd++;
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

  // Weights at the start of the current iteration.
  real pw_hid [N_IN][N_NEUR];
  real pw_out [N_NEUR][N_NEUR];

  task automatic check_iteration(int it);
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
      check($sformatf("it%0d s_hid[%0d]", it, n), to_real(s_hid[n]), rsh[n], 1e-5);
      check($sformatf("it%0d h[%0d]", it, n), to_real(h[n]), rh[n], 1e-4);
      check($sformatf("it%0d s_out[%0d]", it, n), to_real(s_out[n]), rso[n], 1e-4);
      check($sformatf("it%0d y[%0d]", it, n), to_real(y[n]), ry[n], 2e-4);
      check($sformatf("it%0d del_out[%0d]", it, n), to_real(del_out[n]), rdo[n], 2e-4);
      check($sformatf("it%0d e_hid[%0d]", it, n), to_real(e_hid[n]), re[n], 5e-4);
      check($sformatf("it%0d del_hid[%0d]", it, n), to_real(del_hid[n]), rdh[n], 5e-4);
      if (sat_hid[n] || sat_out[n]) n_sat++;
    end
    for (int i = 0; i < int'(N_IN); i++) begin
      rei = 0.0;
      for (int j = 0; j < int'(N_NEUR); j++) rei += pw_hid[i][j] * rdh[j];
      check($sformatf("it%0d e_in_side[%0d]", it, i), to_real(e_in_side[i]), rei, 5e-4);
    end
    for (int r = 0; r < int'(N_NEUR); r++)
      for (int c = 0; c < int'(N_NEUR); c++) begin
        check($sformatf("it%0d w_out[%0d][%0d]", it, r, c), to_real(w_out[r][c]),
              pw_out[r][c] + rh[r] * rdo[c], 3e-4);
        check($sformatf("it%0d w_hid[%0d][%0d]", it, r, c), to_real(w_hid[r][c]),
              pw_hid[r][c] + to_real(x[r]) * rdh[c], 3e-4);
      end
  endtask

  // Run one training; returns the outputs of the first and last iteration.
  task automatic train(input int n, input int expect_iters, input bit poke_start,
                       output real first_y [N_NEUR], output real last_y [N_NEUR]);
    int cyc, got_iters;
    n_iter = 16'(n);
    for (int r = 0; r < int'(N_NEUR); r++)
      for (int c = 0; c < int'(N_NEUR); c++) begin
        pw_hid[r][c] = to_real(w_hid_init[r][c]);
        pw_out[r][c] = to_real(w_out_init[r][c]);
      end
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    got_iters = 0;
    while (!done && cyc < 20000) begin
      if (iter_done) begin
        got_iters++;
        n_iters++;
        check_true($sformatf("iteration %0d ends at cycle %0d, expected %0d", got_iters, cyc,
                             PERIOD * got_iters + 1), cyc == PERIOD * got_iters + 1);
        check_iteration(got_iters);
        if (n <= 4) $display("iteration %0d: y[0] = %f  w_out[0][0] = %f  w_hid[0][0] = %f",
                             got_iters, to_real(y[0]), to_real(w_out[0][0]), to_real(w_hid[0][0]));
        if (got_iters == 1) foreach (y[k]) first_y[k] = to_real(y[k]);
        foreach (y[k]) last_y[k] = to_real(y[k]);
        for (int r = 0; r < int'(N_NEUR); r++)
          for (int c = 0; c < int'(N_NEUR); c++) begin
            pw_hid[r][c] = to_real(w_hid[r][c]);
            pw_out[r][c] = to_real(w_out[r][c]);
          end
      end
      if (poke_start && cyc == 20) begin
        start = 1'b1;
        n_ignored++;
      end else start = 1'b0;
      @(negedge clk);
      cyc++;
    end
    start = 1'b0;
    check_true($sformatf("done after %0d iterations at cycle %0d", got_iters, cyc),
               done && got_iters == expect_iters && cyc == PERIOD * expect_iters + 2 && !busy);
    check_true("iteration counter", iter == 16'(expect_iters));
  endtask

  initial begin
    real f [N_NEUR], l [N_NEUR];
    real err0, err1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    alpha = to_fix(1.0);
    theta = to_fix(0.0);

    // 1. Small uniform operating point.
    foreach (x[i]) x[i] = to_fix(0.1);
    foreach (t[k]) t[k] = to_fix(0.101);
    foreach (w_hid_init[r, c]) w_hid_init[r][c] = to_fix(0.01);
    foreach (w_out_init[r, c]) w_out_init[r][c] = to_fix(0.01);
    train(4, 4, 1'b0, f, l);
    foreach (f[k]) check_true($sformatf("output %0d moved towards target", k), l[k] < f[k] && l[k] > 0.101);
    // 2. Random pattern, long training, a start pulse while busy.
    foreach (x[i]) x[i] = to_fix(real'($urandom_range(0, 1000)) / 1000.0);
    foreach (t[k]) t[k] = to_fix(real'($urandom_range(100, 900)) / 1000.0);
    foreach (w_hid_init[r, c]) w_hid_init[r][c] = to_fix((real'($urandom_range(0, 1000)) - 500.0) / 1000.0);
    foreach (w_out_init[r, c]) w_out_init[r][c] = to_fix((real'($urandom_range(0, 1000)) - 500.0) / 1000.0);
    train(300, 300, 1'b1, f, l);
    err0 = 0.0;
    err1 = 0.0;
    foreach (f[k]) begin
      err0 += (f[k] - to_real(t[k])) ** 2;
      err1 += (l[k] - to_real(t[k])) ** 2;
    end
    $display("squared output error: first iteration %f, iteration 300 %f", err0, err1);
    check_true("training reduced the output error", err1 < 0.5 * err0);
    // 3. Large weights: neuron inputs beyond the sigmoid table.
    foreach (x[i]) x[i] = to_fix(1.0);
    foreach (t[k]) t[k] = to_fix(0.5);
    foreach (w_hid_init[r, c]) w_hid_init[r][c] = to_fix(3.0);
    foreach (w_out_init[r, c]) w_out_init[r][c] = to_fix(-2.5);
    train(3, 3, 1'b0, f, l);
    // 4. n_iter = 0 runs one iteration.
    train(0, 1, 1'b0, f, l);

    check_true($sformatf("iterations %0d", n_iters), n_iters == 308);
    check_true($sformatf("weight loads %0d", n_loads), n_loads == 4);
    check_true($sformatf("phases %0d %0d %0d %0d %0d", n_fwd_hid, n_fwd_out, n_bwd_out, n_bwd_hid, n_upd),
               n_fwd_hid == 308 && n_fwd_out == 308 && n_bwd_out == 308 && n_bwd_hid == 308 && n_upd == 308);
    check_true($sformatf("clamped neuron inputs %0d", n_sat), n_sat > 0);
    check_true($sformatf("ignored starts %0d", n_ignored), n_ignored == 1);
    $display("mechanisms: iterations=%0d loads=%0d hidden_fwd=%0d output_fwd=%0d output_bwd=%0d hidden_bwd=%0d updates=%0d clamps=%0d ignored_starts=%0d",
             n_iters, n_loads, n_fwd_hid, n_fwd_out, n_bwd_out, n_bwd_hid, n_upd, n_sat, n_ignored);
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
