// tb_bp_network: end-to-end test of the training network at its default
// parameters.
//
// Every iteration is checked against a real-number model of the same
// algorithm (sigmoid with $exp), started from the weights the network held at
// the beginning of that iteration: sums, activations, derivatives, deltas,
// back-propagated errors and all 32 new weights. Trainings run:
//   1. the operating point of the original design (inputs 0.1, targets 0.101,
//      all weights 0.01, gain 1, threshold 0), four iterations, with the
//      printed first-iteration values checked and the outputs required to
//      move towards the target every iteration;
//   2. a random pattern trained for 300 iterations, the output error required
//      to shrink; a second start pulse during it must be ignored;
//   3. a pattern with large weights, so that neuron inputs leave the sigmoid
//      table and are clamped;
//   4. n_iter = 0, which runs one iteration.
// The iteration period (14 cycles) is checked, and the testbench counts how
// often each mechanism occurred: iterations, weight loads, weight transfers,
// the join waiting for the hidden-layer update, clamping, ignored starts;
// one that never occurred is a failure.
module tb_bp_network;
  import bp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] n_iter;
  fix_t alpha, theta;
  fix_t x [N_IN];
  fix_t t [N_NEUR];
  fix_t w_ij_init [N_NEUR][N_IN];
  fix_t w_jk_init [N_NEUR][N_NEUR];
  fix_t mi [N_NEUR][N_IN];
  fix_t si [N_NEUR], oi [N_NEUR], di [N_NEUR];
  fix_t mj [N_NEUR][N_NEUR];
  fix_t sj [N_NEUR], oj [N_NEUR], dj [N_NEUR];
  fix_t delta_j [N_NEUR], delta_i [N_NEUR], error_i [N_NEUR];
  fix_t w_ij [N_NEUR][N_IN];
  fix_t w_jk [N_NEUR][N_NEUR];
  logic [N_NEUR-1:0] sat_i, sat_j;
  logic busy, iter_done, done;
  logic [15:0] iter;

  int checks = 0, failures = 0;
  int n_iters = 0, n_loads = 0, n_transfers = 0, n_join_wait = 0, n_sat = 0, n_ignored = 0;

  bp_network dut (.*);

  always #5 clk = ~clk;

  // Mechanism counters, from the network's internal control signals.
  always @(posedge clk) if (rst_n) begin
    if (dut.load) n_loads++;
    if (dut.wu_start) n_transfers++;
    if (dut.w1_fin && !dut.wu_start) n_join_wait++;
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
  real pw_ij [N_NEUR][N_IN];
  real pw_jk [N_NEUR][N_NEUR];

  // Check one finished iteration against the real-number model.
  task automatic check_iteration(int it);
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
      check($sformatf("it%0d si[%0d]", it, n), to_real(si[n]), rsi[n], 1e-5);
      check($sformatf("it%0d oi[%0d]", it, n), to_real(oi[n]), roi[n], 1e-4);
      check($sformatf("it%0d di[%0d]", it, n), to_real(di[n]), rdi[n], 1e-4);
      check($sformatf("it%0d sj[%0d]", it, n), to_real(sj[n]), rsj[n], 1e-4);
      check($sformatf("it%0d oj[%0d]", it, n), to_real(oj[n]), roj[n], 2e-4);
      check($sformatf("it%0d dj[%0d]", it, n), to_real(dj[n]), rdj[n], 2e-4);
      check($sformatf("it%0d delta_j[%0d]", it, n), to_real(delta_j[n]), rdelj[n], 2e-4);
      check($sformatf("it%0d error_i[%0d]", it, n), to_real(error_i[n]), re[n], 5e-4);
      check($sformatf("it%0d delta_i[%0d]", it, n), to_real(delta_i[n]), rdeli[n], 5e-4);
      if (sat_i[n] || sat_j[n]) n_sat++;
    end
    for (int r = 0; r < int'(N_NEUR); r++)
      for (int c = 0; c < int'(N_NEUR); c++) begin
        check($sformatf("it%0d w_jk[%0d][%0d]", it, r, c), to_real(w_jk[r][c]),
              pw_jk[r][c] - rdelj[r] * roj[r], 3e-4);
        check($sformatf("it%0d w_ij[%0d][%0d]", it, r, c), to_real(w_ij[r][c]),
              pw_ij[r][c] - rdeli[r] * roi[r], 3e-4);
      end
  endtask

  // Run one training; returns the output values of the first and last iteration.
  task automatic train(input int n, input int expect_iters, input bit poke_start,
                       output real first_oj [N_NEUR], output real last_oj [N_NEUR]);
    int cyc, got_iters;
    n_iter = 16'(n);
    for (int r = 0; r < int'(N_NEUR); r++)
      for (int c = 0; c < int'(N_NEUR); c++) begin
        pw_ij[r][c] = to_real(w_ij_init[r][c]);
        pw_jk[r][c] = to_real(w_jk_init[r][c]);
      end
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    got_iters = 0;
    while (!done && cyc < 20000) begin
      if (iter_done) begin
        got_iters++;
        n_iters++;
        check_true($sformatf("iteration %0d ends at cycle %0d, expected %0d", got_iters, cyc, 14 * got_iters + 1),
                   cyc == 14 * got_iters + 1);
        check_iteration(got_iters);
        if (n <= 4) $display("iteration %0d: oj[0] = %f  w_jk[0][0] = %f  w_ij[0][0] = %f",
                             got_iters, to_real(oj[0]), to_real(w_jk[0][0]), to_real(w_ij[0][0]));
        if (got_iters == 1) foreach (oj[k]) first_oj[k] = to_real(oj[k]);
        foreach (oj[k]) last_oj[k] = to_real(oj[k]);
        for (int r = 0; r < int'(N_NEUR); r++)
          for (int c = 0; c < int'(N_NEUR); c++) begin
            pw_ij[r][c] = to_real(w_ij[r][c]);
            pw_jk[r][c] = to_real(w_jk[r][c]);
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
               done && got_iters == expect_iters && cyc == 14 * expect_iters + 2 && !busy);
    check_true("iteration counter", iter == 16'(expect_iters));
  endtask

  initial begin
    real f [N_NEUR], l [N_NEUR];
    real err0, err1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    alpha = to_fix(1.0);
    theta = to_fix(0.0);

    // 1. Operating point of the original design.
    foreach (x[i]) x[i] = to_fix(0.1);
    foreach (t[k]) t[k] = to_fix(0.101);
    foreach (w_ij_init[r, c]) w_ij_init[r][c] = to_fix(0.01);
    foreach (w_jk_init[r, c]) w_jk_init[r][c] = to_fix(0.01);
    train(4, 4, 1'b0, f, l);
    foreach (f[k]) check_true($sformatf("output %0d moved towards target", k), l[k] < f[k] && l[k] > 0.101);
    // 2. Random pattern, long training, a start pulse while busy.
    foreach (x[i]) x[i] = to_fix(real'($urandom_range(0, 1000)) / 1000.0);
    foreach (t[k]) t[k] = to_fix(real'($urandom_range(100, 900)) / 1000.0);
    foreach (w_ij_init[r, c]) w_ij_init[r][c] = to_fix((real'($urandom_range(0, 1000)) - 500.0) / 1000.0);
    foreach (w_jk_init[r, c]) w_jk_init[r][c] = to_fix((real'($urandom_range(0, 1000)) - 500.0) / 1000.0);
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
    foreach (w_ij_init[r, c]) w_ij_init[r][c] = to_fix(3.0);
    foreach (w_jk_init[r, c]) w_jk_init[r][c] = to_fix(-2.5);
    train(3, 3, 1'b0, f, l);
    // 4. n_iter = 0 runs one iteration.
    train(0, 1, 1'b0, f, l);

    check_true($sformatf("iterations %0d", n_iters), n_iters == 308);
    check_true($sformatf("weight loads %0d", n_loads), n_loads == 4);
    check_true($sformatf("weight transfers %0d", n_transfers), n_transfers == 308);
    check_true($sformatf("join waits %0d", n_join_wait), n_join_wait > 0);
    check_true($sformatf("clamped neuron inputs %0d", n_sat), n_sat > 0);
    check_true($sformatf("ignored starts %0d", n_ignored), n_ignored == 1);
    $display("mechanisms: iterations=%0d loads=%0d transfers=%0d join_waits=%0d clamps=%0d ignored_starts=%0d",
             n_iters, n_loads, n_transfers, n_join_wait, n_sat, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Printed first-iteration values of the original design.
  initial begin
    @(posedge rst_n);
    @(posedge iter_done);
    @(negedge clk);
    foreach (si[n]) begin
      check("si = 0.004", to_real(si[n]), 0.004, 1e-6);
      check("oi = 0.501", to_real(oi[n]), 0.501, 5e-4);
      check("di = 0.249999", to_real(di[n]), 0.249999, 2e-6);
      check("sj = 0.02004", to_real(sj[n]), 0.02004, 2e-5);
      check("oj = 0.50501", to_real(oj[n]), 0.50501, 2e-5);
      check("dj = 0.249975", to_real(dj[n]), 0.249975, 2e-6);
      check("error_i = 4 * 0.01 * delta_j", to_real(error_i[n]), 0.04 * to_real(delta_j[n]), 1e-6);
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
