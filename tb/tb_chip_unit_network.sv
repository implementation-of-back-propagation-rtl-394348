// tb_chip_unit_network: self-checking test of one expandable unit network.
// Loads random weights, then for random inputs runs the three phases and
// checks against real arithmetic: column sums and neuron outputs (forward),
// per-column deltas with a random mix of output (target) and hidden (error)
// columns and the row error sums (backward), and every weight after the
// update w[i][j] + x[i]*del[j]. The phase latencies 3, 2 and 1 are checked.
module tb_chip_unit_network;
  import bp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic fwd_start = 1'b0, bwd_start = 1'b0, upd_start = 1'b0;
  logic fwd_done, bwd_done, upd_done;
  fix_t w_init [N_IN][N_NEUR];
  fix_t alpha, theta;
  logic [N_NEUR-1:0] cfg, sat;
  fix_t x_in [N_IN];
  fix_t t_e_in [N_NEUR];
  fix_t x_out [N_NEUR];
  fix_t e_out [N_IN];
  fix_t del [N_NEUR];
  fix_t mul [N_NEUR];
  fix_t w [N_IN][N_NEUR];
  int checks = 0, failures = 0, n_out_cols = 0, n_hid_cols = 0;

  chip_unit_network dut (.*);

  always #5 clk = ~clk;

  function automatic fix_t to_fix(real r);
    return fix_t'(longint'(r * (2.0 ** FRAC_W)));
  endfunction
  function automatic real to_real(fix_t f);
    return real'(f) / (2.0 ** FRAC_W);
  endfunction
  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0;
  endfunction
  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic pulse_and_wait(ref logic go, ref logic fin, input int expect_lat, input string what);
    int lat;
    @(negedge clk) go = 1'b1;
    @(negedge clk) go = 1'b0;
    lat = 1;
    while (!fin && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != expect_lat) begin
      failures++;
      $display("FAIL %s latency %0d, expected %0d", what, lat, expect_lat);
    end
  endtask

  initial begin
    real rs [N_NEUR], rx [N_NEUR], rd [N_NEUR], re [N_IN], wold [N_IN][N_NEUR], z;
    x_in = '{default: '0};
    t_e_in = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    alpha = to_fix(1.0);
    theta = to_fix(0.0);
    repeat (100) begin
      foreach (w_init[i, j]) w_init[i][j] = to_fix(rnd(-1.0, 1.0));
      @(negedge clk) load = 1'b1;
      @(negedge clk) load = 1'b0;
      foreach (w[i, j]) check("load", to_real(w[i][j]), to_real(w_init[i][j]), 1e-9);
      foreach (x_in[i]) x_in[i] = to_fix(rnd(0.0, 1.0));
      // Forward.
      pulse_and_wait(fwd_start, fwd_done, 3, "forward");
      foreach (rs[j]) begin
        rs[j] = 0.0;
        foreach (x_in[i]) rs[j] += to_real(w[i][j]) * to_real(x_in[i]);
        z = rs[j];
        rx[j] = 1.0 / (1.0 + $exp(-z));
        check("mul", to_real(mul[j]), rs[j], 1e-6);
        check("x_out", to_real(x_out[j]), rx[j], 4e-5);
      end
      // Backward.
      cfg = N_NEUR'($urandom);
      foreach (t_e_in[j]) t_e_in[j] = to_fix(cfg[j] ? rnd(0.0, 1.0) : rnd(-0.5, 0.5));
      pulse_and_wait(bwd_start, bwd_done, 2, "backward");
      foreach (rd[j]) begin
        rd[j] = (cfg[j] ? to_real(t_e_in[j]) - to_real(x_out[j]) : to_real(t_e_in[j]))
              * to_real(x_out[j]) * (1.0 - to_real(x_out[j]));
        check("del", to_real(del[j]), rd[j], 1e-6);
        if (cfg[j]) n_out_cols++;
        else n_hid_cols++;
      end
      foreach (re[i]) begin
        re[i] = 0.0;
        foreach (rd[j]) re[i] += to_real(w[i][j]) * to_real(del[j]);
        check("e_out", to_real(e_out[i]), re[i], 1e-6);
      end
      // Update.
      foreach (wold[i, j]) wold[i][j] = to_real(w[i][j]);
      pulse_and_wait(upd_start, upd_done, 1, "update");
      foreach (w[i, j]) check("w", to_real(w[i][j]), wold[i][j] + to_real(x_in[i]) * to_real(del[j]), 1e-6);
    end
    checks++;
    if (n_out_cols == 0 || n_hid_cols == 0) begin
      failures++;
      $display("FAIL a column mode was never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
