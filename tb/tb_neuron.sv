// tb_neuron: self-checking test of neuron.
// Checks the operating points printed for the original model (s = 0.004 and
// 0.02004 with gain 1 and threshold 0), then random inputs, gains and
// thresholds against 1/(1+exp(-alpha*(s+theta))) computed with $exp, the
// derivative o*(1-o), the clamp flag outside [-8, 8), and the three-cycle
// latency.
module tb_neuron;
  import bp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  fix_t alpha, theta;
  fix_t s [N_NEUR];
  fix_t o [N_NEUR];
  fix_t d [N_NEUR];
  logic [N_NEUR-1:0] sat;
  int checks = 0, failures = 0;
  int n_sat = 0;

  neuron dut (.*);

  always #5 clk = ~clk;

  function automatic fix_t to_fix(real r);
    return fix_t'(longint'(r * (2.0 ** FRAC_W)));
  endfunction
  function automatic real to_real(fix_t f);
    return real'(f) / (2.0 ** FRAC_W);
  endfunction

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic run_and_check(real sr [N_NEUR], real ar, real tr);
    int lat;
    real z, ref_o;
    alpha = to_fix(ar);
    theta = to_fix(tr);
    for (int k = 0; k < int'(N_NEUR); k++) s[k] = to_fix(sr[k]);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    while (!done && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 3) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    for (int k = 0; k < int'(N_NEUR); k++) begin
      z = to_real(alpha) * (to_real(s[k]) + to_real(theta));
      if (z < -8.0) z = -8.0;
      if (z > 8.0) z = 8.0;
      ref_o = 1.0 / (1.0 + $exp(-z));
      check($sformatf("o[%0d] z=%f", k, z), to_real(o[k]), ref_o, 3e-5);
      check($sformatf("d[%0d]", k), to_real(d[k]), to_real(o[k]) * (1.0 - to_real(o[k])), 1e-6);
      checks++;
      if (sat[k] != (z <= -8.0 || z >= 8.0 - 1e-6)) begin
        failures++;
        $display("FAIL sat[%0d] z=%f", k, z);
      end
      if (sat[k]) n_sat++;
    end
  endtask

  initial begin
    real sr [N_NEUR];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (sr[k]) sr[k] = 0.004;
    run_and_check(sr, 1.0, 0.0);
    check("o = 0.501", to_real(o[0]), 0.501, 5e-4);
    check("d = 0.249999", to_real(d[0]), 0.249999, 2e-6);
    foreach (sr[k]) sr[k] = 0.02004;
    run_and_check(sr, 1.0, 0.0);
    check("o = 0.50501", to_real(o[0]), 0.50501, 5e-6);
    check("d = 0.249975", to_real(d[0]), 0.249975, 2e-6);
    // Distinct lanes, including both saturation sides.
    sr[0] = -12.0; sr[1] = -1.5; sr[2] = 2.75; sr[3] = 30.0;
    run_and_check(sr, 1.0, 0.0);
    // Random sums, gains and thresholds.
    repeat (300) begin
      foreach (sr[k]) sr[k] = (real'($urandom_range(0, 24000)) - 12000.0) / 1000.0;
      run_and_check(sr, real'($urandom_range(250, 3000)) / 1000.0,
                    (real'($urandom_range(0, 4000)) - 2000.0) / 1000.0);
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL clamping never exercised");
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
