// tb_chip_neuron: self-checking test of chip_neuron.
// Checks x = 1/(1+exp(-alpha*(s+theta))) against $exp, x1 = x, x2 = x*x (so
// x1 - x2 = x(1-x)), the clamp flag, and the three-cycle latency, for the
// published operating point s = 0.004 (x = 0.501, derivative 0.249999) and
// random inputs.
module tb_chip_neuron;
  import bp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done, sat;
  fix_t alpha, theta, s, x, x1, x2;
  int checks = 0, failures = 0, n_sat = 0;

  chip_neuron dut (.*);

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

  task automatic run(real sr, real ar, real tr);
    int lat;
    real z, rx;
    s = to_fix(sr);
    alpha = to_fix(ar);
    theta = to_fix(tr);
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
    z = to_real(alpha) * (to_real(s) + to_real(theta));
    checks++;
    if (sat != (z <= -8.0 || z >= 8.0 - 1e-6)) begin
      failures++;
      $display("FAIL sat z=%f", z);
    end
    if (sat) n_sat++;
    if (z < -8.0) z = -8.0;
    if (z > 8.0) z = 8.0;
    rx = 1.0 / (1.0 + $exp(-z));
    check("x", to_real(x), rx, 3e-5);
    check("x1", to_real(x1), to_real(x), 1e-9);
    check("x1 - x2", to_real(x1) - to_real(x2), to_real(x) * (1.0 - to_real(x)), 1e-7);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0.004, 1.0, 0.0);
    check("x = 0.501", to_real(x), 0.501, 5e-4);
    check("x1 - x2 = 0.249999", to_real(x1) - to_real(x2), 0.249999, 2e-6);
    run(-20.0, 1.0, 0.0);
    run(20.0, 1.0, 0.0);
    repeat (300)
      run((real'($urandom_range(0, 24000)) - 12000.0) / 1000.0,
          real'($urandom_range(250, 3000)) / 1000.0,
          (real'($urandom_range(0, 4000)) - 2000.0) / 1000.0);
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
