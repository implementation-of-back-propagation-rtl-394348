// tb_chip_error_gen: self-checking test of chip_error_gen.
// In output mode (c = 1) delta = (t - x)*(x1 - x2); in hidden mode (c = 0)
// delta = eps*(x1 - x2). Checks both against real arithmetic, with the
// operating point x = 0.50501, x1 - x2 = 0.249975, t = 0.101 (delta
// -0.100992), and the one-cycle latency.
module tb_chip_error_gen;
  import bp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done, c;
  fix_t t_eps, x, x1, x2, delta;
  int checks = 0, failures = 0, n_out = 0, n_hid = 0;

  chip_error_gen dut (.*);

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

  task automatic run();
    real e;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL latency");
    end
    e = c ? (to_real(t_eps) - to_real(x)) : to_real(t_eps);
    check(c ? "delta (target)" : "delta (error)", to_real(delta), e * (to_real(x1) - to_real(x2)), 1e-7);
    if (c) n_out++;
    else n_hid++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    c = 1'b1;
    t_eps = to_fix(0.101);
    x = to_fix(0.50501);
    x1 = to_fix(0.50501);
    x2 = to_fix(0.50501 - 0.249975);
    run();
    check("delta = -0.100992", to_real(delta), -0.100992, 2e-6);
    c = 1'b0;
    t_eps = to_fix(-0.00403968);
    x1 = to_fix(0.501);
    x2 = to_fix(0.501 - 0.249999);
    run();
    check("delta = -0.00100992", to_real(delta), -0.00100992, 1e-7);
    repeat (400) begin
      c = 1'($urandom);
      t_eps = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      x = to_fix(real'($urandom_range(0, 1000)) / 1000.0);
      x1 = to_fix(real'($urandom_range(0, 1000)) / 1000.0);
      x2 = to_fix(real'($urandom_range(0, 1000)) / 1000.0);
      run();
    end
    checks++;
    if (n_out == 0 || n_hid == 0) begin
      failures++;
      $display("FAIL a mode was never used");
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
