// tb_error_genr_op: self-checking test of error_genr_op.
// Checks delta = (o - t) * d at the operating point of the original model
// (o = 0.50501, d = 0.249975, t = 0.101, |delta| = 0.100992) and for random
// values, and the one-cycle latency.
module tb_error_genr_op;
  import bp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  fix_t o [N_NEUR];
  fix_t d [N_NEUR];
  fix_t t [N_NEUR];
  fix_t delta [N_NEUR];
  int checks = 0, failures = 0;

  error_genr_op dut (.*);

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

  task automatic wait_done(int expect_lat);
    int lat;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    while (!done && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != expect_lat) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, expect_lat);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (o[k]) begin
      o[k] = to_fix(0.50501);
      d[k] = to_fix(0.249975);
      t[k] = to_fix(0.101);
    end
    wait_done(1);
    foreach (delta[k]) check("delta = 0.100992", to_real(delta[k]), 0.100992, 2e-6);
    repeat (300) begin
      foreach (o[k]) begin
        o[k] = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
        d[k] = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
        t[k] = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      end
      wait_done(1);
      foreach (delta[k])
        check($sformatf("delta[%0d]", k), to_real(delta[k]),
              (to_real(o[k]) - to_real(t[k])) * to_real(d[k]), 1e-7);
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
