// tb_weight_update: self-checking test of weight_update.
// Checks dw[r][c] = w[r][c] - delta[r]*o[r] at the operating point of the
// original hidden-layer unit (delta = -0.00100992, o = 0.501, w = 0.01 gives
// 0.010506) and for random values, with learning rate 1 and, in a second
// instance, 1/4 (ETA_SHIFT = 2); and the one-cycle latency.
module tb_weight_update;
  import bp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done, done4;
  fix_t delta [N_NEUR];
  fix_t o [N_NEUR];
  fix_t w [N_NEUR][N_IN];
  fix_t dw [N_NEUR][N_IN];
  fix_t dw4 [N_NEUR][N_IN];
  int checks = 0, failures = 0;

  weight_update dut (.*);
  weight_update #(.ETA_SHIFT(2)) dut4 (.clk, .rst_n, .start, .delta, .o, .w, .dw(dw4), .done(done4));

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
    foreach (delta[r]) begin
      delta[r] = to_fix(-0.00100992);
      o[r] = to_fix(0.501);
    end
    foreach (w[r, c]) w[r][c] = to_fix(0.01);
    wait_done(1);
    foreach (dw[r, c]) check("dw = 0.010506", to_real(dw[r][c]), 0.010506, 1e-6);
    repeat (300) begin
      foreach (delta[r]) begin
        delta[r] = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
        o[r] = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      end
      foreach (w[r, c]) w[r][c] = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      wait_done(1);
      foreach (dw[r, c]) begin
        check($sformatf("dw[%0d][%0d]", r, c), to_real(dw[r][c]),
              to_real(w[r][c]) - to_real(delta[r]) * to_real(o[r]), 1e-7);
        check($sformatf("dw4[%0d][%0d]", r, c), to_real(dw4[r][c]),
              to_real(w[r][c]) - 0.25 * to_real(delta[r]) * to_real(o[r]), 1e-7);
      end
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
