// tb_synapse: self-checking test of synapse.
// Checks the two operating points printed for the original model (weights
// 0.01 with inputs 0.1 and 0.501) and 200 random cases against a real-number
// model, and that done follows start by exactly one cycle.
module tb_synapse;
  import bp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  fix_t x [N_IN];
  fix_t w [N_NEUR][N_IN];
  fix_t s [N_NEUR];
  fix_t m [N_NEUR][N_IN];
  int checks = 0, failures = 0;

  synapse dut (.*);

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

  task automatic run_and_check(real xr [N_IN], real wr [N_NEUR][N_IN], real tol);
    int lat;
    real sum;
    for (int c = 0; c < int'(N_IN); c++) x[c] = to_fix(xr[c]);
    for (int r = 0; r < int'(N_NEUR); r++)
      for (int c = 0; c < int'(N_IN); c++) w[r][c] = to_fix(wr[r][c]);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    while (!done && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 1) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
    for (int r = 0; r < int'(N_NEUR); r++) begin
      sum = 0.0;
      for (int c = 0; c < int'(N_IN); c++) begin
        sum += to_real(w[r][c]) * to_real(x[c]);
        check($sformatf("m[%0d][%0d]", r, c), to_real(m[r][c]), to_real(w[r][c]) * to_real(x[c]), tol);
      end
      check($sformatf("s[%0d]", r), to_real(s[r]), sum, 4 * tol);
    end
  endtask

  initial begin
    real xr [N_IN];
    real wr [N_NEUR][N_IN];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Operating points of the original model.
    foreach (wr[r, c]) wr[r][c] = 0.01;
    foreach (xr[c]) xr[c] = 0.1;
    run_and_check(xr, wr, 1e-7);
    check("s1 = 0.004", to_real(s[0]), 0.004, 1e-6);
    check("m11 = 0.001", to_real(m[0][0]), 0.001, 1e-6);
    foreach (xr[c]) xr[c] = 0.501;
    run_and_check(xr, wr, 1e-7);
    check("s1 = 0.02004", to_real(s[0]), 0.02004, 1e-6);
    check("m11 = 0.00501", to_real(m[0][0]), 0.00501, 1e-6);
    // Distinct values: each output must use its own row of weights.
    foreach (wr[r, c]) wr[r][c] = 0.1 * r + 0.01 * c - 0.2;
    foreach (xr[c]) xr[c] = 0.25 * (c + 1);
    run_and_check(xr, wr, 1e-7);
    // Random cases.
    repeat (200) begin
      foreach (wr[r, c]) wr[r][c] = (real'($urandom_range(0, 4000)) - 2000.0) / 1000.0;
      foreach (xr[c]) xr[c] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
      run_and_check(xr, wr, 1e-7);
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
