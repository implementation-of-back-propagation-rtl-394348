// tb_error_genr_ip: self-checking test of error_genr_ip.
// Checks the operating point of the original model (d = 0.249999, weights
// 0.01, output deltas -0.100992 give errors -0.00403968 and deltas
// -0.00100992), then random values against e[j] = sum_k w[k][j]*delta_j[k]
// and delta_i[j] = e[j]*d_i[j], and the two-cycle latency.
module tb_error_genr_ip;
  import bp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  fix_t d_i [N_IN];
  fix_t w_jk [N_NEUR][N_IN];
  fix_t delta_j [N_NEUR];
  fix_t e [N_IN];
  fix_t delta_i [N_IN];
  int checks = 0, failures = 0;

  error_genr_ip dut (.*);

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
    real er;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (d_i[j]) d_i[j] = to_fix(0.249999);
    foreach (w_jk[k, j]) w_jk[k][j] = to_fix(0.01);
    foreach (delta_j[k]) delta_j[k] = to_fix(-0.100992);
    wait_done(2);
    foreach (e[j]) begin
      check("e = -0.00403968", to_real(e[j]), -0.00403968, 1e-7);
      check("delta_i = -0.00100992", to_real(delta_i[j]), -0.00100992, 1e-7);
    end
    repeat (300) begin
      foreach (d_i[j]) d_i[j] = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      foreach (w_jk[k, j]) w_jk[k][j] = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      foreach (delta_j[k]) delta_j[k] = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      wait_done(2);
      foreach (e[j]) begin
        er = 0.0;
        foreach (delta_j[k]) er += to_real(w_jk[k][j]) * to_real(delta_j[k]);
        check($sformatf("e[%0d]", j), to_real(e[j]), er, 4e-7);
        check($sformatf("delta_i[%0d]", j), to_real(delta_i[j]), er * to_real(d_i[j]), 6e-7);
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
