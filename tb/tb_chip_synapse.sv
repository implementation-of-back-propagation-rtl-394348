// tb_chip_synapse: self-checking test of chip_synapse.
// Checks the combinational products m = w*x and eps_out = w*delta, the load,
// the hold without upd, and the weight update w + x*delta (learning rate 1,
// and 1/2 in a second cell with ETA_SHIFT = 1) against real arithmetic.
module tb_chip_synapse;
  import bp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, upd = 1'b0;
  fix_t w_init, x, delta, w, m, eps_out, w2, m2, eps2;
  int checks = 0, failures = 0;

  chip_synapse dut (.*);
  chip_synapse #(.ETA_SHIFT(1)) dut2 (.clk, .rst_n, .load, .w_init, .upd, .x, .delta,
                                      .w(w2), .m(m2), .eps_out(eps2));

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

  initial begin
    real w_before, w2_before;
    x = '0;
    delta = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    w_init = to_fix(0.01);
    load = 1'b1;
    @(negedge clk) load = 1'b0;
    check("load", to_real(w), 0.01, 1e-7);
    x = to_fix(0.1);
    delta = to_fix(-0.5);
    #1 check("m = 0.001", to_real(m), 0.001, 1e-7);
    check("eps_out = -0.005", to_real(eps_out), -0.005, 1e-7);
    repeat (300) begin
      x = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      delta = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      #1;
      check("m", to_real(m), to_real(w) * to_real(x), 1e-7);
      check("eps_out", to_real(eps_out), to_real(w) * to_real(delta), 1e-7);
      w_before = to_real(w);
      w2_before = to_real(w2);
      @(negedge clk);
      check("hold", to_real(w), w_before, 1e-9);
      upd = 1'b1;
      @(negedge clk) upd = 1'b0;
      check("update", to_real(w), w_before + to_real(x) * to_real(delta), 1e-7);
      check("update eta 1/2", to_real(w2), w2_before + 0.5 * to_real(x) * to_real(delta), 1e-7);
      if (to_real(w) > 20.0 || to_real(w) < -20.0) begin
        w_init = to_fix(0.0);
        load = 1'b1;
        @(negedge clk) load = 1'b0;
      end
    end
    // load wins over upd.
    w_init = to_fix(0.25);
    load = 1'b1;
    upd = 1'b1;
    @(negedge clk) begin
      load = 1'b0;
      upd = 1'b0;
    end
    check("load priority", to_real(w), 0.25, 1e-7);
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
