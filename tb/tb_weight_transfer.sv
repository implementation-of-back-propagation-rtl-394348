// tb_weight_transfer: self-checking test of weight_transfer.
// Loads initial weights, transfers updated weights several times, checks that
// the register holds between transfers, that load has priority over start,
// and the one-cycle latency of done.
module tb_weight_transfer;
  import bp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, load = 1'b0, done;
  fix_t w_init [N_NEUR][N_IN];
  fix_t dw [N_NEUR][N_IN];
  fix_t w [N_NEUR][N_IN];
  int checks = 0, failures = 0;

  weight_transfer dut (.*);

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

  task automatic check_w(string what, fix_t e [N_NEUR][N_IN]);
    foreach (w[r, c]) begin
      checks++;
      if (w[r][c] !== e[r][c]) begin
        failures++;
        $display("FAIL %s w[%0d][%0d] = %h, expected %h", what, r, c, w[r][c], e[r][c]);
      end
    end
  endtask

  initial begin
    fix_t held [N_NEUR][N_IN];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (w_init[r, c]) w_init[r][c] = to_fix(0.01);
    foreach (dw[r, c]) dw[r][c] = to_fix(0.061002);
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
    check_w("after load", w_init);
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done after load");
    end
    wait_done(1);
    check_w("after transfer", dw);
    repeat (50) begin
      held = w;
      foreach (dw[r, c]) dw[r][c] = fix_t'($urandom);
      repeat (3) @(negedge clk);
      check_w("hold", held);
      wait_done(1);
      check_w("transfer", dw);
    end
    // load and start together: load wins and done stays low.
    foreach (w_init[r, c]) w_init[r][c] = fix_t'($urandom);
    @(negedge clk) begin
      load = 1'b1;
      start = 1'b1;
    end
    @(negedge clk) begin
      load = 1'b0;
      start = 1'b0;
    end
    check_w("load priority", w_init);
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done on load");
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
