// weight_transfer: the weight register of one layer (the "WU" unit).
//
// It holds the sixteen weights the layer's synapse uses. `load` writes the
// initial weights w_init (used when training begins); a `start` pulse copies
// the updated weights dw computed by weight_update into the register, so that
// the next training iteration uses them, and `done` pulses one cycle later.
// If both arrive in the same cycle, load wins.
//
// The transfer w <- dw follows the original design; the separate load port for
// the initial weights and the single-cycle timing are choices of this
// implementation.
module weight_transfer
  import bp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  fix_t w_init [N_NEUR][N_IN],
  input  logic start,
  input  fix_t dw     [N_NEUR][N_IN],
  output fix_t w      [N_NEUR][N_IN],
  output logic done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int r = 0; r < int'(N_NEUR); r++)
        for (int c = 0; c < int'(N_IN); c++) w[r][c] <= '0;
    end else begin
      done <= start && !load;
      if (load)       w <= w_init;
      else if (start) w <= dw;
    end
  end

endmodule
