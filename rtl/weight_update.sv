// weight_update: computes the new weights of one layer.
//
// For every weight of the layer
//   dw[r][c] = w[r][c] - (delta[r] * o[r]) >>> ETA_SHIFT
// where delta[r] is the delta of neuron r of this layer and o[r] is the output
// of that same neuron. Using the layer's own output o (rather than the input
// that the weight multiplies) reproduces the update rule of the original
// design, in which the output-layer unit receives the output-layer activations
// and the hidden-layer unit the hidden-layer activations; as a consequence all
// weights of one row change by the same amount.
//
// ETA_SHIFT scales the step by a learning rate of 2^-ETA_SHIFT. The original
// update has no learning-rate factor, which is the default ETA_SHIFT = 0.
//
// Timing: `done` pulses one cycle after the `start` pulse; dw is registered
// then and holds until the next start.
module weight_update
  import bp_pkg::*;
#(
  parameter int unsigned ETA_SHIFT = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t delta [N_NEUR],
  input  fix_t o     [N_NEUR],
  input  fix_t w     [N_NEUR][N_IN],
  output fix_t dw    [N_NEUR][N_IN],
  output logic done
);

  fix_t step [N_NEUR];

  always_comb
    for (int r = 0; r < int'(N_NEUR); r++) step[r] = fmul(delta[r], o[r]) >>> ETA_SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int r = 0; r < int'(N_NEUR); r++)
        for (int c = 0; c < int'(N_IN); c++) dw[r][c] <= '0;
    end else begin
      done <= start;
      if (start)
        for (int r = 0; r < int'(N_NEUR); r++)
          for (int c = 0; c < int'(N_IN); c++) dw[r][c] <= w[r][c] - step[r];
    end
  end

endmodule
