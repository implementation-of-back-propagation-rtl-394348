// error_genr_op: error generator of the output layer.
//
// For each output neuron k it compares the actual output o[k] with the target
// t[k] and scales the difference by the neuron's derivative term d[k]:
//   delta[k] = (o[k] - t[k]) * d[k]
// delta is the rate at which the squared output error changes with the
// neuron's summed input; it drives the output-layer weight update and is fed
// back to the hidden layer through error_genr_ip.
//
// Sign: delta is taken as actual minus target, so that the update
// w <- w - delta * o used by weight_update moves the output towards the target.
//
// Timing: `done` pulses one cycle after the `start` pulse; delta is registered
// then and holds until the next start.
module error_genr_op
  import bp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t o     [N_NEUR],
  input  fix_t d     [N_NEUR],
  input  fix_t t     [N_NEUR],
  output fix_t delta [N_NEUR],
  output logic done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int k = 0; k < int'(N_NEUR); k++) delta[k] <= '0;
    end else begin
      done <= start;
      if (start)
        for (int k = 0; k < int'(N_NEUR); k++) delta[k] <= fmul(o[k] - t[k], d[k]);
    end
  end

endmodule
