// error_genr_ip: error generator of the hidden (input-side) layer.
//
// The output-layer deltas are sent back through the output-layer weights:
// hidden neuron j collects the error
//   e[j] = sum_k w_jk[k][j] * delta_j[k]
// (w_jk[k][j] is the weight from hidden neuron j to output neuron k, in the
// row/column order used by synapse), and its own delta is that error scaled by
// its derivative term:
//   delta_i[j] = e[j] * d_i[j]
// The weights used are those of the forward pass, before this iteration's
// update.
//
// Timing: two cycles from the `start` pulse to the `done` pulse. The error e is
// registered on the first clock edge and delta_i on the second; both hold
// until the next start.
module error_genr_ip
  import bp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t d_i     [N_IN],
  input  fix_t w_jk    [N_NEUR][N_IN],
  input  fix_t delta_j [N_NEUR],
  output fix_t e       [N_IN],
  output fix_t delta_i [N_IN],
  output logic done
);

  logic step;
  fix_t e_c [N_IN];

  always_comb begin
    for (int j = 0; j < int'(N_IN); j++) begin
      e_c[j] = '0;
      for (int k = 0; k < int'(N_NEUR); k++) e_c[j] = e_c[j] + fmul(w_jk[k][j], delta_j[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= 1'b0;
      done <= 1'b0;
      for (int j = 0; j < int'(N_IN); j++) begin
        e[j]       <= '0;
        delta_i[j] <= '0;
      end
    end else begin
      step <= start;
      done <= step;
      if (start) e <= e_c;
      if (step)
        for (int j = 0; j < int'(N_IN); j++) delta_i[j] <= fmul(e[j], d_i[j]);
    end
  end

endmodule
