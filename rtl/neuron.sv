// neuron: four sigmoid neurons of one layer, each also giving the derivative.
//
// For every lane the neuron computes
//   o = f(s) = 1 / (1 + e^(-alpha*(s + theta)))     (sigmoid, programmable
//                                                    gain alpha, threshold theta)
//   d = o * (1 - o)                                  (its derivative term)
// The sigmoid comes from a table of samples of 1/(1+e^-z) every 1/32 over
// [-8, 8] (one sigmoid_interp per lane) with linear interpolation between the
// two samples around z; outside that range z is clamped to the end of the
// table. The interpolation error stays below about 2e-5.
//
// Timing: three cycles from the `start` pulse to the `done` pulse.
//   cycle 1: z = alpha * (s + theta) is registered
//   cycle 2: table look-up and interpolation, o is registered
//   cycle 3: d = o * (1 - o) is registered, done pulses
// o and d hold until the next start. `sat` flags each lane whose z fell
// outside the table range and was clamped.
//
// The sigmoid with gain and threshold and the derivative o*(1-o) follow the
// original model; the table, its size, clamping and the latency are choices of
// this implementation.
module neuron
  import bp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t alpha,
  input  fix_t theta,
  input  fix_t s   [N_NEUR],
  output fix_t o   [N_NEUR],
  output fix_t d   [N_NEUR],
  output logic [N_NEUR-1:0] sat,
  output logic done
);

  logic [1:0] stage;
  fix_t z   [N_NEUR];
  fix_t o_c [N_NEUR];
  logic [N_NEUR-1:0] sat_c;

  for (genvar k = 0; k < N_NEUR; k++) begin : g_lane
    sigmoid_interp u_sig (.z(z[k]), .o(o_c[k]), .sat(sat_c[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0;
      done  <= 1'b0;
      sat   <= '0;
      for (int k = 0; k < int'(N_NEUR); k++) begin
        z[k] <= '0;
        o[k] <= '0;
        d[k] <= '0;
      end
    end else begin
      stage <= {stage[0], start};
      done  <= stage[1];
      if (start)
        for (int k = 0; k < int'(N_NEUR); k++) z[k] <= fmul(alpha, s[k] + theta);
      if (stage[0]) begin
        o   <= o_c;
        sat <= sat_c;
      end
      if (stage[1])
        for (int k = 0; k < int'(N_NEUR); k++) d[k] <= fmul(o[k], FIX_ONE - o[k]);
    end
  end

endmodule
