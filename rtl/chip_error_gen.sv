// chip_error_gen: configurable error generator of the expandable unit network.
//
// One shared port t_eps carries either a target or a back-propagated error,
// and the configuration bit c says which:
//   c = 1 (output neuron): delta = (t_eps - x) * (x1 - x2)   t_eps is a target
//   c = 0 (hidden neuron): delta =  t_eps      * (x1 - x2)   t_eps is an error
// x is the neuron's output and x1 - x2 its derivative term (chip_neuron).
// Because the same cell serves both cases, unit networks can be chained into
// deeper networks without separate output-layer hardware.
//
// Timing: `done` pulses one cycle after the `start` pulse; delta is registered
// then and holds until the next start.
//
// The two modes, the shared port and the equations follow the design (an
// analog circuit there); the fixed-point format and the timing are choices of
// this implementation.
module chip_error_gen
  import bp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic c,
  input  fix_t t_eps,
  input  fix_t x,
  input  fix_t x1,
  input  fix_t x2,
  output fix_t delta,
  output logic done
);

  fix_t err;

  assign err = c ? (t_eps - x) : t_eps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      delta <= '0;
      done  <= 1'b0;
    end else begin
      done <= start;
      if (start) delta <= fmul(err, x1 - x2);
    end
  end

endmodule
