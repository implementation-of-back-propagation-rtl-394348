// chip_neuron: one neuron of the expandable unit network.
//
// It turns the column sum s into the activation
//   x = 1 / (1 + e^(-alpha*(s + theta)))
// with programmable gain alpha and threshold theta, and gives two further
// outputs x1 and x2 whose difference is the derivative term used by the
// error generator:
//   x1 = x,  x2 = x * x,  so  x1 - x2 = x * (1 - x).
// The sigmoid is a table look-up with interpolation (sigmoid_interp).
//
// Timing: three cycles from the `start` pulse to the `done` pulse (scale,
// look-up, square). Outputs hold until the next start; `sat` flags an input
// clamped to the table range.
//
// In the design this is an analog circuit in which a control voltage sets the
// gain through a variable resistor and a bias current sets the threshold; here
// alpha and theta are digital inputs. The design states only that x1 - x2
// carries the derivative; realizing it as x and x*x is a choice of this
// implementation.
module chip_neuron
  import bp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t alpha,
  input  fix_t theta,
  input  fix_t s,
  output fix_t x,
  output fix_t x1,
  output fix_t x2,
  output logic sat,
  output logic done
);

  logic [1:0] stage;
  fix_t z, x_c;
  logic sat_c;

  sigmoid_interp u_sig (.z(z), .o(x_c), .sat(sat_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0;
      done  <= 1'b0;
      z     <= '0;
      x     <= '0;
      x1    <= '0;
      x2    <= '0;
      sat   <= 1'b0;
    end else begin
      stage <= {stage[0], start};
      done  <= stage[1];
      if (start) z <= fmul(alpha, s + theta);
      if (stage[0]) begin
        x   <= x_c;
        sat <= sat_c;
      end
      if (stage[1]) begin
        x1 <= x;
        x2 <= fmul(x, x);
      end
    end
  end

endmodule
