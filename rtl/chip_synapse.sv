// chip_synapse: one synapse cell of the expandable unit network, with its own
// weight unit.
//
// The cell holds one weight w and does three things:
//   m       = w * x          forward product, summed per column into s_j
//   eps_out = w * delta      backward product, summed per row into eps_i
//   on upd:  w <= w + (x * delta) >>> ETA_SHIFT    (weight unit WU, rate eta)
// m and eps_out are combinational. `load` writes w_init (priority over upd).
// The update is registered on the clock edge that samples `upd`.
//
// The three functions, the weight unit and the learning-rate factor eta follow
// the cell of the design, which is an analog current-mode circuit; this is a
// digital realization of it. The power-of-two learning rate (default 1), the
// fixed-point format and the load port are choices of this implementation.
module chip_synapse
  import bp_pkg::*;
#(
  parameter int unsigned ETA_SHIFT = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  fix_t w_init,
  input  logic upd,
  input  fix_t x,
  input  fix_t delta,
  output fix_t w,
  output fix_t m,
  output fix_t eps_out
);

  assign m       = fmul(w, x);
  assign eps_out = fmul(w, delta);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    w <= '0;
    else if (load) w <= w_init;
    else if (upd)  w <= w + (fmul(x, delta) >>> ETA_SHIFT);
  end

endmodule
