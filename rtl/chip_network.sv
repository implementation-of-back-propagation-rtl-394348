// chip_network: a 4-4 two-layer network built by chaining two expandable unit
// networks, trained on chip.
//
// Unit u_hid is the hidden layer: its rows take the network input x, its error
// generators are configured as hidden neurons (cfg = 0) and its t_e_in takes
// the back-propagated errors e_out of the next unit. Unit u_out is the output
// layer: its rows take the hidden outputs, its error generators are
// configured as output neurons (cfg = 1) and its t_e_in takes the targets t.
// One training iteration runs the phases in this order:
//   hidden forward (3) -> output forward (3) -> output backward (2) ->
//   hidden backward (2) -> both updates (1)
// so the errors sent back use the output-layer weights before their update.
// Every weight then moves by x_row * delta_column, the textbook
// back-propagation step, with learning rate 2^-ETA_SHIFT.
//
// Interface: a one-cycle `start` while idle loads w_hid_init and w_out_init
// (rows = inputs, columns = neurons) and runs n_iter iterations (0 runs one);
// x, t, alpha, theta and n_iter must stay stable while `busy`. `iter_done`
// pulses at the end of every iteration, 16*n cycles after the clock edge that
// samples start (one load cycle, then per iteration the phase latencies
// 3+3+2+2+1 plus one cycle of control before each of the five phases),
// `iter` counts them and `done` pulses one cycle after the last.
//
// Chaining units with configurable error generators is the design's way of
// building larger networks; the controller, its phase order and its timing
// are choices of this implementation.
module chip_network
  import bp_pkg::*;
#(
  parameter int unsigned ETA_SHIFT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [15:0]       n_iter,
  input  fix_t              alpha,
  input  fix_t              theta,
  input  fix_t              x          [N_IN],
  input  fix_t              t          [N_NEUR],
  input  fix_t              w_hid_init [N_IN][N_NEUR],
  input  fix_t              w_out_init [N_NEUR][N_NEUR],
  output fix_t              h          [N_NEUR],
  output fix_t              y          [N_NEUR],
  output fix_t              s_hid      [N_NEUR],
  output fix_t              s_out      [N_NEUR],
  output fix_t              del_hid    [N_NEUR],
  output fix_t              del_out    [N_NEUR],
  output fix_t              e_hid      [N_NEUR],
  output fix_t              e_in_side  [N_IN],
  output fix_t              w_hid      [N_IN][N_NEUR],
  output fix_t              w_out      [N_NEUR][N_NEUR],
  output logic [N_NEUR-1:0] sat_hid,
  output logic [N_NEUR-1:0] sat_out,
  output logic              busy,
  output logic              iter_done,
  output logic [15:0]       iter,
  output logic              done
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_FWD_HID, S_FWD_OUT, S_BWD_OUT, S_BWD_HID, S_UPD
  } state_t;

  state_t state;
  logic load;
  logic fwd_hid_start, fwd_out_start, bwd_out_start, bwd_hid_start, upd_start;
  logic fwd_hid_done, fwd_out_done, bwd_out_done, bwd_hid_done, upd_hid_done, upd_out_done;
  logic [15:0] iter_last;

  assign iter_last = (n_iter == 16'd0) ? 16'd1 : n_iter;
  assign iter_done = upd_hid_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      load          <= 1'b0;
      fwd_hid_start <= 1'b0;
      fwd_out_start <= 1'b0;
      bwd_out_start <= 1'b0;
      bwd_hid_start <= 1'b0;
      upd_start     <= 1'b0;
      busy          <= 1'b0;
      iter          <= '0;
      done          <= 1'b0;
    end else begin
      load          <= 1'b0;
      fwd_hid_start <= 1'b0;
      fwd_out_start <= 1'b0;
      bwd_out_start <= 1'b0;
      bwd_hid_start <= 1'b0;
      upd_start     <= 1'b0;
      done          <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start) begin
            load  <= 1'b1;
            busy  <= 1'b1;
            iter  <= '0;
            state <= S_LOAD;
          end
        // The weights are written at the end of this cycle; the hidden
        // forward phase samples the column sums one cycle later.
        S_LOAD: begin
          fwd_hid_start <= 1'b1;
          state         <= S_FWD_HID;
        end
        S_FWD_HID:
          if (fwd_hid_done) begin
            fwd_out_start <= 1'b1;
            state         <= S_FWD_OUT;
          end
        S_FWD_OUT:
          if (fwd_out_done) begin
            bwd_out_start <= 1'b1;
            state         <= S_BWD_OUT;
          end
        S_BWD_OUT:
          if (bwd_out_done) begin
            bwd_hid_start <= 1'b1;
            state         <= S_BWD_HID;
          end
        S_BWD_HID:
          if (bwd_hid_done) begin
            upd_start <= 1'b1;
            state     <= S_UPD;
          end
        S_UPD:
          if (upd_hid_done) begin
            iter <= iter + 16'd1;
            if (iter + 16'd1 >= iter_last) begin
              busy  <= 1'b0;
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              fwd_hid_start <= 1'b1;
              state         <= S_FWD_HID;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  chip_unit_network #(.ETA_SHIFT(ETA_SHIFT)) u_hid (
    .clk, .rst_n, .load, .w_init(w_hid_init), .alpha, .theta,
    .cfg({N_NEUR{1'b0}}), .x_in(x), .t_e_in(e_hid),
    .fwd_start(fwd_hid_start), .bwd_start(bwd_hid_start), .upd_start(upd_start),
    .x_out(h), .e_out(e_in_side), .del(del_hid), .mul(s_hid), .w(w_hid), .sat(sat_hid),
    .fwd_done(fwd_hid_done), .bwd_done(bwd_hid_done), .upd_done(upd_hid_done)
  );

  chip_unit_network #(.ETA_SHIFT(ETA_SHIFT)) u_out (
    .clk, .rst_n, .load, .w_init(w_out_init), .alpha, .theta,
    .cfg({N_NEUR{1'b1}}), .x_in(h), .t_e_in(t),
    .fwd_start(fwd_out_start), .bwd_start(bwd_out_start), .upd_start(upd_start),
    .x_out(y), .e_out(e_hid), .del(del_out), .mul(s_out), .w(w_out), .sat(sat_out),
    .fwd_done(fwd_out_done), .bwd_done(bwd_out_done), .upd_done(upd_out_done)
  );

  // Both units update together.
  property p_upd_together;
    @(posedge clk) disable iff (!rst_n) upd_hid_done == upd_out_done;
  endproperty
  a_upd_together: assert property (p_upd_together);

endmodule
