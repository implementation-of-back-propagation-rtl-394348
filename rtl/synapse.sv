// synapse: the sixteen weighted connections of one network layer.
//
// Each of the N_NEUR outputs is the weighted sum of the N_IN layer inputs,
//   s[r] = sum_c w[r][c] * x[c],
// and the sixteen partial products m[r][c] = w[r][c] * x[c] are brought out as
// well, as in the original model of this block. All sixteen multiplications
// and the four sums are done in parallel in one clock cycle.
//
// Interface: a one-cycle pulse on `start` samples x and w; on the next clock
// edge s and m are registered and `done` pulses for one cycle. The outputs hold
// their value until the next start. Row index r selects the neuron the sum
// feeds and column index c the input it weights: the row/column order, the
// fixed-point format, the one-cycle latency and the pulse form of start/done
// are choices of this implementation.
module synapse
  import bp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t x [N_IN],
  input  fix_t w [N_NEUR][N_IN],
  output fix_t s [N_NEUR],
  output fix_t m [N_NEUR][N_IN],
  output logic done
);

  fix_t m_c [N_NEUR][N_IN];
  fix_t s_c [N_NEUR];

  always_comb begin
    for (int r = 0; r < int'(N_NEUR); r++) begin
      s_c[r] = '0;
      for (int c = 0; c < int'(N_IN); c++) begin
        m_c[r][c] = fmul(w[r][c], x[c]);
        s_c[r]    = s_c[r] + m_c[r][c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int r = 0; r < int'(N_NEUR); r++) begin
        s[r] <= '0;
        for (int c = 0; c < int'(N_IN); c++) m[r][c] <= '0;
      end
    end else begin
      done <= start;
      if (start) begin
        s <= s_c;
        m <= m_c;
      end
    end
  end

endmodule
