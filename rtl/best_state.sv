// best_state: running search for the state with the smallest metric.
//
// During one trellis step the state metric unit offers two new metrics with
// their state numbers per 'upd' strobe. The unit keeps the smallest metric
// seen since 'clr' and the number of its state; on equal metrics the state
// offered first (and, within a strobe, candidate a) wins. The smallest
// metric also serves as the normalisation offset of the next step. Finding
// the best state for the traceback start follows the document; the
// tie rule and the two-per-cycle organisation are this design's own.
//
// Timing: 'clr' and 'upd' in the same cycle start a new search with that
// pair. Results are registered: valid the cycle after the last 'upd'.
module best_state
  import fec_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr,
  input  logic   upd,
  input  sm_t    ma,
  input  state_t sta,
  input  sm_t    mb,
  input  state_t stb,
  output sm_t    min_metric,
  output state_t best
);

  sm_t    pm;
  state_t ps;
  always_comb begin
    if (mb < ma) begin pm = mb; ps = stb; end
    else         begin pm = ma; ps = sta; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_metric <= '1;
      best       <= '0;
    end else if (upd) begin
      if (clr || pm < min_metric) begin
        min_metric <= pm;
        best       <= ps;
      end
    end else if (clr) begin
      min_metric <= '1;
      best       <= '0;
    end
  end

endmodule
